// evm_vote_tally: the vote-count registers of the EVM (Party1..Party4, NOTA).
//
// One CNT_W-bit register per option. On a clock edge where `cast` is high the
// register selected by `cand` is incremented, unless it already holds its
// largest value: the vote is then refused (`reject` is high in that cycle)
// and no register changes, so the counts and their sum never wrap. Reset
// clears every count.
//
// Interface: `cast`/`cand` come from the switch decoder, after the election
// setup has admitted the vote, and are sampled on the rising clock edge;
// `accept` and `reject` are combinational and tell, in the same cycle, what
// that edge will do. `count` is registered.
// The five 8-bit registers follow the published design; refusing a vote for
// a full register (instead of wrapping) is this design's own choice.
module evm_vote_tally
#(
  parameter int unsigned N_OPT = evm_pkg::N_OPT,
  parameter int unsigned CNT_W = evm_pkg::CNT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,              // synchronous, active low
  input  logic                     cast,               // valid vote this cycle
  input  logic [$clog2(N_OPT)-1:0] cand,               // option voted for
  output logic                     accept,             // vote will be counted
  output logic                     reject,             // vote refused: count full
  output logic [CNT_W-1:0]         count [N_OPT]       // vote counts
);

  logic in_range;
  logic full;

  always_comb begin
    in_range = (32'(cand) < N_OPT);
    full     = in_range && (count[cand] == '1);
    accept   = cast && in_range && !full;
    reject   = cast && full;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OPT; i++) count[i] <= '0;
    end else if (accept) begin
      count[cand] <= count[cand] + 1'b1;
    end
  end

endmodule
