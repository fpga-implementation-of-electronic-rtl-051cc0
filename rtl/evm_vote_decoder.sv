// evm_vote_decoder: classifies the voter switch input of the EVM.
//
// Each option has its own switch, so a proper selection has exactly one bit
// set. While the polling officer holds vo_en high:
//   * a one-hot code that differs from the code seen on the previous clock
//     raises `cast` for that one cycle, with the option index on `cand`;
//   * any other non-zero code raises `bad_code` for as long as it is present;
//   * an all-zero code is "no switch activated" and raises neither.
// With vo_en low all outputs stay low.
//
// With SINGLE_VOTE = 1 each enable window admits one vote: after a vote has
// been cast, further new valid codes raise `repeat_vote` instead of `cast`
// until vo_en goes low, which the polling officer does between voters. With
// SINGLE_VOTE = 0 (the default) every new valid code is a vote, as in the
// published simulation, where vo_en stays high for ten votes; `repeat_vote`
// is then always low.
//
// Timing: the outputs are combinational from vo_en, vo_sw and two registers
// (the previous switch code, and whether a vote was cast in the current
// enable window), so the downstream registers act on the same clock edge
// that samples the code. The previous-code register follows vo_sw on every
// clock, whatever vo_en is: holding a switch yields one vote, and a switch
// already closed when voting is enabled is not counted until it changes.
// This change rule is this design's own reading of "votes are cast just
// once"; the one-hot coding follows the published switch and LED traces and
// the enable window follows the published voting-enable rule. vo_sw must be
// synchronous to clk.
module evm_vote_decoder
#(
  parameter int unsigned N_OPT       = evm_pkg::N_OPT,
  parameter bit          SINGLE_VOTE = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,     // synchronous, active low
  input  logic                     vo_en,     // voting enable
  input  logic [N_OPT-1:0]         vo_sw,     // one switch per option
  output logic                     cast,      // new valid vote this cycle
  output logic [$clog2(N_OPT)-1:0] cand,      // option index of the vote
  output logic                     bad_code,  // non-zero, non-one-hot code
  output logic                     repeat_vote // second vote in one window
);

  logic [N_OPT-1:0] prev_sw;
  logic             one_hot;
  logic             new_code;
  logic             voted;      // a vote was cast in this enable window
  int unsigned      ones;

  always_ff @(posedge clk) begin
    if (!rst_n) prev_sw <= '0;
    else        prev_sw <= vo_sw;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !vo_en) voted <= 1'b0;
    else if (cast)        voted <= SINGLE_VOTE;
  end

  // Count the closed switches and find the index of the (last) closed one.
  always_comb begin
    ones = 0;
    cand = '0;
    for (int i = 0; i < N_OPT; i++) begin
      if (vo_sw[i]) begin
        ones = ones + 1;
        cand = ($clog2(N_OPT))'(i);
      end
    end
    one_hot  = (ones == 1);
    new_code    = vo_en && one_hot && (vo_sw != prev_sw);
    cast        = new_code && !voted;
    repeat_vote = new_code && voted;
    bad_code    = vo_en && (vo_sw != '0) && !one_hot;
  end

endmodule
