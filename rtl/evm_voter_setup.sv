// evm_voter_setup: election setup of the EVM (registered voters, contestants).
//
// Before voting, the polling officer sets how many voters are registered and
// how many of the four parties contest this election. Both values are loaded
// from cfg_voters and cfg_parties on a clock edge with setup_we high while
// voting is disabled (vo_en low); a setup_we pulse during voting is ignored.
// Reset loads the defaults: the largest representable voter number (no
// practical limit, since five full counts total 1275) and all four parties.
//
// During voting the block screens each vote coming from the switch decoder:
//   * a vote for a party numbered above the contestant count, or a vote
//     arriving when the total already equals the registered-voter number,
//     is denied (`deny` high, `admit` low);
//   * every other vote is admitted and passed on to the count registers.
// NOTA is always available. `poll_complete` is high once the total has
// reached the registered-voter number, so the total can never exceed it.
//
// Timing: the two loaded values are registered; admit, deny and
// poll_complete are combinational from them, the vote strobe and the total.
// Fixing the voter and contestant numbers at the start of the election and
// a total that matches the number of participants follow the published
// design; the load handshake, the defaults and the denial rule are this
// design's own.
module evm_voter_setup
#(
  parameter int unsigned N_OPT   = evm_pkg::N_OPT,
  parameter int unsigned N_PARTY = evm_pkg::N_PARTY,
  parameter int unsigned TOT_W   = evm_pkg::CNT_W + $clog2(evm_pkg::N_OPT)
) (
  input  logic                       clk,
  input  logic                       rst_n,          // synchronous, active low
  input  logic                       vo_en,          // voting enable
  input  logic                       setup_we,       // load the two values below
  input  logic [TOT_W-1:0]           cfg_voters,     // registered voters
  input  logic [$clog2(N_PARTY):0]   cfg_parties,    // contesting parties, 1..N_PARTY
  input  logic                       cast,           // vote from the decoder
  input  logic [$clog2(N_OPT)-1:0]   cand,           // its option
  input  logic [TOT_W-1:0]           total,          // votes counted so far
  output logic                       admit,          // vote goes to the counts
  output logic                       deny,           // vote refused by the setup
  output logic                       poll_complete   // every registered voter voted
);

  logic [TOT_W-1:0]         reg_voters;   // loaded voter number
  logic [$clog2(N_PARTY):0] n_parties;    // loaded contestant number
  logic                     contesting;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_voters <= '1;
      n_parties  <= ($clog2(N_PARTY) + 1)'(N_PARTY);
    end else if (setup_we && !vo_en) begin
      reg_voters <= cfg_voters;
      n_parties  <= cfg_parties;
    end
  end

  always_comb begin
    // Options 0..N_PARTY-1 are parties; the last option (NOTA) always counts.
    contesting    = (32'(cand) >= N_PARTY) || (32'(cand) < 32'(n_parties));
    poll_complete = (total >= reg_voters);
    admit         = cast && contesting && !poll_complete;
    deny          = cast && !(contesting && !poll_complete);
  end

  initial begin
    assert (N_OPT == N_PARTY + 1)
      else $error("evm_voter_setup expects the parties followed by one NOTA option");
  end

endmodule
