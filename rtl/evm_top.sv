// evm_top: electronic voting machine (EVM) for four parties and NOTA.
//
// A polling officer opens voting with vo_en. A voter closes one of five
// switches vo_sw (bit 0..3 = Party1..Party4, bit 4 = NOTA). Each new one-hot
// switch code seen while vo_en is high is one vote: the matching count
// register (Party1..Party4, Nota) is incremented and the matching LED of
// Pled lights for LED_TIMER_MAX clocks. A non-zero code with more than one
// switch closed is an invalid attempt: nothing is counted, the LEDs go dark
// and `invalid` is high for as long as the code is present. A vote for an
// option whose count is already at its largest value is refused the same
// way (`invalid` high for one clock). Dout is the total of all five counts.
//
// Election setup: while vo_en is low, a setup_we pulse loads the number of
// registered voters (cfg_voters) and of contesting parties (cfg_parties,
// 1..4). During voting, a vote for a party that does not contest, or any
// vote once Dout has reached the registered-voter number (poll_complete),
// is refused and flagged invalid for one clock. After reset there is no
// practical voter limit and all four parties contest.
//
// SINGLE_VOTE selects how the enable is used. With 0 (the default) every
// new valid code is a vote, as in the published simulation, where vo_en
// stays high for ten votes. With 1 each enable window (vo_en high) admits one
// vote; a further vote in the same window is a repeated vote, refused and
// flagged invalid for one clock. The officer drops vo_en between voters.
//
// When vo_en is low, the party with the most votes is declared on
// winner/win_count/win_valid (`tie` if the top count is shared). One count,
// chosen by disp_sel (0..3 = Party1..Party4, 4 = NOTA, other values blank),
// is shown in decimal on three multiplexed seven-segment digits with
// active-low anodes An0..An2 (an_n[0..2]).
//
// Timing: all inputs are synchronous to clk and sampled on its rising edge;
// counts, Pled and invalid change on the edge that samples the code, Dout with
// them, the winner outputs one clock later. rst_n is a synchronous
// active-low reset that clears all counts.
//
// The port set (vo_en, reset, clk, vo_sw, Pled, Dout, Party1..Party4, Nota,
// invalid), the 8-bit counts, the LED timer, the one-vote-per-enable rule,
// the voter and contestant setup and the winner declaration follow the
// published design; the vote-on-change rule, the setup handshake, the
// refusal of votes for a full count, the tie rule and the display format
// are this design's own.
module evm_top
#(
  parameter int unsigned LED_TIMER_MAX  = evm_pkg::LED_TIMER_MAX_DEFAULT,
  parameter int unsigned REFRESH_CYCLES = evm_pkg::REFRESH_CYCLES_DEFAULT,
  parameter int unsigned CNT_W          = evm_pkg::CNT_W,
  parameter bit          SINGLE_VOTE    = 1'b0,
  localparam int unsigned TOT_W         = CNT_W + $clog2(evm_pkg::N_OPT)
) (
  input  logic                       clk,
  input  logic                       rst_n,      // synchronous, active low
  input  logic                       vo_en,      // voting enable
  input  logic [evm_pkg::N_OPT-1:0]           vo_sw,      // voter switches
  input  logic [2:0]                 disp_sel,   // count shown on the display
  input  logic                       setup_we,   // load cfg_voters, cfg_parties
  input  logic [TOT_W-1:0]           cfg_voters, // registered voters
  input  logic [2:0]                 cfg_parties,// contesting parties, 1..4
  output logic [TOT_W-1:0]           Dout,       // total votes
  output logic [evm_pkg::N_OPT-1:0]           Pled,       // vote-confirmation LEDs
  output logic [CNT_W-1:0]           Party1,
  output logic [CNT_W-1:0]           Party2,
  output logic [CNT_W-1:0]           Party3,
  output logic [CNT_W-1:0]           Party4,
  output logic [CNT_W-1:0]           Nota,
  output logic                       invalid,    // invalid attempt
  output logic                       poll_complete, // all registered voters voted
  output logic [$clog2(evm_pkg::N_PARTY)-1:0] winner,     // 0..3 = Party1..Party4
  output logic [CNT_W-1:0]           win_count,  // the winner's vote count
  output logic                       win_valid,  // winner declared
  output logic                       tie,        // highest count shared
  output logic [6:0]                 seg_n,      // segments g..a, active low
  output logic [evm_pkg::N_DIGITS-1:0]        an_n        // anodes An2..An0, active low
);

  logic                cast, bad_code, repeat_vote, accept, reject;
  logic                admit, deny;
  logic [evm_pkg::OPT_W-1:0]    cand;
  logic [CNT_W-1:0]    count [evm_pkg::N_OPT];
  logic [CNT_W-1:0]    party_count [evm_pkg::N_PARTY];
  logic [CNT_W-1:0]    disp_value;
  logic                disp_blank;

  evm_vote_decoder #(.N_OPT(evm_pkg::N_OPT), .SINGLE_VOTE(SINGLE_VOTE)) u_decoder (
    .clk, .rst_n, .vo_en, .vo_sw,
    .cast, .cand, .bad_code, .repeat_vote
  );

  evm_voter_setup #(.N_OPT(evm_pkg::N_OPT), .N_PARTY(evm_pkg::N_PARTY), .TOT_W(TOT_W)) u_setup (
    .clk, .rst_n, .vo_en, .setup_we, .cfg_voters, .cfg_parties,
    .cast, .cand,
    .total (Dout),
    .admit, .deny, .poll_complete
  );

  evm_vote_tally #(.N_OPT(evm_pkg::N_OPT), .CNT_W(CNT_W)) u_tally (
    .clk, .rst_n,
    .cast (admit),
    .cand,
    .accept, .reject, .count
  );

  evm_led_ctrl #(.N_OPT(evm_pkg::N_OPT), .LED_TIMER_MAX(LED_TIMER_MAX)) u_led (
    .clk, .rst_n,
    .show  (accept),
    .cand,
    .clear (bad_code || reject || repeat_vote || deny),
    .pled  (Pled)
  );

  evm_vote_total #(.N_OPT(evm_pkg::N_OPT), .CNT_W(CNT_W)) u_total (
    .count, .dout (Dout)
  );

  always_comb begin
    for (int i = 0; i < evm_pkg::N_PARTY; i++) party_count[i] = count[i];
  end

  evm_winner #(.N_PARTY(evm_pkg::N_PARTY), .CNT_W(CNT_W)) u_winner (
    .clk, .rst_n, .vo_en,
    .count (party_count),
    .winner, .win_count, .win_valid, .tie
  );

  // Invalid flag: a bad switch code, a repeated vote, a vote for a party
  // that does not contest or past the voter limit, or a vote refused
  // because its count is full.
  always_ff @(posedge clk) begin
    if (!rst_n) invalid <= 1'b0;
    else        invalid <= bad_code || reject || repeat_vote || deny;
  end

  assign Party1 = count[evm_pkg::OPT_PARTY1];
  assign Party2 = count[evm_pkg::OPT_PARTY2];
  assign Party3 = count[evm_pkg::OPT_PARTY3];
  assign Party4 = count[evm_pkg::OPT_PARTY4];
  assign Nota   = count[evm_pkg::OPT_NOTA];

  always_comb begin
    disp_blank = (32'(disp_sel) >= evm_pkg::N_OPT);
    disp_value = disp_blank ? '0 : count[disp_sel[evm_pkg::OPT_W-1:0]];
  end

  evm_seg7_display #(.CNT_W(CNT_W), .REFRESH_CYCLES(REFRESH_CYCLES)) u_display (
    .clk, .rst_n,
    .value (disp_value),
    .blank (disp_blank),
    .seg_n, .an_n
  );

endmodule
