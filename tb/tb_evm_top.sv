// tb_evm_top: end-to-end test of the electronic voting machine.
//
// Runs the whole machine with a short LED hold (LED_TIMER_MAX = 5) and a fast
// display scan (REFRESH_CYCLES = 3); the count width stays at its default of
// 8 bits. A cycle reference model (tb_evm_model_pkg) predicts the counts,
// Dout, Pled and invalid after every clock, and the test compares all of them
// every clock. The session:
//   1. the published simulation: voting enabled, every switch code 0..31 in
//      turn, twice; afterwards each option must hold 2 votes and Dout 10;
//   2. a switch held closed (one vote), switches moved while voting is
//      disabled (no vote), a vote left alone until its LED times out;
//   3. one option voted 260 times, so that its count fills and further
//      votes for it are refused and flagged invalid;
//   4. random voting with random enable;
//   5. voting closed: the declared winner is checked, then a fresh session
//      after reset ends in a tie;
//   6. each count read back from the seven-segment display;
//   7. after reset, an election set up for 2 contesting parties and 12
//      registered voters: votes for parties 3 and 4 and votes after the
//      twelfth are refused, a setup attempt during voting is ignored, and
//      Dout stops at 12 with poll_complete high.
// Every mechanism must occur at least once; one that never does is a failure.
module tb_evm_top;
  import tb_evm_model_pkg::*;

  localparam int HOLD = 5;
  localparam int REF  = 3;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        vo_en;
  logic [4:0]  vo_sw;
  logic [2:0]  disp_sel;
  logic        setup_we = 1'b0;
  logic [10:0] cfg_voters = '0;
  logic [2:0]  cfg_parties = '0;
  logic        poll_complete;
  logic [10:0] Dout;
  logic [4:0]  Pled;
  logic [7:0]  Party1, Party2, Party3, Party4, Nota;
  logic        invalid;
  logic [1:0]  winner;
  logic [7:0]  win_count;
  logic        win_valid, tie;
  logic [6:0]  seg_n;
  logic [2:0]  an_n;

  int checks = 0, failures = 0;
  int n_win = 0, n_tie = 0, n_blank = 0, n_reset_clear = 0, n_disp = 0;
  evm_model m;

  evm_top #(.LED_TIMER_MAX(HOLD), .REFRESH_CYCLES(REF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic compare();
    expect_eq("Party1", int'(Party1), m.cnt[0]);
    expect_eq("Party2", int'(Party2), m.cnt[1]);
    expect_eq("Party3", int'(Party3), m.cnt[2]);
    expect_eq("Party4", int'(Party4), m.cnt[3]);
    expect_eq("Nota", int'(Nota), m.cnt[4]);
    expect_eq("Dout", int'(Dout), m.total());
    expect_eq("Pled", int'(Pled), m.led);
    expect_eq("invalid", int'(invalid), int'(m.invalid));
    expect_eq("poll_complete", int'(poll_complete), int'(m.total() >= m.limit));
  endtask

  // One clock with the given inputs, then compare.
  task automatic cyc(input logic en, input int sw);
    vo_en = en;
    vo_sw = 5'(sw);
    @(posedge clk);
    m.step(en, sw);
    @(negedge clk);
    compare();
  endtask

  // Load the election setup with voting disabled.
  task automatic do_setup(input logic en, input int voters, input int parties);
    setup_we = 1'b1;
    cfg_voters = 11'(voters);
    cfg_parties = 3'(parties);
    vo_en = en;
    vo_sw = '0;
    @(posedge clk);
    m.step(en, 0);
    if (!en) m.configure(voters, parties);
    @(negedge clk);
    setup_we = 1'b0;
    compare();
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    vo_en = 1'b0;
    vo_sw = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    m.reset();
    compare();
  endtask

  // Close voting and check the declaration one clock later.
  task automatic check_result();
    cyc(1'b0, 0);
    cyc(1'b0, 0);
    expect_eq("win_valid", int'(win_valid), int'(m.winner() >= 0));
    expect_eq("tie", int'(tie), int'(m.is_tie()));
    if (m.winner() >= 0) begin
      expect_eq("winner", int'(winner), m.winner());
      expect_eq("win_count", int'(win_count), m.cnt[m.winner()]);
      n_win++;
    end
    if (m.is_tie()) n_tie++;
  endtask

  // Read the count selected by sel back from the multiplexed digits.
  task automatic read_display(input int sel);
    int v, dig [3];
    bit seen [3];
    disp_sel = 3'(sel);
    v = (sel < 5) ? m.cnt[sel] : -1;
    repeat (2) @(negedge clk);
    foreach (seen[i]) seen[i] = 0;
    for (int k = 0; k < 2 * 3 * REF; k++) begin
      @(negedge clk);
      for (int d = 0; d < 3; d++) if (an_n == ~(3'b001 << d)) begin
        seen[d] = 1;
        dig[d] = seg_digit(seg_n);
      end
    end
    foreach (seen[d]) expect_eq("digit scanned", int'(seen[d]), 1);
    if (v < 0) begin
      expect_eq("blank segments", int'(seg_n), 7'h7F);
      n_blank++;
    end else begin
      expect_eq("display value", dig[2] * 100 + dig[1] * 10 + dig[0], v);
      n_disp++;
    end
  endtask

  function automatic int seg_digit(input logic [6:0] s);
    case (~s)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;
      default: return 900;
    endcase
  endfunction

  initial begin
    m = new(HOLD, 255);
    disp_sel = '0;
    do_reset();

    // 1. The published run: every code in turn, voting enabled, twice.
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 32; c++) cyc(1'b1, c);
    expect_eq("Party1 after sweep", int'(Party1), 2);
    expect_eq("Party2 after sweep", int'(Party2), 2);
    expect_eq("Party3 after sweep", int'(Party3), 2);
    expect_eq("Party4 after sweep", int'(Party4), 2);
    expect_eq("Nota after sweep", int'(Nota), 2);
    expect_eq("Dout after sweep", int'(Dout), 10);

    // 2. Held switch, disabled voting, LED timeout.
    repeat (6) cyc(1'b1, 5'b00010);
    cyc(1'b0, 0);
    cyc(1'b0, 5'b01000);
    cyc(1'b0, 5'b10000);
    cyc(1'b1, 0);
    cyc(1'b1, 5'b00001);
    repeat (HOLD + 3) cyc(1'b1, 0);

    // 3. Fill Party3 and keep voting for it.
    for (int k = 0; k < 260; k++) begin
      cyc(1'b1, 5'b00100);
      cyc(1'b1, 0);
    end
    expect_eq("Party3 full", int'(Party3), 255);

    // 4. Random session.
    for (int k = 0; k < 3000; k++) begin
      int sw;
      sw = ($urandom_range(0, 2) != 0) ? (1 << $urandom_range(0, 4)) : $urandom_range(0, 31);
      cyc($urandom_range(0, 9) != 0, sw);
    end

    // 5. Declare the result, then a tied election after reset.
    check_result();
    for (int s = 0; s < 6; s++) read_display(s);
    do_reset();
    n_reset_clear++;
    cyc(1'b1, 5'b00001);
    cyc(1'b1, 5'b00010);
    cyc(1'b1, 5'b10000);
    expect_eq("win_valid while open", int'(win_valid), 0);
    check_result();
    cyc(1'b1, 5'b00010);
    check_result();

    // 6. Display of the final counts.
    for (int s = 0; s < 5; s++) read_display(s);

    // 7. Setup: two parties, twelve voters.
    do_reset();
    do_setup(1'b0, 12, 2);
    cyc(1'b1, 0);
    do_setup(1'b1, 500, 4);
    for (int k = 0; k < 400; k++) begin
      int sw;
      sw = ($urandom_range(0, 4) != 0) ? (1 << $urandom_range(0, 4)) : 0;
      cyc(1'b1, sw);
    end
    expect_eq("Dout at voter limit", int'(Dout), 12);
    expect_eq("poll_complete at limit", int'(poll_complete), 1);
    expect_eq("no votes for party 3", int'(Party3), 0);
    expect_eq("no votes for party 4", int'(Party4), 0);
    check_result();

    // Every mechanism must have happened.
    $display("votes=%0d held=%0d bad=%0d refused_full=%0d led_timeout=%0d led_clear=%0d disabled=%0d",
             m.n_vote, m.n_held, m.n_bad, m.n_full, m.n_timeout, m.n_led_clear, m.n_disabled);
    $display("winners=%0d ties=%0d display_reads=%0d blank=%0d resets=%0d",
             n_win, n_tie, n_disp, n_blank, n_reset_clear);
    $display("setup refusals: party=%0d limit=%0d", m.n_deny_party, m.n_deny_limit);
    expect_eq("votes seen", int'(m.n_vote > 0), 1);
    expect_eq("non-contesting party refused", int'(m.n_deny_party > 0), 1);
    expect_eq("voter limit refused", int'(m.n_deny_limit > 0), 1);
    expect_eq("held switch seen", int'(m.n_held > 0), 1);
    expect_eq("bad code seen", int'(m.n_bad > 0), 1);
    expect_eq("full count seen", int'(m.n_full > 0), 1);
    expect_eq("LED timeout seen", int'(m.n_timeout > 0), 1);
    expect_eq("LED clear seen", int'(m.n_led_clear > 0), 1);
    expect_eq("disabled voting seen", int'(m.n_disabled > 0), 1);
    expect_eq("winner seen", int'(n_win > 0), 1);
    expect_eq("tie seen", int'(n_tie > 0), 1);
    expect_eq("display seen", int'(n_disp > 0), 1);
    expect_eq("blank seen", int'(n_blank > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
