// tb_evm_top_single: end-to-end test of the machine in one-vote-per-enable
// mode (SINGLE_VOTE = 1), with LED_TIMER_MAX = 5 and REFRESH_CYCLES = 3.
//
// Simulates 600 voters. For each, the polling officer raises vo_en, the
// voter moves the switches a random number of times (valid and invalid
// codes), and the officer lowers vo_en again for one or two clocks. Only the
// first new valid code of each window may count; later ones are repeated
// votes that must be refused and flagged invalid. The cycle reference model
// (tb_evm_model_pkg) checks counts, Dout, Pled and invalid after every clock,
// and at the end the declared winner is checked. Accepted votes, repeated
// votes and bad codes must each have occurred.
module tb_evm_top_single;
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
  evm_model m;

  evm_top #(.LED_TIMER_MAX(HOLD), .REFRESH_CYCLES(REF), .SINGLE_VOTE(1'b1)) dut (.*);

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

  task automatic cyc(input logic en, input int sw);
    vo_en = en;
    vo_sw = 5'(sw);
    @(posedge clk);
    m.step(en, sw);
    @(negedge clk);
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

  initial begin
    int sw;
    m = new(HOLD, 255, 1'b1);
    disp_sel = '0;
    rst_n = 1'b0; vo_en = 1'b0; vo_sw = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    m.reset();
    sw = 0;
    for (int v = 0; v < 600; v++) begin
      repeat ($urandom_range(1, 6)) begin
        sw = ($urandom_range(0, 3) != 0) ? (1 << $urandom_range(0, 4)) : $urandom_range(0, 31);
        repeat ($urandom_range(1, 2)) cyc(1'b1, sw);
      end
      repeat ($urandom_range(1, 2)) cyc(1'b0, sw);
    end
    cyc(1'b0, 0);
    cyc(1'b0, 0);
    expect_eq("win_valid", int'(win_valid), int'(m.winner() >= 0));
    expect_eq("tie", int'(tie), int'(m.is_tie()));
    if (m.winner() >= 0) expect_eq("winner", int'(winner), m.winner());
    $display("votes=%0d repeated=%0d bad=%0d", m.n_vote, m.n_repeat, m.n_bad);
    expect_eq("votes seen", int'(m.n_vote > 0), 1);
    expect_eq("repeated votes seen", int'(m.n_repeat > 0), 1);
    expect_eq("bad codes seen", int'(m.n_bad > 0), 1);
    expect_eq("at most one vote per voter", int'(m.n_vote <= 600), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
