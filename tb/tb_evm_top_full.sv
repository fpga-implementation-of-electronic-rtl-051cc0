// tb_evm_top_full: one complete election on the machine at its default sizes.
//
// No parameter of the top is changed: the LED hold is 100,000,000 clocks (one
// second at 100 MHz) and each display digit is driven for 100,000 clocks.
// The election: voting opens, the published sweep of all 32 switch codes is
// run twice (2 votes per option, Dout 10), Party2 receives votes until its
// 8-bit count is full and one more vote for it is refused; the LED of the
// last accepted vote is checked to stay lit for exactly the full hold time;
// voting closes, Party2 is declared winner with 255 votes, and its count is
// read back from the three display digits. A cycle reference model checks
// the counts, Dout, Pled and invalid after every clock of the voting phase.
module tb_evm_top_full;
  import tb_evm_model_pkg::*;

  localparam int HOLD = 100_000_000;
  localparam int REF  = 100_000;

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

  evm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (HOLD + 5_000_000) @(posedge clk);
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

  task automatic cyc(input logic en, input int sw);
    vo_en = en;
    vo_sw = 5'(sw);
    @(posedge clk);
    m.step(en, sw);
    @(negedge clk);
    compare();
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
    int dig [3];
    bit seen [3];
    int lit;
    m = new(HOLD, 255);
    disp_sel = 3'd1;
    rst_n = 1'b0; vo_en = 1'b0; vo_sw = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    compare();

    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 32; c++) cyc(1'b1, c);
    expect_eq("Dout after sweep", int'(Dout), 10);
    expect_eq("Nota after sweep", int'(Nota), 2);

    // Fill Party2: 253 more votes, then one refused.
    cyc(1'b1, 0);
    for (int k = 0; k < 253; k++) begin
      cyc(1'b1, 5'b00010);
      cyc(1'b1, 0);
    end
    expect_eq("Party2 full", int'(Party2), 255);
    cyc(1'b1, 5'b00010);
    expect_eq("refused vote flagged", int'(invalid), 1);
    expect_eq("Party2 unchanged", int'(Party2), 255);
    cyc(1'b1, 0);

    // Last accepted vote: its LED must stay lit for exactly HOLD clocks.
    cyc(1'b1, 5'b01000);
    lit = 1;
    cyc(1'b0, 5'b01000);
    lit++;
    repeat (HOLD - 2) @(posedge clk);
    m.advance(HOLD - 2);
    @(negedge clk);
    compare();
    lit += HOLD - 2;
    expect_eq("LED lit at end of hold", int'(Pled), 5'b01000);
    cyc(1'b0, 5'b01000);
    expect_eq("LED dark after hold", int'(Pled), 0);
    expect_eq("LED hold clocks", lit, HOLD);

    // Result.
    cyc(1'b0, 0);
    expect_eq("win_valid", int'(win_valid), 1);
    expect_eq("winner", int'(winner), 1);
    expect_eq("win_count", int'(win_count), 255);
    expect_eq("tie", int'(tie), 0);

    // Read Party2's count from the digits over one full scan.
    foreach (seen[i]) seen[i] = 0;
    for (int k = 0; k < 3 * REF + 10; k++) begin
      @(negedge clk);
      for (int d = 0; d < 3; d++) if (an_n == ~(3'b001 << d)) begin
        seen[d] = 1;
        dig[d] = seg_digit(seg_n);
      end
    end
    foreach (seen[d]) expect_eq("digit scanned", int'(seen[d]), 1);
    expect_eq("display value", dig[2] * 100 + dig[1] * 10 + dig[0], 255);

    $display("votes=%0d refused_full=%0d bad=%0d led_timeout=%0d",
             m.n_vote, m.n_full, m.n_bad, m.n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
