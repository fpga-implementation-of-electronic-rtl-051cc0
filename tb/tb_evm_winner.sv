// tb_evm_winner: self-checking test of the result declaration.
//
// Applies directed cases (no votes, a clear winner in each position, two-
// and four-way ties, voting still open) and random counts, some of them
// drawn from a small range so that ties are common, and compares winner,
// win_count, win_valid and tie with a reference computed in the testbench.
// The outputs are checked one clock after the counts change.
module tb_evm_winner;

  localparam int unsigned N_PARTY = 4;
  localparam int unsigned CNT_W   = 8;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             vo_en;
  logic [CNT_W-1:0] count [N_PARTY];
  logic [1:0]       winner;
  logic [CNT_W-1:0] win_count;
  logic             win_valid, tie;

  int checks = 0, failures = 0;
  int n_win = 0, n_tie = 0;

  evm_winner dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic en, input int c0, input int c1, input int c2, input int c3);
    int c [N_PARTY];
    int best, best_i, n_best;
    logic exp_valid, exp_tie;
    c = '{c0, c1, c2, c3};
    foreach (c[i]) count[i] = CNT_W'(c[i]);
    vo_en = en;
    best = -1; best_i = 0; n_best = 0;
    foreach (c[i]) if (c[i] > best) begin best = c[i]; best_i = i; end
    foreach (c[i]) if (c[i] == best) n_best++;
    exp_valid = !en && best > 0 && n_best == 1;
    exp_tie   = !en && best > 0 && n_best > 1;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (win_valid !== exp_valid || tie !== exp_tie ||
        (exp_valid && (int'(winner) != best_i || int'(win_count) != best))) begin
      failures++;
      $display("en=%b counts %0d %0d %0d %0d: winner=%0d(%0d) count=%0d(%0d) valid=%b(%b) tie=%b(%b)",
               en, c0, c1, c2, c3, winner, best_i, win_count, best, win_valid, exp_valid,
               tie, exp_tie);
    end
    if (exp_valid) n_win++;
    if (exp_tie)   n_tie++;
  endtask

  initial begin
    rst_n = 1'b0; vo_en = 1'b1;
    foreach (count[i]) count[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    apply(1'b0, 0, 0, 0, 0);
    apply(1'b0, 5, 1, 1, 1);
    apply(1'b0, 1, 5, 1, 1);
    apply(1'b0, 1, 1, 5, 1);
    apply(1'b0, 1, 1, 1, 5);
    apply(1'b0, 255, 254, 0, 0);
    apply(1'b0, 3, 3, 1, 0);
    apply(1'b0, 2, 2, 2, 2);
    apply(1'b1, 1, 9, 1, 1);
    for (int k = 0; k < 2000; k++) begin
      int hi;
      hi = ($urandom_range(0, 1) == 1) ? 3 : 255;
      apply($urandom_range(0, 3) != 0 ? 1'b0 : 1'b1,
            $urandom_range(0, hi), $urandom_range(0, hi), $urandom_range(0, hi),
            $urandom_range(0, hi));
    end
    checks++;
    if (n_win < 100 || n_tie < 100) begin
      failures++;
      $display("too few cases: wins=%0d ties=%0d", n_win, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
