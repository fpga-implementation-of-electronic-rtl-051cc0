// tb_evm_vote_tally: self-checking test of the vote-count registers.
//
// Casts random votes (and idle cycles) at the default 8-bit count width,
// enough of them that some options reach 255, and compares every count,
// and the accept/refuse decision, with a reference array kept by the
// testbench. Checks that a vote for a full count is refused and changes
// nothing, and that reset clears all counts.
module tb_evm_vote_tally;

  localparam int unsigned N_OPT = 5;
  localparam int unsigned CNT_W = 8;
  localparam int unsigned MAXV  = (1 << CNT_W) - 1;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             cast;
  logic [2:0]       cand;
  logic             accept, reject;
  logic [CNT_W-1:0] count [N_OPT];

  int checks = 0, failures = 0;
  int ref_cnt [N_OPT];
  int n_accept = 0, n_reject = 0;

  evm_vote_tally dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_counts();
    for (int i = 0; i < N_OPT; i++) begin
      checks++;
      if (int'(count[i]) != ref_cnt[i]) begin
        failures++;
        $display("count[%0d]=%0d expected %0d", i, count[i], ref_cnt[i]);
      end
    end
  endtask

  task automatic vote(input logic c, input int opt);
    logic exp_acc, exp_rej;
    cast = c;
    cand = 3'(opt);
    #4;
    exp_acc = c && ref_cnt[opt] < int'(MAXV);
    exp_rej = c && ref_cnt[opt] == int'(MAXV);
    checks++;
    if (accept !== exp_acc || reject !== exp_rej) begin
      failures++;
      $display("opt %0d cnt %0d: accept=%b(%b) reject=%b(%b)",
               opt, ref_cnt[opt], accept, exp_acc, reject, exp_rej);
    end
    @(posedge clk);
    if (exp_acc) begin ref_cnt[opt]++; n_accept++; end
    if (exp_rej) n_reject++;
    @(negedge clk);
    check_counts();
  endtask

  initial begin
    rst_n = 1'b0; cast = 1'b0; cand = '0;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check_counts();
    rst_n = 1'b1;
    // Options 0 and 4 get most votes so that they fill up.
    for (int k = 0; k < 1500; k++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 3)      vote(1'b1, 0);
      else if (r < 6) vote(1'b1, 4);
      else if (r < 9) vote(1'b1, $urandom_range(1, 3));
      else            vote(1'b0, $urandom_range(0, 4));
    end
    // Reset clears everything.
    rst_n = 1'b0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    check_counts();
    vote(1'b1, 2);
    checks++;
    if (n_reject == 0 || n_accept < 500) begin
      failures++;
      $display("events missing: accepted=%0d refused=%0d", n_accept, n_reject);
    end
    $display("accepted=%0d refused=%0d", n_accept, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
