// tb_evm_voter_setup: self-checking test of the election setup block.
//
// Checks the reset defaults (all four parties, no practical voter limit),
// loading of the registered-voter and contestant numbers while voting is
// disabled, that a load attempt during voting is ignored, and, for random
// votes and totals, that a vote is admitted only for a contesting party or
// NOTA while the total is below the voter number. The reference keeps its
// own copy of the two loaded numbers.
module tb_evm_voter_setup;

  localparam int unsigned TOT_W = 11;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             vo_en;
  logic             setup_we;
  logic [TOT_W-1:0] cfg_voters;
  logic [2:0]       cfg_parties;
  logic             cast;
  logic [2:0]       cand;
  logic [TOT_W-1:0] total;
  logic             admit, deny, poll_complete;

  int checks = 0, failures = 0;
  int ref_voters, ref_parties;
  int n_admit = 0, n_deny_party = 0, n_deny_limit = 0, n_load = 0, n_ignored = 0;

  evm_voter_setup dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input logic en, input logic we, input int voters, input int parties,
                     input logic c, input int opt, input int tot);
    logic exp_adm, exp_den, exp_done, contest;
    vo_en = en; setup_we = we; cfg_voters = TOT_W'(voters); cfg_parties = 3'(parties);
    cast = c; cand = 3'(opt); total = TOT_W'(tot);
    #4;
    contest  = (opt == 4) || (opt < ref_parties);
    exp_done = tot >= ref_voters;
    exp_adm  = c && contest && !exp_done;
    exp_den  = c && !(contest && !exp_done);
    checks++;
    if (admit !== exp_adm || deny !== exp_den || poll_complete !== exp_done) begin
      failures++;
      $display("voters=%0d parties=%0d cast=%b opt=%0d total=%0d: admit=%b(%b) deny=%b(%b) done=%b(%b)",
               ref_voters, ref_parties, c, opt, tot, admit, exp_adm, deny, exp_den,
               poll_complete, exp_done);
    end
    if (exp_adm) n_admit++;
    if (c && !contest) n_deny_party++;
    if (c && contest && exp_done) n_deny_limit++;
    @(posedge clk);
    if (we && !en) begin ref_voters = voters; ref_parties = parties; n_load++; end
    if (we && en) n_ignored++;
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    vo_en = 1'b0; setup_we = 1'b0; cfg_voters = '0; cfg_parties = '0;
    cast = 1'b0; cand = '0; total = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref_voters = (1 << TOT_W) - 1;
    ref_parties = 4;
    // Defaults: every option, total up to 1275, admitted.
    for (int o = 0; o < 5; o++) cyc(1'b1, 1'b0, 0, 0, 1'b1, o, 1275);
    // Load 3 parties and 10 voters, then vote around the limit.
    cyc(1'b0, 1'b1, 10, 3, 1'b0, 0, 0);
    for (int o = 0; o < 5; o++) cyc(1'b1, 1'b0, 0, 0, 1'b1, o, 9);
    for (int o = 0; o < 5; o++) cyc(1'b1, 1'b0, 0, 0, 1'b1, o, 10);
    // A load during voting is ignored.
    cyc(1'b1, 1'b1, 100, 1, 1'b0, 0, 0);
    cyc(1'b1, 1'b0, 0, 0, 1'b1, 2, 5);
    // Random setups and votes.
    for (int k = 0; k < 3000; k++)
      cyc($urandom_range(0, 3) != 0, $urandom_range(0, 15) == 0, $urandom_range(0, 40),
          $urandom_range(1, 4), $urandom_range(0, 1), $urandom_range(0, 4), $urandom_range(0, 45));
    checks++;
    if (n_admit == 0 || n_deny_party == 0 || n_deny_limit == 0 || n_load < 2 || n_ignored == 0) begin
      failures++;
      $display("events missing: admit=%0d party=%0d limit=%0d load=%0d ignored=%0d",
               n_admit, n_deny_party, n_deny_limit, n_load, n_ignored);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
