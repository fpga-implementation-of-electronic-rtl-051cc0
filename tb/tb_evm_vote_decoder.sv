// tb_evm_vote_decoder: self-checking test of the switch decoder.
//
// Drives every 5-bit switch code, with voting enabled and disabled, in
// sequential sweeps and in random order, and holds codes for several clocks.
// A reference model in the testbench remembers the previous code and works
// out, from a bit count, whether the decoder must report a new vote (and for
// which option) or an invalid code. Inputs change after the falling edge and
// the outputs are compared just before the next rising edge. A second
// instance runs with SINGLE_VOTE = 1 on the same inputs; its reference also
// remembers whether a vote was cast in the current enable window and expects
// later new codes in that window to be reported as repeated votes.
module tb_evm_vote_decoder;

  localparam int unsigned N_OPT = 5;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             vo_en;
  logic [N_OPT-1:0] vo_sw;
  logic             cast;
  logic [2:0]       cand;
  logic             bad_code;
  logic             repeat_vote;
  logic             cast1, bad1, rep1;
  logic [2:0]       cand1;
  logic             ref_voted;
  int               n_rep = 0;

  int checks = 0, failures = 0;
  int n_cast = 0, n_bad = 0;
  logic [N_OPT-1:0] ref_prev;

  evm_vote_decoder #(.N_OPT(N_OPT)) dut (.*);
  evm_vote_decoder #(.N_OPT(N_OPT), .SINGLE_VOTE(1'b1)) dut1 (
    .clk, .rst_n, .vo_en, .vo_sw,
    .cast (cast1), .cand (cand1), .bad_code (bad1), .repeat_vote (rep1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the outputs with the reference for the current inputs, then
  // let one rising edge pass.
  task automatic step(input logic en, input logic [N_OPT-1:0] sw);
    logic exp_cast, exp_bad, exp_new;
    int   exp_cand;
    vo_en = en;
    vo_sw = sw;
    #4;
    exp_new  = en && ($countones(sw) == 1) && (sw != ref_prev);
    exp_cast = exp_new;
    exp_bad  = en && (sw != 0) && ($countones(sw) != 1);
    exp_cand = 0;
    for (int i = 0; i < N_OPT; i++) if (sw == (1 << i)) exp_cand = i;
    checks++;
    if (cast !== exp_cast || bad_code !== exp_bad ||
        (exp_cast && cand !== 3'(exp_cand))) begin
      failures++;
      $display("mismatch en=%b sw=%b prev=%b: cast=%b(%b) cand=%0d(%0d) bad=%b(%b)",
               en, sw, ref_prev, cast, exp_cast, cand, exp_cand, bad_code, exp_bad);
    end
    checks++;
    if (repeat_vote !== 1'b0 || cast1 !== (exp_new && !ref_voted) ||
        rep1 !== (exp_new && ref_voted) || bad1 !== exp_bad ||
        (exp_new && cand1 !== 3'(exp_cand))) begin
      failures++;
      $display("single-vote mismatch en=%b sw=%b voted=%b: cast=%b rep=%b bad=%b",
               en, sw, ref_voted, cast1, rep1, bad1);
    end
    if (exp_cast) n_cast++;
    if (exp_bad)  n_bad++;
    if (exp_new && ref_voted) n_rep++;
    @(posedge clk);
    ref_prev = sw;
    if (!en)                          ref_voted = 1'b0;
    else if (exp_new && !ref_voted)   ref_voted = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; vo_en = 1'b0; vo_sw = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref_prev = '0;
    ref_voted = 1'b0;
    // Sweep of all codes, one per clock, enabled then disabled.
    for (int c = 0; c < 32; c++) step(1'b1, N_OPT'(c));
    for (int c = 0; c < 32; c++) step(1'b0, N_OPT'(c));
    // Each valid code held for three clocks: counted once.
    for (int i = 0; i < N_OPT; i++) repeat (3) step(1'b1, N_OPT'(1) << i);
    // A switch closed before voting opens is not a new vote when it opens.
    step(1'b0, 5'b00100);
    step(1'b1, 5'b00100);
    // Random codes and enables, held for a random number of clocks.
    for (int k = 0; k < 2000; k++) begin
      logic [N_OPT-1:0] sw;
      logic en;
      sw = ($urandom_range(0, 1) == 1) ? N_OPT'(1) << $urandom_range(0, N_OPT - 1)
                                       : N_OPT'($urandom);
      en = ($urandom_range(0, 7) != 0);
      repeat ($urandom_range(1, 3)) step(en, sw);
    end
    checks++;
    if (n_cast < 100 || n_bad < 100 || n_rep < 50) begin
      failures++;
      $display("too few events: casts=%0d bad=%0d repeated=%0d", n_cast, n_bad, n_rep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
