// tb_evm_vote_total: self-checking test of the total-vote adder (Dout).
//
// Applies all-zero, all-maximum, single-option and random sets of counts and
// compares the sum with one computed in the testbench.
module tb_evm_vote_total;

  localparam int unsigned N_OPT = 5;
  localparam int unsigned CNT_W = 8;

  logic [CNT_W-1:0] count [N_OPT];
  logic [10:0]      dout;

  int checks = 0, failures = 0;

  evm_vote_total dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int c0, input int c1, input int c2, input int c3, input int c4);
    int sum;
    count[0] = CNT_W'(c0); count[1] = CNT_W'(c1); count[2] = CNT_W'(c2);
    count[3] = CNT_W'(c3); count[4] = CNT_W'(c4);
    sum = c0 + c1 + c2 + c3 + c4;
    #1;
    checks++;
    if (int'(dout) != sum) begin
      failures++;
      $display("counts %0d %0d %0d %0d %0d: dout=%0d expected %0d", c0, c1, c2, c3, c4, dout, sum);
    end
  endtask

  initial begin
    apply(0, 0, 0, 0, 0);
    apply(255, 255, 255, 255, 255);
    apply(1, 0, 0, 0, 0);
    apply(0, 0, 0, 0, 1);
    apply(2, 2, 2, 2, 2);
    for (int k = 0; k < 2000; k++)
      apply($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255),
            $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
