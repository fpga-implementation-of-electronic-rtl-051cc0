// tb_evm_led_ctrl: self-checking test of the vote-confirmation LEDs.
//
// Runs with LED_TIMER_MAX = 7 to keep the run short. For each option it
// shows a vote and checks, clock by clock, that exactly that LED is lit for
// LED_TIMER_MAX clocks and dark afterwards. It also checks that a second vote
// restarts the hold time with the new LED, that `clear` darkens the LED at
// once, and that `show` wins over `clear`. The expected LED state comes from
// a cycle counter kept by the testbench.
module tb_evm_led_ctrl;

  localparam int unsigned N_OPT = 5;
  localparam int unsigned HOLD  = 7;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             show, clear;
  logic [2:0]       cand;
  logic [N_OPT-1:0] pled;

  int checks = 0, failures = 0;
  logic [N_OPT-1:0] exp_led;
  int               left;

  evm_led_ctrl #(.N_OPT(N_OPT), .LED_TIMER_MAX(HOLD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock with the given inputs; the reference follows the same edge.
  task automatic cyc(input logic s, input logic c, input int opt);
    show = s; clear = c; cand = 3'(opt);
    @(posedge clk);
    if (s) begin
      exp_led = N_OPT'(1) << opt;
      left    = HOLD;
    end else if (c) begin
      exp_led = '0;
      left    = 0;
    end else if (left > 0) begin
      left--;
      if (left == 0) exp_led = '0;
    end
    @(negedge clk);
    checks++;
    if (pled !== exp_led) begin
      failures++;
      $display("pled=%b expected %b (show=%b clear=%b opt=%0d)", pled, exp_led, s, c, opt);
    end
  endtask

  initial begin
    int lit;
    rst_n = 1'b0; show = 1'b0; clear = 1'b0; cand = '0;
    exp_led = '0; left = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Hold time of each LED, counted directly.
    for (int o = 0; o < N_OPT; o++) begin
      cyc(1'b1, 1'b0, o);
      lit = (pled != 0) ? 1 : 0;
      for (int k = 0; k < int'(HOLD) + 4; k++) begin
        cyc(1'b0, 1'b0, 0);
        if (pled != 0) lit++;
      end
      checks++;
      if (lit != int'(HOLD)) begin
        failures++;
        $display("LED %0d lit for %0d clocks, expected %0d", o, lit, HOLD);
      end
    end
    // A new vote restarts the timer with the new LED.
    cyc(1'b1, 1'b0, 1);
    repeat (4) cyc(1'b0, 1'b0, 0);
    cyc(1'b1, 1'b0, 3);
    repeat (int'(HOLD) + 2) cyc(1'b0, 1'b0, 0);
    // Clear darkens at once; show wins over clear.
    cyc(1'b1, 1'b0, 2);
    cyc(1'b0, 1'b1, 0);
    repeat (3) cyc(1'b0, 1'b0, 0);
    cyc(1'b1, 1'b1, 4);
    repeat (int'(HOLD) + 2) cyc(1'b0, 1'b0, 0);
    // Random mix.
    for (int k = 0; k < 500; k++)
      cyc($urandom_range(0, 5) == 0, $urandom_range(0, 9) == 0, $urandom_range(0, N_OPT - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
