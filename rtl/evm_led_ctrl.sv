// evm_led_ctrl: voter feedback LEDs (Pled) of the EVM.
//
// One LED per option. When a vote is accepted, the LED of that option, and
// only that one, lights and the down-counter led_timer is loaded with
// LED_TIMER_MAX. The counter decrements every clock; the LED goes dark on
// the clock edge where the counter reaches zero, so the LED is lit for
// exactly LED_TIMER_MAX clocks. A new accepted vote restarts the
// timer with its own LED. `clear` (an invalid attempt) turns the LED off at
// once, so a voter never sees a lit LED after a refused input.
//
// Interface: `show`, `cand` and `clear` are sampled on the rising edge;
// `pled` is registered. `show` wins over `clear` if both
// are high. The counter and LED_TIMER_MAX follow the published design;
// the default of one second at 100 MHz and the clear-on-invalid rule are
// this design's own choices (the published trace shows the LED dark during
// invalid codes).
module evm_led_ctrl
#(
  parameter int unsigned N_OPT         = evm_pkg::N_OPT,
  parameter int unsigned LED_TIMER_MAX = evm_pkg::LED_TIMER_MAX_DEFAULT,
  localparam int unsigned TIMER_W      = $clog2(LED_TIMER_MAX + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,      // synchronous, active low
  input  logic                     show,       // a vote was accepted
  input  logic [$clog2(N_OPT)-1:0] cand,       // option of that vote
  input  logic                     clear,      // invalid attempt: LED off
  output logic [N_OPT-1:0]         pled        // one LED per option
);

  // Clocks left with the LED lit.
  logic [TIMER_W-1:0] led_timer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pled      <= '0;
      led_timer <= '0;
    end else if (show) begin
      pled      <= N_OPT'(1) << cand;
      led_timer <= TIMER_W'(LED_TIMER_MAX);
    end else if (clear) begin
      pled      <= '0;
      led_timer <= '0;
    end else if (led_timer != '0) begin
      led_timer <= led_timer - 1'b1;
      if (led_timer == TIMER_W'(1)) pled <= '0;
    end
  end

  initial begin
    assert (LED_TIMER_MAX >= 1)
      else $error("LED_TIMER_MAX must be at least 1");
  end

endmodule
