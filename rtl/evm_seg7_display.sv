// evm_seg7_display: three-digit seven-segment readout of a vote count.
//
// The value (at most 999) is converted to three decimal digits by the
// shift-and-add-3 ("double dabble") method and shown on three time-multiplexed
// common-anode digits. Digit k is driven for REFRESH_CYCLES clocks with
// anode An_k low (active) while the other two anodes are high, then the next
// digit follows: An0 shows units, An1 tens, An2 hundreds. Segments are
// active low, seg_n[0..6] = a..g (a top, then clockwise, g the middle bar).
// `blank` turns every segment off.
//
// Timing: seg_n and an_n are registered and follow the scan counter by one
// clock. Three displays with active-low anodes An0..An2 follow the published
// design; the decimal format, the multiplexing, the segment polarity and the
// refresh period are this design's own choices.
module evm_seg7_display
#(
  parameter int unsigned CNT_W          = evm_pkg::CNT_W,
  parameter int unsigned REFRESH_CYCLES = evm_pkg::REFRESH_CYCLES_DEFAULT,
  localparam int unsigned REF_W         = $clog2(REFRESH_CYCLES + 1)
) (
  input  logic                clk,
  input  logic                rst_n,    // synchronous, active low
  input  logic [CNT_W-1:0]    value,    // count to display
  input  logic                blank,    // all segments off
  output logic [6:0]          seg_n,    // segments g..a, active low
  output logic [evm_pkg::N_DIGITS-1:0] an_n      // anodes An2..An0, active low
);

  if (CNT_W > 9) begin : g_too_wide
    $error("evm_seg7_display shows at most 999: CNT_W must be 9 or less");
  end

  // Binary to three BCD digits.
  function automatic logic [11:0] to_bcd(input logic [CNT_W-1:0] v);
    logic [11:0] b;
    b = '0;
    for (int i = CNT_W - 1; i >= 0; i--) begin
      for (int d = 0; d < 3; d++)
        if (b[4*d +: 4] >= 4'd5) b[4*d +: 4] = b[4*d +: 4] + 4'd3;
      b = {b[10:0], v[i]};
    end
    return b;
  endfunction

  // Lit segments {g,f,e,d,c,b,a} of a decimal digit, active high.
  function automatic logic [6:0] seg_of(input logic [3:0] d);
    case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return 7'b000_0000;
    endcase
  endfunction

  logic [REF_W-1:0]            ref_cnt;
  logic [$clog2(evm_pkg::N_DIGITS)-1:0] digit;
  logic [11:0]                 bcd;

  assign bcd = to_bcd(value);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_cnt <= '0;
      digit   <= '0;
      seg_n   <= '1;
      an_n    <= '1;
    end else begin
      if (ref_cnt == REF_W'(REFRESH_CYCLES - 1)) begin
        ref_cnt <= '0;
        digit   <= (32'(digit) == evm_pkg::N_DIGITS - 1) ? '0 : digit + 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end
      an_n  <= ~(evm_pkg::N_DIGITS'(1) << digit);
      seg_n <= blank ? '1 : ~seg_of(bcd[4*digit +: 4]);
    end
  end

endmodule
