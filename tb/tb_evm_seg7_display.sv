// tb_evm_seg7_display: self-checking test of the three-digit display.
//
// Runs with REFRESH_CYCLES = 4. For a set of values (0, 7, 10, 99, 100, 255
// and random ones) it samples the anodes and segments every clock for two
// full scans, decodes the segment pattern back to a digit with its own table,
// and checks that An0, An1 and An2 (one at a time, active low) show the
// units, tens and hundreds of the value, that each digit is held for
// REFRESH_CYCLES clocks, and that `blank` turns every segment off.
module tb_evm_seg7_display;

  localparam int unsigned CNT_W = 8;
  localparam int unsigned REF   = 4;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [CNT_W-1:0] value;
  logic             blank;
  logic [6:0]       seg_n;
  logic [2:0]       an_n;

  int checks = 0, failures = 0;

  evm_seg7_display #(.CNT_W(CNT_W), .REFRESH_CYCLES(REF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Digit shown by an active-low segment pattern {g..a}; -1 if none.
  function automatic int digit_of(input logic [6:0] s);
    case (~s)
      7'h3F: return 0;
      7'h06: return 1;
      7'h5B: return 2;
      7'h4F: return 3;
      7'h66: return 4;
      7'h6D: return 5;
      7'h7D: return 6;
      7'h07: return 7;
      7'h7F: return 8;
      7'h6F: return 9;
      default: return -1;
    endcase
  endfunction

  task automatic show_value(input int v, input logic b);
    int seen [3];
    int held [3];
    int exp_d;
    value = CNT_W'(v);
    blank = b;
    // Let the new value reach the output register.
    repeat (2) @(negedge clk);
    foreach (held[i]) held[i] = 0;
    for (int k = 0; k < 2 * 3 * int'(REF); k++) begin
      @(negedge clk);
      checks++;
      case (an_n)
        3'b110: begin exp_d = v % 10;        held[0]++; end
        3'b101: begin exp_d = (v / 10) % 10; held[1]++; end
        3'b011: begin exp_d = v / 100;       held[2]++; end
        default: begin
          exp_d = -2;
          failures++;
          $display("anodes %b: not exactly one active", an_n);
        end
      endcase
      if (exp_d >= 0) begin
        if (b ? (seg_n !== 7'h7F) : (digit_of(seg_n) != exp_d)) begin
          failures++;
          $display("value %0d blank %b an_n=%b seg_n=%b: expected digit %0d",
                   v, b, an_n, seg_n, exp_d);
        end
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (held[i] != 2 * int'(REF)) begin
        failures++;
        $display("digit %0d driven %0d clocks in two scans, expected %0d", i, held[i], 2 * REF);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; value = '0; blank = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (an_n !== 3'b111 || seg_n !== 7'h7F) begin
      failures++;
      $display("display not dark in reset");
    end
    rst_n = 1'b1;
    show_value(0, 1'b0);
    show_value(7, 1'b0);
    show_value(10, 1'b0);
    show_value(99, 1'b0);
    show_value(100, 1'b0);
    show_value(255, 1'b0);
    show_value(123, 1'b1);
    for (int k = 0; k < 50; k++) show_value($urandom_range(0, 255), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
