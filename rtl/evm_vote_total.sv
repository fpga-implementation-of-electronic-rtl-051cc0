// evm_vote_total: the total number of votes cast, Dout, of the EVM.
//
// Dout is the sum of the four party counts and the NOTA count. It is a
// combinational adder on the registered counts, so Dout changes on the same
// clock edge as the count that changed. The output is wide enough for every
// count at its maximum (5 x 255 = 1275 needs 11 bits), so the sum cannot
// overflow. That Dout is the sum of the counts follows the published design;
// its width is this design's own choice.
module evm_vote_total
#(
  parameter int unsigned N_OPT   = evm_pkg::N_OPT,
  parameter int unsigned CNT_W   = evm_pkg::CNT_W,
  localparam int unsigned TOT_W  = CNT_W + $clog2(N_OPT)
) (
  input  logic [CNT_W-1:0] count [N_OPT],  // vote counts per option
  output logic [TOT_W-1:0] dout            // their sum
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N_OPT; i++) dout = dout + TOT_W'(count[i]);
  end

endmodule
