// evm_winner: result declaration of the EVM.
//
// Compares the four party counts (NOTA cannot win) and finds the largest.
// When the polling officer has closed voting (vo_en low), the party with the
// most votes is declared: `win_valid` goes high with its index on `winner`
// and its count on `win_count`. If two or more parties share the largest
// count, `tie` is high and no winner is declared; `winner` then names the
// lowest-numbered of the tied parties. With no party vote at all nothing is
// declared. While voting is open `win_valid` and `tie` stay low.
//
// Timing: one register stage; the outputs follow the counts one clock later.
// Declaring the party with the highest count after voting ends follows the
// published design; the tie rule and excluding NOTA are this design's own.
module evm_winner
#(
  parameter int unsigned N_PARTY = evm_pkg::N_PARTY,
  parameter int unsigned CNT_W   = evm_pkg::CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,              // synchronous, active low
  input  logic                       vo_en,              // voting open
  input  logic [CNT_W-1:0]           count [N_PARTY],    // party counts
  output logic [$clog2(N_PARTY)-1:0] winner,             // index of the winner
  output logic [CNT_W-1:0]           win_count,          // its vote count
  output logic                       win_valid,          // a winner is declared
  output logic                       tie                 // highest count shared
);

  logic [CNT_W-1:0]           max_cnt;
  logic [$clog2(N_PARTY)-1:0] max_idx;
  int unsigned                n_at_max;

  always_comb begin
    max_cnt = count[0];
    max_idx = '0;
    for (int i = 1; i < N_PARTY; i++) begin
      if (count[i] > max_cnt) begin
        max_cnt = count[i];
        max_idx = ($clog2(N_PARTY))'(i);
      end
    end
    n_at_max = 0;
    for (int i = 0; i < N_PARTY; i++)
      if (count[i] == max_cnt) n_at_max = n_at_max + 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      winner    <= '0;
      win_count <= '0;
      win_valid <= 1'b0;
      tie       <= 1'b0;
    end else begin
      winner    <= max_idx;
      win_count <= max_cnt;
      win_valid <= !vo_en && (max_cnt != '0) && (n_at_max == 1);
      tie       <= !vo_en && (max_cnt != '0) && (n_at_max > 1);
    end
  end

endmodule
