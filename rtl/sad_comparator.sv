// sad_comparator: SAD comparator and control for sending the minimum-SAD
// prediction pixels.
//
// Combinationally finds, among the modes whose `mode_ok` bit is set, the one
// with the smallest SAD; on a tie the lower mode number wins (DC is always
// available, so there is always a candidate). On `latch` the winner and its
// SAD are registered into `best_mode` / `min_sad`. Afterwards `pred_out` is
// the current prediction pixel of the registered winner, so the pixels of the
// chosen mode are streamed out while the mode units replay their scan.
module sad_comparator #(
  parameter int SADW = 16
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [intra_pkg::NUM_MODES-1:0][SADW-1:0] sad,
  input  logic [intra_pkg::NUM_MODES-1:0]      mode_ok,
  input  logic [intra_pkg::NUM_MODES-1:0][7:0] pred,
  input  logic                                 latch,
  output intra_pkg::intra_mode_e               best_mode,
  output logic [SADW-1:0]                      min_sad,
  output logic [7:0]                           pred_out
);
  import intra_pkg::*;

  intra_mode_e   win_d;
  logic [SADW-1:0] min_d;
  logic          found;

  always_comb begin
    win_d = MODE_DC;
    min_d = sad[MODE_DC];
    found = 1'b0;
    for (int m = 0; m < NUM_MODES; m++) begin
      if (mode_ok[m] && (!found || sad[m] < min_d)) begin
        win_d = intra_mode_e'(m);
        min_d = sad[m];
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mode <= MODE_DC;
      min_sad   <= '0;
    end else if (latch) begin
      best_mode <= win_d;
      min_sad   <= min_d;
    end
  end

  assign pred_out = pred[best_mode];
endmodule
