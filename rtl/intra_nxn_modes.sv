// intra_nxn_modes: one complete intra prediction unit for an NxN block.
//
// N = 16 gives the 16x16 luminance unit (intra_Y_1616_modes), N = 8 the
// 8x8 chrominance unit used twice, for Cb and for Cr (intra_cb_88_modes,
// intra_cr_88_modes). Inside: the memory-and-control block
// (intra_mem_ctrl), the four mode units - vertical, horizontal, DC and
// plane, each with its own SAD accumulator - working in parallel on the same
// pixel every clock, and the SAD comparator that picks the cheapest
// available mode and forwards its prediction pixels.
//
// The handshake ports carry the names of the unit's external interface; see
// intra_mem_ctrl for their protocol and timing. best_mode and min_sad are
// extra outputs of this design so that the caller learns which mode was
// chosen: they are valid from the first valid_pred_out until the next start.
// A block takes N*N clocks to load, N*N + 3 clocks from the start acknowledge to the first
// prediction pixel and N*N clocks to send the prediction.
module intra_nxn_modes #(
  parameter int N    = 16,
  parameter int SADW = intra_pkg::sad_width(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid_currmb_pi,
  input  logic [7:0]             curr_mb_pi,
  output logic                   valid_currmb_pi_bit_read,
  output logic                   curr_mbpi_writeover,
  input  logic                   valid_neighbours_pi,
  input  logic [7:0]             curr_PI_AM,
  output logic                   valid_neighbours_pi_bit_read,
  output logic                   neig_writeover,
  input  logic                   neig_writeover_bit_read,
  input  logic                   start_intra,
  input  logic                   valid_AD,
  input  logic                   valid_IL,
  input  logic                   valid_M,
  output logic                   start_intra_bit_read,
  output logic                   valid_pred_out,
  output logic [7:0]             pred_out_pi,
  input  logic                   valid_pred_out_bit_read,
  input  logic                   pred_pi_write_over,
  output logic                   pred_pi_writeover_bit_read,
  output logic                   end_intra,
  input  logic                   end_intra_bit_read,
  output intra_pkg::intra_mode_e best_mode,
  output logic [SADW-1:0]        min_sad
);
  import intra_pkg::*;

  localparam int LN = $clog2(N);

  logic [N-1:0][7:0]         top, left;
  logic [7:0]                lt, orig, pred_sel;
  logic                      avail_top, avail_left, avail_lt;
  logic [LN-1:0]             x, y;
  logic                      scan_start, scan_step, sad_en, cmp_latch;
  logic [NUM_MODES-1:0][SADW-1:0] sad;
  logic [NUM_MODES-1:0][7:0] pred;
  logic [NUM_MODES-1:0]      mode_ok;

  intra_mem_ctrl #(.N(N)) u_mem_ctrl (
    .clk, .rst_n,
    .valid_currmb_pi, .curr_mb_pi, .valid_currmb_pi_bit_read, .curr_mbpi_writeover,
    .valid_neighbours_pi, .curr_PI_AM, .valid_neighbours_pi_bit_read,
    .neig_writeover, .neig_writeover_bit_read,
    .start_intra, .valid_AD, .valid_IL, .valid_M, .start_intra_bit_read,
    .valid_pred_out, .pred_out_pi, .valid_pred_out_bit_read,
    .pred_pi_write_over, .pred_pi_writeover_bit_read, .end_intra, .end_intra_bit_read,
    .top, .left, .lt, .avail_top, .avail_left, .avail_lt, .x, .y, .orig,
    .scan_start, .scan_step, .sad_en, .cmp_latch, .pred_sel
  );

  pred_vertical #(.N(N), .SADW(SADW)) u_vert (
    .clk, .rst_n, .top, .avail_top, .x, .scan_start, .scan_step, .sad_en, .orig,
    .pred(pred[MODE_VERTICAL]), .sad(sad[MODE_VERTICAL]), .mode_ok(mode_ok[MODE_VERTICAL])
  );

  pred_horizontal #(.N(N), .SADW(SADW)) u_horz (
    .clk, .rst_n, .left, .avail_left, .y, .scan_start, .scan_step, .sad_en, .orig,
    .pred(pred[MODE_HORIZONTAL]), .sad(sad[MODE_HORIZONTAL]),
    .mode_ok(mode_ok[MODE_HORIZONTAL])
  );

  pred_dc #(.N(N), .SADW(SADW)) u_dc (
    .clk, .rst_n, .top, .left, .avail_top, .avail_left, .scan_start, .scan_step,
    .sad_en, .orig,
    .pred(pred[MODE_DC]), .sad(sad[MODE_DC]), .mode_ok(mode_ok[MODE_DC])
  );

  pred_plane #(.N(N), .SADW(SADW)) u_plane (
    .clk, .rst_n, .top, .left, .lt, .avail_top, .avail_left, .avail_lt, .x,
    .scan_start, .scan_step, .sad_en, .orig,
    .pred(pred[MODE_PLANE]), .sad(sad[MODE_PLANE]), .mode_ok(mode_ok[MODE_PLANE])
  );

  sad_comparator #(.SADW(SADW)) u_cmp (
    .clk, .rst_n, .sad, .mode_ok, .pred, .latch(cmp_latch),
    .best_mode, .min_sad, .pred_out(pred_sel)
  );
endmodule
