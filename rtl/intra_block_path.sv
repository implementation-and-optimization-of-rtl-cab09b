// intra_block_path: one colour component's path through the intra
// prediction system - the control unit's feeder for that component
// (mb_feeder) wired to its NxN prediction unit (intra_nxn_modes) over the
// unit's handshake interface. N = 16 for Y, N = 8 for Cb and Cr. The
// ports are the feeder's plane read port and output stream; see mb_feeder
// for the sequence and intra_mem_ctrl for the handshake timing.
module intra_block_path #(
  parameter int N    = 16,
  parameter int PW   = 176,
  parameter int PH   = 144,
  parameter intra_pkg::comp_e COMP = intra_pkg::COMP_Y,
  localparam int AW  = $clog2(PW * PH),
  localparam int MXW = $clog2(PW / N + 1),
  localparam int MYW = $clog2(PH / N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [MXW-1:0] mb_x,
  input  logic [MYW-1:0] mb_y,
  output logic           done,
  output logic [AW-1:0]  raddr,
  input  logic [7:0]     rdata,
  input  logic           grant,
  output logic           out_valid,
  output logic [15:0]    out_data,
  output logic           out_finished
);
  import intra_pkg::*;

  logic        valid_currmb_pi, valid_currmb_pi_bit_read, curr_mbpi_writeover;
  logic [7:0]  curr_mb_pi, curr_PI_AM, pred_out_pi;
  logic        valid_neighbours_pi, valid_neighbours_pi_bit_read;
  logic        neig_writeover, neig_writeover_bit_read;
  logic        start_intra, valid_AD, valid_IL, valid_M, start_intra_bit_read;
  logic        valid_pred_out, valid_pred_out_bit_read;
  logic        pred_pi_write_over, pred_pi_writeover_bit_read;
  logic        end_intra, end_intra_bit_read;
  intra_mode_e best_mode;
  logic [sad_width(N)-1:0] min_sad;

  mb_feeder #(.N(N), .PW(PW), .PH(PH), .COMP(COMP)) u_feeder (.*);

  intra_nxn_modes #(.N(N)) u_unit (.*);
endmodule
