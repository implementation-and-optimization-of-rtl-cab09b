// mb_feeder: the part of the main control unit that serves one prediction
// unit (one colour component).
//
// For the block at block coordinates (mb_x, mb_y) of a PW x PH plane it
//   1. reads the N*N block pixels from the plane in raster order and sends
//      them on curr_mb_pi (valid/ready), then waits for curr_mbpi_writeover;
//   2. sends the 2N+1 neighbour pixels LT, T0..T(N-1), L0..L(N-1) on
//      curr_PI_AM; neighbours outside the picture are sent as 0 and flagged
//      unavailable. It then acknowledges neig_writeover;
//   3. raises start_intra with the availability flags valid_AD (a block row
//      above exists), valid_IL (a block column to the left exists) and valid_M
//      (both) until start_intra_bit_read;
//   4. once the unit offers its prediction and `grant` is high, emits one
//      header word {6'b0, comp, 6'b0, best_mode} and then the N*N predicted
//      pixels packed two per word ({pixel 2k+1, pixel 2k}) on out_valid /
//      out_data, and pulses out_finished after the last word;
//   5. completes the pred_pi_write_over and end_intra handshakes and pulses
//      `done`.
// The plane is read combinationally (raddr -> rdata in the same clock), so
// one pixel moves per clock. out_valid / out_data are registered.
module mb_feeder #(
  parameter int N    = 16,
  parameter int PW   = 176,
  parameter int PH   = 144,
  parameter intra_pkg::comp_e COMP = intra_pkg::COMP_Y,
  localparam int AW  = $clog2(PW * PH),
  localparam int MXW = $clog2(PW / N + 1),
  localparam int MYW = $clog2(PH / N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MXW-1:0]         mb_x,
  input  logic [MYW-1:0]         mb_y,
  output logic                   done,
  // plane read port
  output logic [AW-1:0]          raddr,
  input  logic [7:0]             rdata,
  // output word stream
  input  logic                   grant,
  output logic                   out_valid,
  output logic [15:0]            out_data,
  output logic                   out_finished,
  // prediction unit
  output logic                   valid_currmb_pi,
  output logic [7:0]             curr_mb_pi,
  input  logic                   valid_currmb_pi_bit_read,
  input  logic                   curr_mbpi_writeover,
  output logic                   valid_neighbours_pi,
  output logic [7:0]             curr_PI_AM,
  input  logic                   valid_neighbours_pi_bit_read,
  input  logic                   neig_writeover,
  output logic                   neig_writeover_bit_read,
  output logic                   start_intra,
  output logic                   valid_AD,
  output logic                   valid_IL,
  output logic                   valid_M,
  input  logic                   start_intra_bit_read,
  input  logic                   valid_pred_out,
  input  logic [7:0]             pred_out_pi,
  output logic                   valid_pred_out_bit_read,
  output logic                   pred_pi_write_over,
  input  logic                   pred_pi_writeover_bit_read,
  input  logic                   end_intra,
  output logic                   end_intra_bit_read,
  input  intra_pkg::intra_mode_e best_mode
);
  import intra_pkg::*;

  localparam int LN  = $clog2(N);
  localparam int CW  = 2 * LN + 1;            // counts 0 .. N*N

  typedef enum logic [3:0] {
    F_IDLE, F_CUR, F_NB, F_NBACK, F_START, F_HDR, F_PIX, F_WO, F_END
  } fstate_e;

  fstate_e            state;
  logic [CW-1:0]      cnt;
  logic [7:0]         low_pix;
  logic               av_top, av_left;
  int                 px, py;
  logic               nb_ok;

  assign av_top  = (mb_y != '0);
  assign av_left = (mb_x != '0);

  // pixel coordinate of the current block pixel or neighbour
  always_comb begin
    int bx, by, k;
    bx    = int'(mb_x) * N;
    by    = int'(mb_y) * N;
    k     = int'(cnt);
    nb_ok = 1'b1;
    if (state == F_NB) begin
      if (k == 0) begin                          // LT
        px    = bx - 1;
        py    = by - 1;
        nb_ok = av_top && av_left;
      end else if (k <= N) begin                 // T0..T(N-1)
        px    = bx + k - 1;
        py    = by - 1;
        nb_ok = av_top;
      end else begin                             // L0..L(N-1)
        px    = bx - 1;
        py    = by + k - (N + 1);
        nb_ok = av_left;
      end
    end else begin
      px = bx + (k % N);
      py = by + (k / N);
    end
  end

  assign raddr = nb_ok ? AW'(py * PW + px) : '0;

  assign valid_currmb_pi         = (state == F_CUR) && (cnt != CW'(N * N));
  assign curr_mb_pi              = rdata;
  assign valid_neighbours_pi     = (state == F_NB);
  assign curr_PI_AM              = nb_ok ? rdata : 8'd0;
  assign start_intra             = (state == F_START);
  assign valid_AD                = av_top;
  assign valid_IL                = av_left;
  assign valid_M                 = av_top && av_left;
  assign valid_pred_out_bit_read = (state == F_PIX);
  assign pred_pi_write_over      = (state == F_WO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                   <= F_IDLE;
      cnt                     <= '0;
      low_pix                 <= '0;
      out_valid               <= 1'b0;
      out_data                <= '0;
      out_finished            <= 1'b0;
      done                    <= 1'b0;
      neig_writeover_bit_read <= 1'b0;
      end_intra_bit_read      <= 1'b0;
    end else begin
      out_valid               <= 1'b0;
      out_finished            <= 1'b0;
      done                    <= 1'b0;
      neig_writeover_bit_read <= 1'b0;
      end_intra_bit_read      <= 1'b0;
      unique case (state)
        F_IDLE: if (start) begin
          cnt   <= '0;
          state <= F_CUR;
        end
        F_CUR: begin
          if (valid_currmb_pi && valid_currmb_pi_bit_read) cnt <= cnt + 1'b1;
          if (curr_mbpi_writeover) begin
            cnt   <= '0;
            state <= F_NB;
          end
        end
        F_NB: if (valid_neighbours_pi_bit_read) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(2 * N)) state <= F_NBACK;
        end
        F_NBACK: if (neig_writeover) begin
          neig_writeover_bit_read <= 1'b1;
          state                   <= F_START;
        end
        F_START: if (start_intra_bit_read) state <= F_HDR;
        F_HDR: if (valid_pred_out && grant) begin
          out_valid <= 1'b1;
          out_data  <= {6'd0, COMP, 6'd0, best_mode};
          cnt       <= '0;
          state     <= F_PIX;
        end
        F_PIX: if (valid_pred_out) begin
          cnt <= cnt + 1'b1;
          if (!cnt[0]) begin
            low_pix <= pred_out_pi;
          end else begin
            out_valid <= 1'b1;
            out_data  <= {pred_out_pi, low_pix};
          end
          if (cnt == CW'(N * N - 1)) begin
            out_finished <= 1'b1;
            state        <= F_WO;
          end
        end
        F_WO: if (pred_pi_writeover_bit_read) state <= F_END;
        F_END: if (end_intra) begin
          end_intra_bit_read <= 1'b1;
          done               <= 1'b1;
          state              <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end
endmodule
