// intra_mem_ctrl: memory block and control block of one NxN intra
// prediction unit.
//
// Memory: the N*N original pixels of the current block (an array written in
// raster order, read at the scan position) and the 2N+1 neighbour pixels,
// held in registers so that every mode unit sees all of them at once.
//
// Control: a state machine that talks to the main control unit through the
// request / acknowledge signals named below and sequences the mode units.
//   LOAD  - accepts block pixels on curr_mb_pi (valid_currmb_pi, accepted
//           while valid_currmb_pi_bit_read is high, one per clock, raster
//           order) and, independently, neighbour pixels on curr_PI_AM
//           (valid_neighbours_pi / valid_neighbours_pi_bit_read) in the
//           order LT, T0..T(N-1), L0..L(N-1). After the last block pixel
//           curr_mbpi_writeover pulses for one clock; after the last
//           neighbour neig_writeover rises and stays high until
//           neig_writeover_bit_read is seen.
//           With both loaded, start_intra is acknowledged by a one-clock
//           start_intra_bit_read pulse and the availability flags valid_AD
//           (top row), valid_IL (left column) and valid_M (top-left corner)
//           are latched.
//   PREP  - one clock of scan_start: the mode units register their
//           per-block values (DC mean, plane gradients) and clear SADs.
//   SCAN  - N*N clocks: the block is walked in raster order, one pixel per
//           clock, and all four mode units accumulate their SAD in parallel.
//   CMP   - one clock: the comparator registers the minimum-SAD mode.
//   OSTART- one clock of scan_start to restart the mode units.
//   OUT   - the chosen prediction is streamed on pred_out_pi with
//           valid_pred_out; a pixel moves on every clock on which
//           valid_pred_out_bit_read is also high (valid/ready).
//   WO    - waits for pred_pi_write_over, acknowledged by a one-clock
//           pred_pi_writeover_bit_read pulse.
//   END   - end_intra is held high until end_intra_bit_read, then LOAD.
// valid_pred_out first rises N*N + 3 clocks after the clock in which
// start_intra_bit_read is high (1 PREP + N*N SCAN + CMP + OSTART). The state set and signal meanings are this design's
// reading of the port names of the prediction units.
module intra_mem_ctrl #(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // block pixels
  input  logic                 valid_currmb_pi,
  input  logic [7:0]           curr_mb_pi,
  output logic                 valid_currmb_pi_bit_read,
  output logic                 curr_mbpi_writeover,
  // neighbour pixels
  input  logic                 valid_neighbours_pi,
  input  logic [7:0]           curr_PI_AM,
  output logic                 valid_neighbours_pi_bit_read,
  output logic                 neig_writeover,
  input  logic                 neig_writeover_bit_read,
  // start
  input  logic                 start_intra,
  input  logic                 valid_AD,
  input  logic                 valid_IL,
  input  logic                 valid_M,
  output logic                 start_intra_bit_read,
  // prediction output
  output logic                 valid_pred_out,
  output logic [7:0]           pred_out_pi,
  input  logic                 valid_pred_out_bit_read,
  input  logic                 pred_pi_write_over,
  output logic                 pred_pi_writeover_bit_read,
  output logic                 end_intra,
  input  logic                 end_intra_bit_read,
  // to the mode units and the comparator
  output logic [N-1:0][7:0]    top,
  output logic [N-1:0][7:0]    left,
  output logic [7:0]           lt,
  output logic                 avail_top,
  output logic                 avail_left,
  output logic                 avail_lt,
  output logic [$clog2(N)-1:0] x,
  output logic [$clog2(N)-1:0] y,
  output logic [7:0]           orig,
  output logic                 scan_start,
  output logic                 scan_step,
  output logic                 sad_en,
  output logic                 cmp_latch,
  input  logic [7:0]           pred_sel
);
  localparam int LN  = $clog2(N);
  localparam int NN  = N * N;
  localparam int NBW = $clog2(2 * N + 1);

  typedef enum logic [2:0] {
    S_LOAD, S_PREP, S_SCAN, S_CMP, S_OSTART, S_OUT, S_WO, S_END
  } state_e;

  state_e          state;
  logic [7:0]      cur_mem [NN];
  logic [2*LN-1:0] cur_cnt, pos;
  logic [NBW-1:0]  nb_cnt;
  logic            cur_done, nb_done;
  logic            cur_acc, nb_acc, last_pos;

  assign valid_currmb_pi_bit_read     = (state == S_LOAD) && !cur_done;
  assign valid_neighbours_pi_bit_read = (state == S_LOAD) && !nb_done;
  assign cur_acc  = valid_currmb_pi && valid_currmb_pi_bit_read;
  assign nb_acc   = valid_neighbours_pi && valid_neighbours_pi_bit_read;
  assign last_pos = (pos == (2*LN)'(NN - 1));

  // block memory: one write port (load), one read port (scan position)
  always_ff @(posedge clk) begin
    if (cur_acc) cur_mem[cur_cnt] <= curr_mb_pi;
  end

  assign x    = pos[LN-1:0];
  assign y    = pos[2*LN-1:LN];
  assign orig = cur_mem[pos];

  assign scan_start     = (state == S_PREP) || (state == S_OSTART);
  assign scan_step      = (state == S_SCAN) ||
                          ((state == S_OUT) && valid_pred_out_bit_read);
  assign sad_en         = (state == S_SCAN);
  assign cmp_latch      = (state == S_CMP);
  assign valid_pred_out = (state == S_OUT);
  assign pred_out_pi    = pred_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                      <= S_LOAD;
      cur_cnt                    <= '0;
      nb_cnt                     <= '0;
      cur_done                   <= 1'b0;
      nb_done                    <= 1'b0;
      pos                        <= '0;
      top                        <= '0;
      left                       <= '0;
      lt                         <= '0;
      avail_top                  <= 1'b0;
      avail_left                 <= 1'b0;
      avail_lt                   <= 1'b0;
      curr_mbpi_writeover        <= 1'b0;
      neig_writeover             <= 1'b0;
      start_intra_bit_read       <= 1'b0;
      pred_pi_writeover_bit_read <= 1'b0;
      end_intra                  <= 1'b0;
    end else begin
      curr_mbpi_writeover        <= 1'b0;
      start_intra_bit_read       <= 1'b0;
      pred_pi_writeover_bit_read <= 1'b0;
      if (neig_writeover && neig_writeover_bit_read) neig_writeover <= 1'b0;

      unique case (state)
        S_LOAD: begin
          if (cur_acc) begin
            cur_cnt <= cur_cnt + 1'b1;
            if (cur_cnt == (2*LN)'(NN - 1)) begin
              cur_done            <= 1'b1;
              curr_mbpi_writeover <= 1'b1;
            end
          end
          if (nb_acc) begin
            nb_cnt <= nb_cnt + 1'b1;
            if (nb_cnt == '0)
              lt <= curr_PI_AM;
            else if (nb_cnt <= NBW'(N))
              top[nb_cnt - 1'b1] <= curr_PI_AM;
            else
              left[nb_cnt - NBW'(N + 1)] <= curr_PI_AM;
            if (nb_cnt == NBW'(2 * N)) begin
              nb_done        <= 1'b1;
              neig_writeover <= 1'b1;
            end
          end
          if (cur_done && nb_done && start_intra && !start_intra_bit_read) begin
            start_intra_bit_read <= 1'b1;
            avail_top            <= valid_AD;
            avail_left           <= valid_IL;
            avail_lt             <= valid_M;
            state                <= S_PREP;
          end
        end
        S_PREP: begin
          pos   <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          pos <= pos + 1'b1;
          if (last_pos) state <= S_CMP;
        end
        S_CMP:    state <= S_OSTART;
        S_OSTART: begin
          pos   <= '0;
          state <= S_OUT;
        end
        S_OUT: begin
          if (valid_pred_out_bit_read) begin
            pos <= pos + 1'b1;
            if (last_pos) state <= S_WO;
          end
        end
        S_WO: begin
          if (pred_pi_write_over && !pred_pi_writeover_bit_read) begin
            pred_pi_writeover_bit_read <= 1'b1;
            end_intra                  <= 1'b1;
            state                      <= S_END;
          end
        end
        S_END: begin
          if (end_intra_bit_read) begin
            end_intra <= 1'b0;
            cur_done  <= 1'b0;
            nb_done   <= 1'b0;
            cur_cnt   <= '0;
            nb_cnt    <= '0;
            state     <= S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // requests from this unit are held until they are acknowledged
  a_end_held: assert property (@(posedge clk) disable iff (!rst_n)
      (end_intra && !end_intra_bit_read) |=> end_intra);
  a_neig_held: assert property (@(posedge clk) disable iff (!rst_n)
      (neig_writeover && !neig_writeover_bit_read) |=> neig_writeover);
endmodule
