// Intra_Predictions_Control_Unit: 16x16 luminance and 8x8 chrominance intra
// prediction of a whole 4:2:0 frame.
//
// Main memory unit (frame_memory) plus control unit. The control unit
//   LOAD    takes the frame on din, two pixels per word ({odd, even}), one
//           word on every clock with `enable` high: the FRAME_W x FRAME_H Y
//           plane, then the Cb plane, then the Cr plane (W*H*3/4 words);
//   RUN     walks the 16x16 macroblocks in raster order. For each one it
//           starts three feeders at once - Y (16x16), Cb and Cr (8x8) -
//           which load their prediction units, find the neighbours and
//           start them, so the three components are predicted in parallel.
//           The outputs are then sent in the order Y, Cb, Cr: for each
//           component one header word {6'b0, comp, 6'b0, mode} followed by
//           the predicted pixels, two per word, with data_out_enable high
//           for every valid dout word (129 + 33 + 33 words per macroblock);
//   DONE    after the last macroblock pulses next_frame for one clock and
//           returns to LOAD for the next frame.
// Neighbours are taken from the original frame in memory (this unit has no
// reconstruction loop). Y_blk_size selects the luminance block size in the
// full intra prediction system; only the 16x16 size is built here, so it is
// sampled by nothing but the assertion below that checks it is 16 while a
// frame is loaded. rst_n (active low, asynchronous) is this design's
// addition to the port list.
module Intra_Predictions_Control_Unit #(
  parameter int FRAME_W = 176,
  parameter int FRAME_H = 144
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] din,
  input  logic [4:0]  Y_blk_size,
  output logic [15:0] dout,
  output logic        data_out_enable,
  output logic        next_frame
);
  import intra_pkg::*;

  localparam int CWID   = FRAME_W / 2;
  localparam int CHGT   = FRAME_H / 2;
  localparam int WORDS  = FRAME_W * FRAME_H * 3 / 4;
  localparam int WAW    = $clog2(WORDS);
  localparam int MBS_X  = FRAME_W / 16;
  localparam int MBS_Y  = FRAME_H / 16;
  localparam int MXW    = $clog2(MBS_X + 1);
  localparam int MYW    = $clog2(MBS_Y + 1);
  localparam int YAW    = $clog2(FRAME_W * FRAME_H);
  localparam int CAW    = $clog2(CWID * CHGT);

  initial begin
    if (FRAME_W % 16 != 0 || FRAME_H % 16 != 0)
      $error("frame size must be a multiple of 16");
  end

  typedef enum logic [1:0] {T_LOAD, T_START, T_RUN, T_DONE} tstate_e;

  tstate_e         state;
  logic [WAW-1:0]  waddr;
  logic [MXW-1:0]  mb_x;
  logic [MYW-1:0]  mb_y;
  logic [2:0]      grant, done_seen;
  logic            fstart;

  logic [YAW-1:0]  y_raddr;
  logic [CAW-1:0]  cb_raddr, cr_raddr;
  logic [7:0]      y_rdata, cb_rdata, cr_rdata;

  logic [2:0]      f_done, f_out_valid, f_out_fin;
  logic [2:0][15:0] f_out_data;

  frame_memory #(.W(FRAME_W), .H(FRAME_H)) u_mem (
    .clk,
    .we(state == T_LOAD && enable), .waddr, .wdata(din),
    .y_raddr, .y_rdata, .cb_raddr, .cb_rdata, .cr_raddr, .cr_rdata
  );

  // ---------------- per component: feeder + prediction unit ----------------
  intra_block_path #(.N(16), .PW(FRAME_W), .PH(FRAME_H), .COMP(COMP_Y)) u_y (
    .clk, .rst_n, .start(fstart), .mb_x, .mb_y, .done(f_done[0]),
    .raddr(y_raddr), .rdata(y_rdata), .grant(grant[0]),
    .out_valid(f_out_valid[0]), .out_data(f_out_data[0]), .out_finished(f_out_fin[0])
  );

  intra_block_path #(.N(8), .PW(CWID), .PH(CHGT), .COMP(COMP_CB)) u_cb (
    .clk, .rst_n, .start(fstart), .mb_x, .mb_y, .done(f_done[1]),
    .raddr(cb_raddr), .rdata(cb_rdata), .grant(grant[1]),
    .out_valid(f_out_valid[1]), .out_data(f_out_data[1]), .out_finished(f_out_fin[1])
  );

  intra_block_path #(.N(8), .PW(CWID), .PH(CHGT), .COMP(COMP_CR)) u_cr (
    .clk, .rst_n, .start(fstart), .mb_x, .mb_y, .done(f_done[2]),
    .raddr(cr_raddr), .rdata(cr_rdata), .grant(grant[2]),
    .out_valid(f_out_valid[2]), .out_data(f_out_data[2]), .out_finished(f_out_fin[2])
  );

  assign fstart = (state == T_START);

  // only the granted feeder ever drives a word
  always_comb begin
    dout = '0;
    for (int i = 0; i < 3; i++)
      if (f_out_valid[i]) dout = dout | f_out_data[i];
  end
  assign data_out_enable = |f_out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_LOAD;
      waddr      <= '0;
      mb_x       <= '0;
      mb_y       <= '0;
      grant      <= '0;
      done_seen  <= '0;
      next_frame <= 1'b0;
    end else begin
      next_frame <= 1'b0;
      unique case (state)
        T_LOAD: if (enable) begin
          waddr <= waddr + 1'b1;
          if (waddr == WAW'(WORDS - 1)) begin
            waddr <= '0;
            mb_x  <= '0;
            mb_y  <= '0;
            state <= T_START;
          end
        end
        T_START: begin
          grant     <= 3'b001;
          done_seen <= '0;
          state     <= T_RUN;
        end
        T_RUN: begin
          done_seen <= done_seen | f_done;
          // hand the output to the next component once one has finished
          if (|(f_out_fin & grant)) grant <= {grant[1:0], 1'b0};
          if ((done_seen | f_done) == 3'b111) begin
            grant <= '0;
            if (mb_x == MXW'(MBS_X - 1)) begin
              mb_x <= '0;
              if (mb_y == MYW'(MBS_Y - 1)) begin
                mb_y  <= '0;
                state <= T_DONE;
              end else begin
                mb_y  <= mb_y + 1'b1;
                state <= T_START;
              end
            end else begin
              mb_x  <= mb_x + 1'b1;
              state <= T_START;
            end
          end
        end
        T_DONE: begin
          next_frame <= 1'b1;
          state      <= T_LOAD;
        end
        default: state <= T_LOAD;
      endcase
    end
  end

  a_out_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(f_out_valid));
  a_blk_size: assert property (@(posedge clk) disable iff (!rst_n)
      (state == T_LOAD && enable) |-> (Y_blk_size == 5'd16));
endmodule
