// top_harness: stimulus and checker for Intra_Predictions_Control_Unit
// with a W x H frame size, connected to the unit's ports by the testbench.
//
// Each of FRAMES frames is generated block by block in raster order so that
// every mode has blocks it should win: a block is filled with the vertical,
// horizontal or plane prediction from its real neighbours plus small noise,
// or with noise alone (DC), and falls back to noise where the needed
// neighbours do not exist. The frame is sent two pixels per word with
// random clocks of `enable` low. The expected output - per macroblock a
// header and 128 words for Y, then 32 + 1 words each for Cb and Cr - is
// computed with intra_ref_pkg and compared word by word with dout.
// Counted mechanisms (a failure if one never happens): each mode chosen for
// luma and for chroma, each neighbour-availability case, load stalls
// (enable low), next_frame once per frame.
module top_harness #(
  parameter int W      = 48,
  parameter int H      = 32,
  parameter int FRAMES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        enable,
  output logic [15:0] din,
  output logic [4:0]  Y_blk_size,
  input  logic [15:0] dout,
  input  logic        data_out_enable,
  input  logic        next_frame,
  output int          checks,
  output int          failures,
  output logic        done
);
  import intra_ref_pkg::*;

  int yp [], cbp [], crp [];
  int exp_q [$];
  int ywin [4], cwin [4], avail_cnt [4], stalls, frames_done, got;
  int cyc, t_load_end, t_frame_end;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // fill one plane block by block; kind chooses the pattern
  task automatic gen_plane(ref int pl [], input int pw, input int ph, input int n, input int f);
    nb_t t, l;
    int lt, kind, x0, y0, v;
    bit at, al;
    for (int r = 0; r < ph / n; r++)
      for (int c = 0; c < pw / n; c++) begin
        x0 = c * n; y0 = r * n; at = (r > 0); al = (c > 0);
        for (int i = 0; i < 16; i++) begin
          t[i] = (at && i < n) ? pl[(y0 - 1) * pw + x0 + i] : 0;
          l[i] = (al && i < n) ? pl[(y0 + i) * pw + x0 - 1] : 0;
        end
        lt = (at && al) ? pl[(y0 - 1) * pw + x0 - 1] : 0;
        kind = (c + 2 * r + f) % 4;
        if ((kind == 0 && !at) || (kind == 1 && !al) || (kind == 3 && !(at && al))) kind = 2;
        for (int y = 0; y < n; y++)
          for (int x = 0; x < n; x++) begin
            if (kind == 2) v = $urandom_range(255);
            else v = clip8(ref_pred(n, kind == 3 ? 3 : kind, t, l, lt, at, al, x, y)
                           + $urandom_range(4) - 2);
            pl[(y0 + y) * pw + x0 + x] = v;
          end
      end
  endtask

  task automatic expect_block(ref int pl [], input int pw, input int n, input int comp,
                              input int bx, input int by, ref int win [4]);
    nb_t t, l;
    blk_t o;
    int lt, eb, es, x0, y0, p0, p1;
    bit at, al;
    x0 = bx * n; y0 = by * n; at = (by > 0); al = (bx > 0);
    for (int i = 0; i < 16; i++) begin
      t[i] = (at && i < n) ? pl[(y0 - 1) * pw + x0 + i] : 0;
      l[i] = (al && i < n) ? pl[(y0 + i) * pw + x0 - 1] : 0;
    end
    lt = (at && al) ? pl[(y0 - 1) * pw + x0 - 1] : 0;
    for (int p = 0; p < n * n; p++) o[p] = pl[(y0 + p / n) * pw + x0 + p % n];
    ref_choose(n, o, t, l, lt, at, al, at && al, eb, es);
    win[eb]++;
    exp_q.push_back((comp << 8) | eb);
    for (int p = 0; p < n * n; p += 2) begin
      p0 = ref_pred(n, eb, t, l, lt, at, al, p % n, p / n);
      p1 = ref_pred(n, eb, t, l, lt, at, al, (p + 1) % n, (p + 1) / n);
      exp_q.push_back((p1 << 8) | p0);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (next_frame) begin
      frames_done <= frames_done + 1;
      t_frame_end <= cyc;
    end
    if (data_out_enable) begin
      got <= got + 1;
      if (exp_q.size() == 0) check(0, "unexpected output word");
      else begin
        check(int'(dout) == exp_q[0], $sformatf("word %0d: got %h exp %h", got, dout, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0; stalls = 0; frames_done = 0; got = 0; cyc = 0;
    for (int m = 0; m < 4; m++) begin ywin[m] = 0; cwin[m] = 0; avail_cnt[m] = 0; end
    enable = 0; din = '0; Y_blk_size = 5'd16;
    yp = new[W * H]; cbp = new[W * H / 4]; crp = new[W * H / 4];
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      gen_plane(yp, W, H, 16, f);
      gen_plane(cbp, W / 2, H / 2, 8, f + 1);
      gen_plane(crp, W / 2, H / 2, 8, f + 2);
      for (int by = 0; by < H / 16; by++)
        for (int bx = 0; bx < W / 16; bx++) begin
          avail_cnt[{by > 0, bx > 0}]++;
          expect_block(yp, W, 16, 0, bx, by, ywin);
          expect_block(cbp, W / 2, 8, 1, bx, by, cwin);
          expect_block(crp, W / 2, 8, 2, bx, by, cwin);
        end
      // send the frame: Y, Cb, Cr, two pixels per word, with stalls
      for (int w = 0; w < W * H * 3 / 4; w++) begin
        @(negedge clk);
        while ($urandom_range(7) == 0) begin enable = 0; stalls++; @(negedge clk); end
        enable = 1;
        if (w < W * H / 2) din = 16'((yp[2*w+1] << 8) | yp[2*w]);
        else if (w < W * H * 5 / 8) din = 16'((cbp[2*(w-W*H/2)+1] << 8) | cbp[2*(w-W*H/2)]);
        else din = 16'((crp[2*(w-W*H*5/8)+1] << 8) | crp[2*(w-W*H*5/8)]);
      end
      @(negedge clk);
      enable = 0;
      t_load_end = cyc;
      wait (frames_done == f + 1);
      @(negedge clk);
      check(exp_q.size() == 0, $sformatf("frame %0d: %0d words missing", f, exp_q.size()));
      $display("MECH frame %0d processed in %0d clocks after loading (%0d macroblocks)",
               f, t_frame_end - t_load_end, (W / 16) * (H / 16));
    end
    for (int m = 0; m < 4; m++) begin
      $display("MECH mode %0d chosen: luma %0d, chroma %0d", m, ywin[m], cwin[m]);
      check(ywin[m] > 0, $sformatf("luma mode %0d never chosen", m));
      check(cwin[m] > 0, $sformatf("chroma mode %0d never chosen", m));
    end
    $display("MECH availability none/left/top/both: %0d %0d %0d %0d",
             avail_cnt[0], avail_cnt[1], avail_cnt[2], avail_cnt[3]);
    for (int a = 0; a < 4; a++) check(avail_cnt[a] > 0, "availability case never exercised");
    $display("MECH load stalls %0d, next_frame %0d", stalls, frames_done);
    check(stalls > 0, "no load stall");
    check(frames_done == FRAMES, "next_frame count");
    done = 1;
  end
endmodule
