// nxn_unit_harness: acts as the main control unit towards one
// intra_nxn_modes of block size N and checks it against intra_ref_pkg.
//
// Each of BLOCKS blocks is built from one of four patterns (near-vertical,
// near-horizontal, noise, linear gradient) under one of the eight
// neighbour-availability combinations. Block pixels and neighbours are sent
// at the same time, each with random idle clocks; the prediction is read
// with random stalls. Checked per block: the handshake pulses, the chosen
// mode and its SAD, every predicted pixel, and the latency from the start
// acknowledge to the first prediction pixel (N*N + 3 clocks). `wins` counts
// how often each mode was chosen, `avail_seen` each availability case.
module nxn_unit_harness #(
  parameter int N      = 16,
  parameter int BLOCKS = 48
) (
  input  logic   clk,
  input  logic   rst_n,
  output int     checks,
  output int     failures,
  output int     wins [4],
  output logic   done
);
  import intra_ref_pkg::*;
  import intra_pkg::*;

  localparam int SADW = sad_width(N);

  logic       valid_currmb_pi, valid_currmb_pi_bit_read, curr_mbpi_writeover;
  logic [7:0] curr_mb_pi, curr_PI_AM, pred_out_pi;
  logic       valid_neighbours_pi, valid_neighbours_pi_bit_read;
  logic       neig_writeover, neig_writeover_bit_read;
  logic       start_intra, valid_AD, valid_IL, valid_M, start_intra_bit_read;
  logic       valid_pred_out, valid_pred_out_bit_read;
  logic       pred_pi_write_over, pred_pi_writeover_bit_read;
  logic       end_intra, end_intra_bit_read;
  intra_mode_e best_mode;
  logic [SADW-1:0] min_sad;

  intra_nxn_modes #(.N(N)) dut (.*);

  nb_t  rt, rl;
  blk_t ro;
  int   rlt, eb, es, wo_pulses, t_ack, t_first, cyc;
  bit   at, al, am;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (curr_mbpi_writeover) wo_pulses <= wo_pulses + 1;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL N=%0d %s", N, s); end
  endtask

  function automatic int pix(input int v);
    return clip8(v);
  endfunction

  task automatic make_block(input int kind);
    int gx, gy;
    gx = $urandom_range(9) - 4; gy = $urandom_range(9) - 4;
    for (int i = 0; i < N; i++) begin
      rt[i] = $urandom_range(255);
      rl[i] = $urandom_range(255);
    end
    rlt = $urandom_range(255);
    if (kind == 3) begin                  // linear gradient through the neighbours
      rlt = 128 - gx - gy;
      for (int i = 0; i < N; i++) begin rt[i] = 128 + gx * i - gy; rl[i] = 128 - gx + gy * i; end
    end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++)
        case (kind)
          0: ro[y*N+x] = pix(rt[x] + $urandom_range(2));
          1: ro[y*N+x] = pix(rl[y] + $urandom_range(2));
          2: ro[y*N+x] = $urandom_range(255);
          default: ro[y*N+x] = pix(128 + gx * x + gy * y + $urandom_range(1));
        endcase
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; cyc = 0; wo_pulses = 0;
    for (int m = 0; m < 4; m++) wins[m] = 0;
    valid_currmb_pi = 0; curr_mb_pi = 0; valid_neighbours_pi = 0; curr_PI_AM = 0;
    neig_writeover_bit_read = 0; start_intra = 0; valid_AD = 0; valid_IL = 0; valid_M = 0;
    valid_pred_out_bit_read = 0; pred_pi_write_over = 0; end_intra_bit_read = 0;
    @(posedge rst_n);
    for (int b = 0; b < BLOCKS; b++) begin
      make_block(b % 4);
      {at, al, am} = 3'((b / 4) % 8);
      if (b % 4 == 3) {at, al, am} = 3'b111;   // gradient blocks: all neighbours
      wo_pulses = 0;
      @(negedge clk);
      fork
        begin : send_cur
          for (int p = 0; p < N * N; p++) begin
            while ($urandom_range(4) == 0) begin valid_currmb_pi = 0; @(negedge clk); end
            valid_currmb_pi = 1; curr_mb_pi = 8'(ro[p]);
            do @(posedge clk); while (!valid_currmb_pi_bit_read);
            @(negedge clk);
          end
          valid_currmb_pi = 0;
        end
        begin : send_nb
          for (int p = 0; p < 2 * N + 1; p++) begin
            while ($urandom_range(3) == 0) begin valid_neighbours_pi = 0; @(negedge clk); end
            valid_neighbours_pi = 1;
            curr_PI_AM = 8'((p == 0) ? rlt : (p <= N) ? rt[p-1] : rl[p-N-1]);
            do @(posedge clk); while (!valid_neighbours_pi_bit_read);
            @(negedge clk);
          end
          valid_neighbours_pi = 0;
          while (!neig_writeover) @(negedge clk);
          neig_writeover_bit_read = 1;
          @(negedge clk);
          neig_writeover_bit_read = 0;
        end
      join
      @(negedge clk);
      check(wo_pulses == 1, $sformatf("curr_mbpi_writeover pulses %0d", wo_pulses));
      check(!neig_writeover, "neig_writeover released after acknowledge");
      // start
      start_intra = 1; valid_AD = at; valid_IL = al; valid_M = am;
      do @(posedge clk); while (!start_intra_bit_read);
      t_ack = cyc;
      @(negedge clk);
      start_intra = 0;
      ref_choose(N, ro, rt, rl, rlt, at, al, am, eb, es);
      // output
      while (!valid_pred_out) @(negedge clk);
      t_first = cyc;
      check(t_first - t_ack == N * N + 3, $sformatf("latency %0d", t_first - t_ack));
      check(int'(best_mode) == eb, $sformatf("blk %0d best %0d exp %0d", b, best_mode, eb));
      check(int'(min_sad) == es, $sformatf("blk %0d sad %0d exp %0d", b, min_sad, es));
      if (eb >= 0 && eb < 4) wins[eb]++;
      for (int p = 0; p < N * N; p++) begin
        valid_pred_out_bit_read = 0;
        while ($urandom_range(3) == 0) @(negedge clk);
        valid_pred_out_bit_read = 1;
        #1;
        check(valid_pred_out && int'(pred_out_pi) == ref_pred(N, eb, rt, rl, rlt, at, al, p % N, p / N),
              $sformatf("blk %0d pixel %0d got %0d", b, p, pred_out_pi));
        @(negedge clk);
      end
      valid_pred_out_bit_read = 0;
      @(negedge clk);
      check(!valid_pred_out, "valid_pred_out drops after N*N pixels");
      pred_pi_write_over = 1;
      do @(posedge clk); while (!pred_pi_writeover_bit_read);
      @(negedge clk);
      pred_pi_write_over = 0;
      while (!end_intra) @(negedge clk);
      end_intra_bit_read = 1;
      @(negedge clk);
      end_intra_bit_read = 0;
      @(negedge clk);
      check(!end_intra, "end_intra released");
    end
    done = 1;
  end
endmodule
