// tb_intra_mem_ctrl: the memory-and-control block of a 16x16 unit on its
// own. The testbench plays both the main control unit and the mode units:
// it loads a random block and neighbours, checks the neighbour registers
// and availability flags, follows the scan (scan_start, N*N scan_step
// clocks with sad_en, the block pixel at every (x,y) in raster order,
// cmp_latch, the second scan_start) and checks that the output stream
// forwards pred_sel, a function of (x,y) that stands in for the comparator,
// for every pixel despite random stalls, then completes the handshakes.
module tb_intra_mem_ctrl;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       valid_currmb_pi, valid_currmb_pi_bit_read, curr_mbpi_writeover;
  logic [7:0] curr_mb_pi, curr_PI_AM, pred_out_pi;
  logic       valid_neighbours_pi, valid_neighbours_pi_bit_read;
  logic       neig_writeover, neig_writeover_bit_read;
  logic       start_intra, valid_AD, valid_IL, valid_M, start_intra_bit_read;
  logic       valid_pred_out, valid_pred_out_bit_read;
  logic       pred_pi_write_over, pred_pi_writeover_bit_read;
  logic       end_intra, end_intra_bit_read;
  logic [N-1:0][7:0] top, left;
  logic [7:0] lt, orig, pred_sel;
  logic       avail_top, avail_left, avail_lt;
  logic [3:0] x, y;
  logic       scan_start, scan_step, sad_en, cmp_latch;
  int checks = 0, failures = 0, cycles = 0;
  int ro [N*N], rn [2*N+1];
  int n_start, n_step, n_latch;

  always #5 clk = ~clk;

  intra_mem_ctrl #(.N(N)) dut (.*);

  assign pred_sel = {y, x} ^ 8'hA5;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (scan_start) n_start <= n_start + 1;
    if (scan_step && sad_en) n_step <= n_step + 1;
    if (cmp_latch) n_latch <= n_latch + 1;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    valid_currmb_pi = 0; curr_mb_pi = 0; valid_neighbours_pi = 0; curr_PI_AM = 0;
    neig_writeover_bit_read = 0; start_intra = 0; valid_AD = 0; valid_IL = 0; valid_M = 0;
    valid_pred_out_bit_read = 0; pred_pi_write_over = 0; end_intra_bit_read = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      n_start = 0; n_step = 0; n_latch = 0;
      foreach (ro[i]) ro[i] = $urandom_range(255);
      foreach (rn[i]) rn[i] = $urandom_range(255);
      @(negedge clk);
      // block pixels, then neighbours
      for (int p = 0; p < N * N; p++) begin
        valid_currmb_pi = 1; curr_mb_pi = 8'(ro[p]);
        @(negedge clk);
      end
      valid_currmb_pi = 0;
      check(!valid_currmb_pi_bit_read, "block port closed after N*N pixels");
      for (int p = 0; p < 2 * N + 1; p++) begin
        valid_neighbours_pi = 1; curr_PI_AM = 8'(rn[p]);
        @(negedge clk);
      end
      valid_neighbours_pi = 0;
      check(neig_writeover, "neig_writeover");
      check(int'(lt) == rn[0], "LT register");
      for (int i = 0; i < N; i++) begin
        check(int'(top[i]) == rn[1+i], "top register");
        check(int'(left[i]) == rn[1+N+i], "left register");
      end
      neig_writeover_bit_read = 1;
      @(negedge clk);
      neig_writeover_bit_read = 0;
      start_intra = 1; {valid_AD, valid_IL, valid_M} = 3'(blk);
      @(negedge clk);
      check(start_intra_bit_read, "start acknowledged");
      start_intra = 0;
      check({avail_top, avail_left, avail_lt} == 3'(blk), "availability latched");
      // scan: check the block pixel presented at every position
      for (int p = 0; p < N * N; p++) begin
        @(negedge clk);
        check(scan_step && sad_en && int'(orig) == ro[int'({y, x})] && int'({y, x}) == p,
              $sformatf("scan pos %0d", p));
      end
      while (!valid_pred_out) @(negedge clk);
      check(n_start == 2 && n_step == N * N && n_latch == 1,
            $sformatf("scan control counts %0d %0d %0d", n_start, n_step, n_latch));
      for (int p = 0; p < N * N; p++) begin
        valid_pred_out_bit_read = 0;
        while ($urandom_range(2) == 0) @(negedge clk);
        valid_pred_out_bit_read = 1;
        #1 check(valid_pred_out && pred_out_pi == (8'(p) ^ 8'hA5), $sformatf("out %0d", p));
        @(negedge clk);
      end
      valid_pred_out_bit_read = 0;
      check(n_step == N * N && n_start == 2, "no SAD accumulation while sending");
      pred_pi_write_over = 1;
      @(negedge clk);
      check(pred_pi_writeover_bit_read && end_intra, "write-over acknowledged, end_intra");
      pred_pi_write_over = 0;
      repeat (3) @(negedge clk);
      check(end_intra, "end_intra held");
      end_intra_bit_read = 1;
      @(negedge clk);
      end_intra_bit_read = 0;
      check(valid_currmb_pi_bit_read && valid_neighbours_pi_bit_read, "back to load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (cycles > 50000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
