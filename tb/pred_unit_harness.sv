// pred_unit_harness: drives one mode unit (MODE 0 vertical, 1 horizontal,
// 2 DC, 3 plane) of block size N through TRIALS random and patterned blocks
// and compares it with intra_ref_pkg.
//
// Per trial: random neighbours and availability flags, one scan_start
// clock, then N*N scan steps with sad_en high, checking the prediction at
// every position and the SAD at the end; then a second pass after a new
// scan_start with sad_en low and random idle clocks between steps (as when
// the output is stalled), checking every prediction again.
module pred_unit_harness #(
  parameter int N      = 16,
  parameter int MODE   = 0,
  parameter int TRIALS = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import intra_ref_pkg::*;

  localparam int LN   = $clog2(N);
  localparam int SADW = intra_pkg::sad_width(N);

  logic [N-1:0][7:0] top, left;
  logic [7:0]        lt, orig, pred;
  logic              at, al, am, ok;
  logic [LN-1:0]     x, y;
  logic              scan_start, scan_step, sad_en;
  logic [SADW-1:0]   sad;

  if (MODE == 0) begin : g_v
    pred_vertical #(.N(N)) u (.clk, .rst_n, .top, .avail_top(at), .x, .scan_start,
      .scan_step, .sad_en, .orig, .pred, .sad, .mode_ok(ok));
  end else if (MODE == 1) begin : g_h
    pred_horizontal #(.N(N)) u (.clk, .rst_n, .left, .avail_left(al), .y, .scan_start,
      .scan_step, .sad_en, .orig, .pred, .sad, .mode_ok(ok));
  end else if (MODE == 2) begin : g_dc
    pred_dc #(.N(N)) u (.clk, .rst_n, .top, .left, .avail_top(at), .avail_left(al),
      .scan_start, .scan_step, .sad_en, .orig, .pred, .sad, .mode_ok(ok));
  end else begin : g_p
    pred_plane #(.N(N)) u (.clk, .rst_n, .top, .left, .lt, .avail_top(at),
      .avail_left(al), .avail_lt(am), .x, .scan_start, .scan_step, .sad_en, .orig,
      .pred, .sad, .mode_ok(ok));
  end

  nb_t  rt, rl;
  blk_t ro;
  int   rlt, exp_sad, e;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d MODE=%0d %s", N, MODE, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    scan_start = 0; scan_step = 0; sad_en = 0;
    top = '0; left = '0; lt = '0; orig = '0; x = '0; y = '0;
    at = 0; al = 0; am = 0;
    @(posedge rst_n);
    for (int t = 0; t < TRIALS; t++) begin
      // neighbours: random, or ramps / extremes that drive plane into saturation
      for (int i = 0; i < 16; i++) begin
        case (t % 5)
          0: begin rt[i] = i * 255 / 15; rl[i] = 255 - i * 17; end
          1: begin rt[i] = 255 - i * 17; rl[i] = 255 - i * 17; end
          2: begin rt[i] = 255;          rl[i] = 0;            end
          default: begin rt[i] = $urandom_range(255); rl[i] = $urandom_range(255); end
        endcase
      end
      rlt = (t % 5 == 2) ? 0 : $urandom_range(255);
      for (int i = 0; i < 256; i++) ro[i] = $urandom_range(255);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin top[i] = 8'(rt[i]); left[i] = 8'(rl[i]); end
      lt = 8'(rlt);
      {at, al, am} = (t < 8) ? 3'(t) : 3'($urandom_range(7));
      #1;
      check(ok == ref_ok(MODE, at, al, am), "mode_ok");
      scan_start = 1;
      @(negedge clk);
      scan_start = 0;
      // pass 1: SAD scan
      sad_en  = 1;
      exp_sad = ref_sad(N, MODE, ro, rt, rl, rlt, at, al);
      for (int p = 0; p < N * N; p++) begin
        x = LN'(p % N); y = LN'(p / N); orig = 8'(ro[p]); scan_step = 1;
        #1;
        e = ref_pred(N, MODE, rt, rl, rlt, at, al, p % N, p / N);
        check(int'(pred) == e, $sformatf("pass1 pred (%0d,%0d) got %0d exp %0d", p % N, p / N, pred, e));
        @(negedge clk);
      end
      scan_step = 0; sad_en = 0;
      check(int'(sad) == exp_sad, $sformatf("sad got %0d exp %0d", sad, exp_sad));
      // pass 2: replay with stalls
      scan_start = 1;
      @(negedge clk);
      scan_start = 0;
      for (int p = 0; p < N * N; p++) begin
        x = LN'(p % N); y = LN'(p / N); orig = 8'($urandom_range(255));
        scan_step = 0;
        while ($urandom_range(3) == 0) @(negedge clk);
        scan_step = 1;
        #1;
        e = ref_pred(N, MODE, rt, rl, rlt, at, al, p % N, p / N);
        check(int'(pred) == e, $sformatf("pass2 pred (%0d,%0d) got %0d exp %0d", p % N, p / N, pred, e));
        @(negedge clk);
      end
      scan_step = 0;
    end
    done = 1;
  end
endmodule
