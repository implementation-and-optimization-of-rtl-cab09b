// pred_plane: plane intra prediction (mode 3) with its SAD.
//
// With K = N/2 - 1 (7 for 16x16 luma, 3 for 8x8 chroma) and T[-1] = LT:
//   H = sum_{i=1..N/2} i * (T[K+i] - T[K-i])
//   V = sum_{i=1..N/2} i * (L[K+i] - L[K-i])
//   luma  (N=16): b = (5*H + 32) >> 6,  c = (5*V + 32) >> 6
//   chroma (N=8): b = (17*H + 16) >> 5, c = (17*V + 16) >> 5
//   a = 16 * (T[N-1] + L[N-1])
//   pred(x,y) = sat_u8((a + 16 + b*(x-K) + c*(y-K)) >> 5)
// All products by constants are written as shifts and adds (mul_const), no
// multiplier is needed. The per-pixel term is not multiplied at all: on
// `scan_start` the unit registers b, c and the value at (0,0),
// a + 16 - K*b - K*c, and then follows the raster scan with one adder,
// adding b for each step along a row and c at each new row. The same
// sequence is replayed when the chosen prediction is sent out, which is why
// the unit needs `scan_start` before every pass. `x` is the column of the
// current pixel, used to detect the end of a row. The mode needs top, left
// and the top-left corner (`mode_ok`). SAD as in pred_vertical.
module pred_plane #(
  parameter int N    = 16,
  parameter int SADW = intra_pkg::sad_width(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][7:0]    top,
  input  logic [N-1:0][7:0]    left,
  input  logic [7:0]           lt,
  input  logic                 avail_top,
  input  logic                 avail_left,
  input  logic                 avail_lt,
  input  logic [$clog2(N)-1:0] x,
  input  logic                 scan_start,
  input  logic                 scan_step,
  input  logic                 sad_en,
  input  logic [7:0]           orig,
  output logic [7:0]           pred,
  output logic [SADW-1:0]      sad,
  output logic                 mode_ok
);
  localparam int K     = N / 2 - 1;
  localparam int GMUL  = (N == 16) ? 5 : 17;   // gradient scale factor
  localparam int GRND  = (N == 16) ? 32 : 16;  // rounding term
  localparam int GSH   = (N == 16) ? 6 : 5;    // gradient shift
  localparam int W     = 20;                   // internal signed width

  initial begin
    if (N != 16 && N != 8) $error("pred_plane supports N = 16 or N = 8 only");
  end

  // v * k for a small non-negative constant k, by shifts and adds.
  function automatic logic signed [W-1:0] mul_const(input logic signed [W-1:0] v,
                                                    input int k);
    logic signed [W-1:0] r;
    r = '0;
    for (int s = 0; s < 8; s++)
      if (k[s]) r = r + (v <<< s);
    return r;
  endfunction

  logic signed [W-1:0] h, v, b_d, c_d, a_d, base_d;
  logic signed [W-1:0] b_q, c_q, row_q, acc_q;
  logic signed [W-1:0] t_hi, t_lo, l_hi, l_lo;
  logic [$clog2(N)-1:0] xl;

  always_comb begin
    h = '0;
    v = '0;
    for (int i = 1; i <= N / 2; i++) begin
      t_hi = W'(top[K + i]);
      l_hi = W'(left[K + i]);
      t_lo = (K - i < 0) ? W'(lt) : W'(top[(K - i < 0) ? 0 : K - i]);
      l_lo = (K - i < 0) ? W'(lt) : W'(left[(K - i < 0) ? 0 : K - i]);
      h = h + mul_const(t_hi - t_lo, i);
      v = v + mul_const(l_hi - l_lo, i);
    end
    b_d    = (mul_const(h, GMUL) + W'(GRND)) >>> GSH;
    c_d    = (mul_const(v, GMUL) + W'(GRND)) >>> GSH;
    a_d    = (W'(top[N-1]) + W'(left[N-1])) <<< 4;
    base_d = a_d + W'(16) - mul_const(b_d, K) - mul_const(c_d, K);
  end

  assign xl = $clog2(N)'(N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q   <= '0;
      c_q   <= '0;
      row_q <= '0;
      acc_q <= '0;
    end else if (scan_start) begin
      b_q   <= b_d;
      c_q   <= c_d;
      row_q <= base_d;
      acc_q <= base_d;
    end else if (scan_step) begin
      if (x == xl) begin
        row_q <= row_q + c_q;
        acc_q <= row_q + c_q;
      end else begin
        acc_q <= acc_q + b_q;
      end
    end
  end

  assign pred    = intra_pkg::sat_u8(acc_q >>> 5);
  assign mode_ok = avail_top && avail_left && avail_lt;

  sad_accumulator #(.SADW(SADW)) u_sad (
    .clk(clk), .rst_n(rst_n), .clear(scan_start), .acc_en(scan_step && sad_en),
    .orig(orig), .pred(pred), .sad(sad)
  );
endmodule
