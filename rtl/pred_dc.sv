// pred_dc: DC intra prediction (mode 2) with its SAD.
//
// The whole block is predicted by one value, the rounded mean of the
// available neighbours (N = block size, n = log2 N):
//   top and left : (sum T + sum L + N)   >> (n+1)
//   top only     : (sum T + N/2)         >> n
//   left only    : (sum L + N/2)         >> n
//   none         : 128
// For N = 16 these are the luma formulas; the 8x8 chroma unit uses the same
// rule over its 8 + 8 neighbours, as one DC value for the whole block. The
// sums are adder trees; the mean is registered on `scan_start`, so it is
// valid from the first scan cycle on. DC is always usable (`mode_ok` = 1).
module pred_dc #(
  parameter int N    = 16,
  parameter int SADW = intra_pkg::sad_width(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0][7:0] top,
  input  logic [N-1:0][7:0] left,
  input  logic              avail_top,
  input  logic              avail_left,
  input  logic              scan_start,
  input  logic              scan_step,
  input  logic              sad_en,
  input  logic [7:0]        orig,
  output logic [7:0]        pred,
  output logic [SADW-1:0]   sad,
  output logic              mode_ok
);
  localparam int LN = $clog2(N);
  localparam int SW = LN + 9;          // holds sum T + sum L + N

  logic [SW-1:0] sum_t, sum_l;
  logic [7:0]    mean_both, mean_t, mean_l;
  logic [7:0]    mean_d, mean_q;

  always_comb begin
    sum_t = '0;
    sum_l = '0;
    for (int i = 0; i < N; i++) begin
      sum_t = sum_t + SW'(top[i]);
      sum_l = sum_l + SW'(left[i]);
    end
    // each mean of 8-bit pixels is at most 255
    mean_both = 8'((sum_t + sum_l + SW'(N)) >> (LN + 1));
    mean_t    = 8'((sum_t + SW'(N / 2)) >> LN);
    mean_l    = 8'((sum_l + SW'(N / 2)) >> LN);
    unique case ({avail_top, avail_left})
      2'b11:   mean_d = mean_both;
      2'b10:   mean_d = mean_t;
      2'b01:   mean_d = mean_l;
      default: mean_d = 8'd128;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          mean_q <= 8'd128;
    else if (scan_start) mean_q <= mean_d;
  end

  assign pred    = mean_q;
  assign mode_ok = 1'b1;

  sad_accumulator #(.SADW(SADW)) u_sad (
    .clk(clk), .rst_n(rst_n), .clear(scan_start), .acc_en(scan_step && sad_en),
    .orig(orig), .pred(pred), .sad(sad)
  );
endmodule
