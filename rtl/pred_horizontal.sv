// pred_horizontal: horizontal intra prediction (mode 1) with its SAD.
//
// Every pixel is predicted by the reconstructed neighbour to the left of its
// row: pred(x,y) = L[y]. Scan position, SAD accumulation and timing are the
// same as in pred_vertical; the mode needs the left neighbours (`avail_left`).
module pred_horizontal #(
  parameter int N    = 16,
  parameter int SADW = intra_pkg::sad_width(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][7:0]    left,
  input  logic                 avail_left,
  input  logic [$clog2(N)-1:0] y,
  input  logic                 scan_start,
  input  logic                 scan_step,
  input  logic                 sad_en,
  input  logic [7:0]           orig,
  output logic [7:0]           pred,
  output logic [SADW-1:0]      sad,
  output logic                 mode_ok
);
  assign pred    = left[y];
  assign mode_ok = avail_left;

  sad_accumulator #(.SADW(SADW)) u_sad (
    .clk(clk), .rst_n(rst_n), .clear(scan_start), .acc_en(scan_step && sad_en),
    .orig(orig), .pred(pred), .sad(sad)
  );
endmodule
