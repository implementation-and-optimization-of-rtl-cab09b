// pred_vertical: vertical intra prediction (mode 0) with its SAD.
//
// Every pixel of the block is predicted by the reconstructed neighbour
// directly above its column: pred(x,y) = T[x]. The scan position (x,y) comes
// from the memory-and-control unit, which walks the block in raster order one
// pixel per clock; `orig` is the original pixel at that position. The SAD
// accumulator is cleared on `scan_start` and adds |orig - pred| on each
// `scan_step` while `sad_en` is high. The mode is usable only when the top
// neighbours exist (`avail_top`), reported on `mode_ok`.
module pred_vertical #(
  parameter int N    = 16,
  parameter int SADW = intra_pkg::sad_width(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][7:0]    top,
  input  logic                 avail_top,
  input  logic [$clog2(N)-1:0] x,
  input  logic                 scan_start,
  input  logic                 scan_step,
  input  logic                 sad_en,
  input  logic [7:0]           orig,
  output logic [7:0]           pred,
  output logic [SADW-1:0]      sad,
  output logic                 mode_ok
);
  assign pred    = top[x];
  assign mode_ok = avail_top;

  sad_accumulator #(.SADW(SADW)) u_sad (
    .clk(clk), .rst_n(rst_n), .clear(scan_start), .acc_en(scan_step && sad_en),
    .orig(orig), .pred(pred), .sad(sad)
  );
endmodule
