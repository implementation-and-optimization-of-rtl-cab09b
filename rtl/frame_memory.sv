// frame_memory: main memory unit - one 4:2:0 frame in three planes.
//
// The Y plane holds W x H pixels, the Cb and Cr planes W/2 x H/2 each. The
// frame arrives as 16-bit words of two neighbouring pixels ({odd, even} in
// raster order), Y plane first, then Cb, then Cr, so the single write port
// takes a word address running over all three planes (W*H*3/4 words).
// Each plane has its own read port addressed by pixel (raster index inside
// that plane) with combinational read, so the Y, Cb and Cr prediction units
// can be fed at the same time. Writes take effect at the clock edge.
module frame_memory #(
  parameter int W  = 176,
  parameter int H  = 144,
  localparam int YW  = W * H / 2,               // Y words
  localparam int CW  = W * H / 8,               // Cb (and Cr) words
  localparam int WAW = $clog2(YW + 2 * CW),
  localparam int YAW = $clog2(W * H),
  localparam int CAW = $clog2(W * H / 4)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [WAW-1:0] waddr,   // word address: Y, then Cb, then Cr
  input  logic [15:0]    wdata,   // {pixel 2k+1, pixel 2k}
  input  logic [YAW-1:0] y_raddr,
  output logic [7:0]     y_rdata,
  input  logic [CAW-1:0] cb_raddr,
  output logic [7:0]     cb_rdata,
  input  logic [CAW-1:0] cr_raddr,
  output logic [7:0]     cr_rdata
);
  logic [15:0] ymem  [YW];
  logic [15:0] cbmem [CW];
  logic [15:0] crmem [CW];
  logic [15:0] yw, cbw, crw;

  always_ff @(posedge clk) begin
    if (we) begin
      if (waddr < WAW'(YW))
        ymem[waddr[YAW-2:0]] <= wdata;
      else if (waddr < WAW'(YW + CW))
        cbmem[(CAW-1)'(waddr - WAW'(YW))] <= wdata;
      else
        crmem[(CAW-1)'(waddr - WAW'(YW + CW))] <= wdata;
    end
  end

  assign yw  = ymem[y_raddr[YAW-1:1]];
  assign cbw = cbmem[cb_raddr[CAW-1:1]];
  assign crw = crmem[cr_raddr[CAW-1:1]];

  assign y_rdata  = y_raddr[0]  ? yw[15:8]  : yw[7:0];
  assign cb_rdata = cb_raddr[0] ? cbw[15:8] : cbw[7:0];
  assign cr_rdata = cr_raddr[0] ? crw[15:8] : crw[7:0];
endmodule
