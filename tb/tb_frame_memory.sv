// tb_frame_memory: writes a random frame of 64x48 pixels (Y, Cb, Cr words in
// order) and reads every pixel of the three planes back through their own
// read ports, all three at once, against a copy kept by the testbench.
module tb_frame_memory;
  localparam int W = 64, H = 48;
  localparam int YAW = $clog2(W * H), CAW = $clog2(W * H / 4);
  localparam int WORDS = W * H * 3 / 4;

  logic clk = 1'b0;
  logic we;
  logic [$clog2(WORDS)-1:0] waddr;
  logic [15:0] wdata;
  logic [YAW-1:0] ya;
  logic [CAW-1:0] cba, cra;
  logic [7:0] yd, cbd, crd;
  byte unsigned ref_y [W*H], ref_cb [W*H/4], ref_cr [W*H/4];
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;

  frame_memory #(.W(W), .H(H)) dut (.clk, .we, .waddr, .wdata, .y_raddr(ya), .y_rdata(yd),
    .cb_raddr(cba), .cb_rdata(cbd), .cr_raddr(cra), .cr_rdata(crd));

  initial begin
    we = 0; waddr = '0; wdata = '0; ya = '0; cba = '0; cra = '0;
    for (int i = 0; i < W * H; i++) ref_y[i] = 8'($urandom);
    for (int i = 0; i < W * H / 4; i++) begin ref_cb[i] = 8'($urandom); ref_cr[i] = 8'($urandom); end
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      we = 1; waddr = w[$bits(waddr)-1:0];
      if (w < W * H / 2)              wdata = {ref_y[2*w+1], ref_y[2*w]};
      else if (w < W * H * 5 / 8)     wdata = {ref_cb[2*(w-W*H/2)+1], ref_cb[2*(w-W*H/2)]};
      else                            wdata = {ref_cr[2*(w-W*H*5/8)+1], ref_cr[2*(w-W*H*5/8)]};
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < W * H; i++) begin
      ya = YAW'(i); cba = CAW'(i % (W * H / 4)); cra = CAW'((i * 7) % (W * H / 4));
      #1;
      checks += 3;
      if (yd != ref_y[i]) failures++;
      if (cbd != ref_cb[i % (W * H / 4)]) failures++;
      if (crd != ref_cr[(i * 7) % (W * H / 4)]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 100000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
