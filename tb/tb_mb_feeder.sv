// tb_mb_feeder: the control unit's per-component feeder with its prediction
// unit, for a 48x32 luma plane (16x16 blocks) and a 24x16 chroma plane
// (8x8 blocks), through feeder_harness.
module tb_mb_feeder;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c16, f16, c8, f8;
  logic d16, d8;
  int   cycles = 0;

  always #5 clk = ~clk;

  feeder_harness #(.N(16), .PW(48), .PH(32), .COMP(intra_pkg::COMP_Y)) h16 (
    .clk, .rst_n, .checks(c16), .failures(f16), .done_all(d16));
  feeder_harness #(.N(8), .PW(24), .PH(16), .COMP(intra_pkg::COMP_CB)) h8 (
    .clk, .rst_n, .checks(c8), .failures(f8), .done_all(d8));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d16 && d8);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8);
    $finish;
  end

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
      $finish;
    end
  end
endmodule
