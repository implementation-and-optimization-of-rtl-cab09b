// tb_intra_nxn_modes: the complete prediction unit at both sizes, 16x16
// (luma) and 8x8 (chroma), driven through its handshake interface by
// nxn_unit_harness. Besides the per-block checks it fails if any of the
// four modes was never chosen at either size.
module tb_intra_nxn_modes;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c16, f16, c8, f8, w16 [4], w8 [4];
  logic d16, d8;
  int   cycles = 0, failures;

  always #5 clk = ~clk;

  nxn_unit_harness #(.N(16)) h16 (.clk, .rst_n, .checks(c16), .failures(f16), .wins(w16), .done(d16));
  nxn_unit_harness #(.N(8))  h8  (.clk, .rst_n, .checks(c8),  .failures(f8),  .wins(w8),  .done(d8));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d16 && d8);
    failures = f16 + f8;
    for (int m = 0; m < 4; m++) begin
      $display("MECH mode %0d chosen: 16x16 %0d times, 8x8 %0d times", m, w16[m], w8[m]);
      if (w16[m] == 0 || w8[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8 + 8, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 400000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
      $finish;
    end
  end
endmodule
