// tb_pred_vertical: self-checking test of pred_vertical for both block sizes, 16x16
// (luma) and 8x8 (chroma), through pred_unit_harness: every predicted pixel
// and the SAD of each block are compared with the integer reference model.
module tb_pred_vertical;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c16, f16, c8, f8;
  logic d16, d8;
  int   cycles = 0;

  always #5 clk = ~clk;

  pred_unit_harness #(.N(16), .MODE(0)) h16 (.clk, .rst_n, .checks(c16), .failures(f16), .done(d16));
  pred_unit_harness #(.N(8),  .MODE(0)) h8  (.clk, .rst_n, .checks(c8),  .failures(f8),  .done(d8));

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
