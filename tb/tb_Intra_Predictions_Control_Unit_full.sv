// tb_Intra_Predictions_Control_Unit_full: full-size end-to-end test of the intra
// prediction unit at its default frame size, 176x144 (QCIF, 11x9
// macroblocks), two frames, through
// top_harness: every output word is checked against the reference model.
module tb_Intra_Predictions_Control_Unit_full;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, data_out_enable, next_frame, done;
  logic [15:0] din, dout;
  logic [4:0] Y_blk_size;
  int checks, failures, cycles = 0;

  always #5 clk = ~clk;

  Intra_Predictions_Control_Unit dut (.*);
  top_harness #(.W(176), .H(144), .FRAMES(2)) h (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 400000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
