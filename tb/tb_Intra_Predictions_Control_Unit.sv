// tb_Intra_Predictions_Control_Unit: end-to-end test of the whole intra
// prediction unit on two 48x32 frames (3x2 macroblocks) through
// top_harness: every output word is checked against the reference model.
module tb_Intra_Predictions_Control_Unit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, data_out_enable, next_frame, done;
  logic [15:0] din, dout;
  logic [4:0] Y_blk_size;
  int checks, failures, cycles = 0;

  always #5 clk = ~clk;

  Intra_Predictions_Control_Unit #(.FRAME_W(48), .FRAME_H(32)) dut (.*);
  top_harness #(.W(48), .H(32), .FRAMES(2)) h (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
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
