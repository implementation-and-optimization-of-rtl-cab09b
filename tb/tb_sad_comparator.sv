// tb_sad_comparator: random SAD vectors and availability masks (DC always
// available), with deliberate ties, against a reference minimum search;
// checks the registered winner, its SAD, that the winner only changes on
// `latch`, and that pred_out forwards the winner's prediction pixel.
module tb_sad_comparator;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0][15:0] sad;
  logic [3:0]       ok;
  logic [3:0][7:0]  pred;
  logic             latch;
  intra_mode_e      best;
  logic [15:0]      min_sad;
  logic [7:0]       pout;
  int checks = 0, failures = 0, cycles = 0;
  int eb, es;

  always #5 clk = ~clk;

  sad_comparator #(.SADW(16)) dut (.clk, .rst_n, .sad, .mode_ok(ok), .pred, .latch,
    .best_mode(best), .min_sad, .pred_out(pout));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    latch = 0; sad = '0; ok = '0; pred = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int m = 0; m < 4; m++) begin
        sad[m]  = (t % 3 == 0) ? 16'($urandom_range(3)) : 16'($urandom);
        pred[m] = 8'($urandom);
      end
      ok = 4'($urandom) | 4'b0100;
      eb = -1; es = 0;
      for (int m = 0; m < 4; m++)
        if (ok[m] && (eb < 0 || int'(sad[m]) < es)) begin eb = m; es = int'(sad[m]); end
      latch = 1;
      @(negedge clk);
      latch = 0;
      check(int'(best) == eb && int'(min_sad) == es,
            $sformatf("t=%0d best %0d/%0d sad %0d/%0d", t, best, eb, min_sad, es));
      check(pout == pred[eb], "pred_out");
      // no latch: the winner must hold
      sad = '1;
      sad[3] = '0; ok = 4'b1111;
      @(negedge clk);
      check(int'(best) == eb, "hold without latch");
      pred[eb] = ~pred[eb];
      #1 check(pout == pred[eb], "pred_out follows winner's pixel");
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
