// tb_sad_abs_diff: exhaustive check of the 9-bit |C - R| unit over all
// 65536 pixel pairs against the integer absolute difference, including the
// worked example C = 198, R = 213 -> 15.
module tb_sad_abs_diff;
  logic [7:0] c, r, d;
  int checks = 0, failures = 0;

  sad_abs_diff dut (.c_pix(c), .r_pix(r), .abs_diff(d));

  initial begin
    c = 8'd198; r = 8'd213; #1;
    checks++;
    if (d !== 8'd15) begin failures++; $display("example: got %0d", d); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        c = 8'(i); r = 8'(j); #1;
        checks++;
        if (int'(d) != ((i > j) ? i - j : j - i)) begin
          failures++;
          if (failures < 10) $display("FAIL |%0d-%0d| got %0d", i, j, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
