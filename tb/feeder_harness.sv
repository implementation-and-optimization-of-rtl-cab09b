// feeder_harness: mb_feeder of block size N on a PW x PH plane held by the
// harness, connected to a real intra_nxn_modes. For every block position
// (raster order, so all neighbour-availability cases occur) it starts the
// feeder, grants the output after a random delay and checks the header
// word (component and chosen mode), all N*N/2 pixel words, out_finished
// and done against intra_ref_pkg, with the neighbours taken from the plane.
module feeder_harness #(
  parameter int N  = 16,
  parameter int PW = 48,
  parameter int PH = 32,
  parameter intra_pkg::comp_e COMP = intra_pkg::COMP_Y
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done_all
);
  import intra_ref_pkg::*;
  import intra_pkg::*;

  localparam int AW  = $clog2(PW * PH);
  localparam int MXW = $clog2(PW / N + 1);
  localparam int MYW = $clog2(PH / N + 1);

  logic           start, done, grant, out_valid, out_finished;
  logic [MXW-1:0] mb_x;
  logic [MYW-1:0] mb_y;
  logic [AW-1:0]  raddr;
  logic [7:0]     rdata;
  logic [15:0]    out_data;
  byte unsigned   plane [PW*PH];

  assign rdata = plane[raddr];

  intra_block_path #(.N(N), .PW(PW), .PH(PH), .COMP(COMP)) dut (.*);

  nb_t  rt, rl;
  blk_t ro;
  int   rlt, eb, es, x0, y0, words, dones, fins;
  bit   at, al;

  always @(posedge clk) begin
    if (done) dones <= dones + 1;
    if (out_finished) fins <= fins + 1;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL N=%0d %s", N, s); end
  endtask

  initial begin
    checks = 0; failures = 0; done_all = 0; start = 0; grant = 0; mb_x = '0; mb_y = '0;
    for (int i = 0; i < PW * PH; i++)
      plane[i] = ((i / PW) % 3 == 0) ? 8'($urandom) : 8'((i % PW) * 5 + (i / PW) * 2);
    @(posedge rst_n);
    for (int by = 0; by < PH / N; by++)
      for (int bx = 0; bx < PW / N; bx++) begin
        x0 = bx * N; y0 = by * N; at = (by > 0); al = (bx > 0);
        for (int i = 0; i < N; i++) begin
          rt[i] = at ? plane[(y0 - 1) * PW + x0 + i] : 0;
          rl[i] = al ? plane[(y0 + i) * PW + x0 - 1] : 0;
        end
        rlt = (at && al) ? plane[(y0 - 1) * PW + x0 - 1] : 0;
        for (int p = 0; p < N * N; p++) ro[p] = plane[(y0 + p / N) * PW + x0 + p % N];
        ref_choose(N, ro, rt, rl, rlt, at, al, at && al, eb, es);
        dones = 0; fins = 0;
        @(negedge clk);
        mb_x = MXW'(bx); mb_y = MYW'(by); start = 1;
        @(negedge clk);
        start = 0;
        repeat ($urandom_range(N * N * 3, N * N * 2)) @(negedge clk);
        grant = 1;
        words = 0;
        while (words < N * N / 2 + 1) begin
          @(negedge clk);
          if (out_valid) begin
            if (words == 0)
              check(out_data == {6'd0, COMP, 6'd0, 2'(eb)},
                    $sformatf("header %h, expected mode %0d", out_data, eb));
            else
              check(int'(out_data[7:0])  == ref_pred(N, eb, rt, rl, rlt, at, al, (2*words-2) % N, (2*words-2) / N) &&
                    int'(out_data[15:8]) == ref_pred(N, eb, rt, rl, rlt, at, al, (2*words-1) % N, (2*words-1) / N),
                    $sformatf("block (%0d,%0d) word %0d", bx, by, words));
            words++;
          end
        end
        repeat (8) @(negedge clk);
        grant = 0;
        check(dones == 1 && fins == 1, $sformatf("done %0d finished %0d", dones, fins));
        check(!out_valid, "no extra words");
      end
    done_all = 1;
  end
endmodule
