// Testbench of one deconvolution kernel: streams one channel (every pixel
// with kernel columns 0..k-1) for several (k, s) and input sizes, gathers
// the emitted values by output position and compares them with the
// deconvolution definition. Checks that each output position is emitted
// exactly once and that the kernel takes one step per cycle (k cycles per
// input pixel, two cycles of latency).
module tb_deconv_kernel;
  localparam int DW = 16, AW = 40, KMAX = 4, WMAX = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;
  logic [7:0] k, s;
  logic [15:0] h, w;
  logic in_valid;
  logic signed [DW-1:0] in_x;
  logic signed [DW-1:0] in_col [KMAX];
  logic [7:0] in_j;
  logic [15:0] in_r, in_c;
  logic [KMAX-1:0] out_valid;
  logic [15:0] out_row0, out_colx;
  logic signed [AW-1:0] out_val [KMAX];
  int checks = 0, failures = 0;

  deconv_kernel #(.DW(DW), .AW(AW), .KMAX(KMAX), .WMAX(WMAX)) dut (.*);

  longint got [64][64];
  int hits [64][64];
  int last_out_cyc, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < KMAX; i++)
      if (out_valid[i]) begin
        got[out_row0 + i][out_colx] = out_val[i];
        hits[out_row0 + i][out_colx]++;
        last_out_cyc = cyc;
      end
  end

  task automatic run(input int kk, ss, hh, ww);
    int img [8][8];
    int ker [4][4];
    int ho = ss*(hh-1)+kk, wo = ss*(ww-1)+kk, start_cyc;
    k = 8'(kk); s = 8'(ss); h = 16'(hh); w = 16'(ww);
    foreach (got[a, b]) begin got[a][b] = 0; hits[a][b] = 0; end
    foreach (img[a, b]) img[a][b] = $signed($urandom % 512) - 256;
    foreach (ker[a, b]) ker[a][b] = $signed($urandom % 128) - 64;
    @(negedge clk);
    start_cyc = cyc;
    for (int r = 0; r < hh; r++)
      for (int q = 0; q < ww; q++)
        for (int j = 0; j < kk; j++) begin
          in_valid = 1; in_x = DW'(img[r][q]); in_j = 8'(j); in_r = 16'(r); in_c = 16'(q);
          for (int i = 0; i < KMAX; i++) in_col[i] = DW'(ker[i][j]);
          @(negedge clk);
        end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (last_out_cyc - start_cyc != hh*ww*kk + 2) begin
      failures++; $display("FAIL k=%0d s=%0d: last output at cycle %0d, expected %0d", kk, ss, last_out_cyc - start_cyc, hh*ww*kk + 2);
    end
    for (int y = 0; y < ho; y++)
      for (int x = 0; x < wo; x++) begin
        longint e = 0;
        for (int r = 0; r < hh; r++)
          for (int q = 0; q < ww; q++)
            for (int i = 0; i < kk; i++)
              for (int j = 0; j < kk; j++)
                if (ss*r+i == y && ss*q+j == x) e += longint'(img[r][q]) * ker[i][j];
        checks++;
        if (hits[y][x] != 1 || got[y][x] != e) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d s=%0d (%0d,%0d): got %0d x%0d exp %0d", kk, ss, y, x, got[y][x], hits[y][x], e);
        end
      end
  endtask

  initial begin
    in_valid = 0; in_x = 0; in_j = 0; in_r = 0; in_c = 0; k = 2; s = 2; h = 1; w = 1;
    foreach (in_col[i]) in_col[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(2, 2, 4, 5);   // U-Net: no overlap
    run(4, 2, 3, 4);   // FCN (4,2)
    run(3, 2, 3, 3);   // odd kernel
    run(4, 1, 3, 3);   // k > 2s
    run(4, 4, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
