// Self-checking testbench of the DECONV unit.
//
// Runs several layers with different (k, s, p) on small blocks, with a
// random input block, random kernels and random back-pressure on the result
// stream. The expected output is computed directly from the definition of
// deconvolution: O[f][y][x] = sum over c, r, q, i, j with s*r+i = y+p and
// s*q+j = x+p of I[c][r][q] * K[f][c][i][j], then shifted by FRAC and
// saturated. Also checks the number of results and that the layer ends
// within the cycle budget of k steps per input pixel per active kernel.
module tb_deconv_module;
  import cnn_pkg::*;
  localparam int DW = 16, AW = 2*DW + 8, FRAC = 4, KMAX = 4, PV = 4, BH = 8, BW = 8, NCMAX = 3;
  localparam int IB_AB = $clog2(NCMAX * BH * BW);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;

  layer_cfg_t cfg;
  logic start, busy, done;
  logic [IB_AB-1:0] ib_raddr [PV];
  logic signed [DW-1:0] ib_rdata [PV];
  logic coef_valid, coef_ready;
  logic signed [DW-1:0] coef_data;
  logic out_valid, out_ready;
  logic signed [DW-1:0] out_data;

  deconv_module #(.DW(DW), .AW(AW), .FRAC(FRAC), .KMAX(KMAX), .PV(PV), .BH(BH), .BW(BW), .NCMAX(NCMAX)) dut (.*);

  logic signed [DW-1:0] ibuf [NCMAX*BH*BW];
  logic signed [DW-1:0] coefs [4096];
  int coef_n, coef_i;
  always_ff @(posedge clk)
    for (int v = 0; v < PV; v++) ib_rdata[v] <= ibuf[ib_raddr[v]];

  assign coef_valid = (coef_i < coef_n);
  assign coef_data  = coefs[coef_i];
  always_ff @(posedge clk) if (coef_valid && coef_ready) coef_i <= coef_i + 1;

  int checks = 0, failures = 0;
  int got [$];
  always_ff @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) got.push_back(int'(out_data));
  end

  function automatic longint sat(longint a);
    longint v = a >>> FRAC;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  task automatic run_layer(int nc, int nf, int h, int w, int k, int s, int p);
    longint ref_o [];
    int ho, wo, hq, wq, n, cyc, budget, nl;
    ho = s*(h-1)+k; wo = s*(w-1)+k; hq = ho-2*p; wq = wo-2*p;
    for (int i = 0; i < nc*h*w; i++) ibuf[i] = DW'($signed($urandom % 256) - 128);
    coef_n = nf*nc*k*k; coef_i = 0;
    for (int i = 0; i < coef_n; i++) coefs[i] = DW'($signed($urandom % 64) - 32);
    // reference: coef stream is [f][c][column j][row i]
    ref_o = new[nf*hq*wq];
    foreach (ref_o[i]) ref_o[i] = 0;
    for (int f = 0; f < nf; f++)
      for (int c = 0; c < nc; c++)
        for (int r = 0; r < h; r++)
          for (int q = 0; q < w; q++)
            for (int i = 0; i < k; i++)
              for (int j = 0; j < k; j++) begin
                int y = s*r+i-p, x = s*q+j-p;
                if (y >= 0 && y < hq && x >= 0 && x < wq)
                  ref_o[(f*hq+y)*wq+x] += longint'(ibuf[(c*h+r)*w+q]) *
                                          longint'(coefs[((f*nc+c)*k+j)*k+i]);
              end
    cfg = '0;
    cfg.mode = MODE_DECONV; cfg.nc = 16'(nc); cfg.nf = 16'(nf); cfg.h = 16'(h); cfg.w = 16'(w);
    cfg.k = 8'(k); cfg.s = 8'(s); cfg.p = 8'(p);
    got.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    @(posedge clk);
    n = nf*hq*wq;
    checks++;
    if (got.size() != n) begin
      failures++; $display("FAIL k=%0d s=%0d p=%0d: %0d results, expected %0d", k, s, p, got.size(), n);
    end
    for (int i = 0; i < n && i < got.size(); i++) begin
      checks++;
      if (longint'(got[i]) != sat(ref_o[i])) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d s=%0d p=%0d idx %0d: got %0d exp %0d", k, s, p, i, got[i], sat(ref_o[i]));
      end
    end
    // cycle budget: k steps per pixel per channel per filter over the active kernels,
    // plus coefficient loading, drain and the last write-back (with back-pressure)
    nl = (k == s) ? PV : 1;
    budget = nf*nc*(((h+nl-1)/nl)*w*k + k*k + 4) + nf*8 + 3*hq*wq + 50;
    checks++;
    if (cyc > budget) begin failures++; $display("FAIL k=%0d s=%0d: %0d cycles > %0d", k, s, cyc, budget); end
    $display("layer k=%0d s=%0d p=%0d nc=%0d nf=%0d %0dx%0d: %0d cycles", k, s, p, nc, nf, h, w, cyc);
  endtask

  initial begin
    start = 0; cfg = '0; coef_n = 0; coef_i = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run_layer(3, 2, 8, 6, 2, 2, 0);   // U-Net style, all kernels in parallel
    run_layer(2, 2, 5, 7, 2, 2, 0);   // rows not a multiple of PV
    run_layer(2, 2, 4, 5, 4, 2, 0);   // FCN (4,2): column and row overlap
    run_layer(2, 1, 3, 3, 3, 2, 1);   // Fig. 4 style (3,2,1): border removal
    run_layer(1, 2, 4, 4, 3, 1, 0);   // k > 2s: three tiles overlap
    run_layer(3, 3, 3, 4, 4, 4, 0);   // k = s = 4
    run_layer(12, 2, 4, 4, 2, 2, 0);  // more channels than NCMAX on a smaller block
    run_layer(3, 2, 8, 6, 1, 1, 0);   // k = s = 1: a 1x1 convolution
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
