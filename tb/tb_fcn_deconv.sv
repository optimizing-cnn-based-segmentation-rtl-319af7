// Workload testbench: the three deconvolution layers of FCN-8s on the DECONV unit.
//
// FCN up-samples its 21 class score maps with kernel/stride (4,2), (4,2) and
// (16,8), all without padding: 1x1 -> 4x4, 4x4 -> 10x10 and 10x10 -> 88x88,
// each with 21 input channels and 21 filters. These need KMAX = 16 and
// overlapping tiles in both directions (s < k), so they exercise the column
// shift registers and the partial result buffer at their full depth of
// k - s = 8. The unit is built with KMAX = 16, 16x16 blocks and room for 21
// channels; the other parameters keep their defaults (16 kernels, of which
// one runs because s < k).
// Inputs and kernels are random; each layer's output is compared word by
// word with the reference model (scatter of every input pixel times the
// kernel, summed over channels, then shift/saturate), and the layer must end
// within k steps per input pixel per (filter, channel) plus coefficient
// loading and the last write-back. The result stream sees random stalls.
module tb_fcn_deconv;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int DW = 16, AW = 2*DW + 8, FRAC = 8, KMAX = 16, BH = 16, BW = 16, NCMAX = 21;
  localparam int IB_AB = $clog2(NCMAX * BH * BW);
  localparam int PV = 16;

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

  deconv_module #(.KMAX(KMAX), .BH(BH), .BW(BW), .NCMAX(NCMAX)) dut (.*);

  logic signed [DW-1:0] ibuf [NCMAX*BH*BW];
  int coefs [];
  int coef_n, coef_i;
  always_ff @(posedge clk)
    for (int v = 0; v < PV; v++) ib_rdata[v] <= ibuf[ib_raddr[v]];

  assign coef_valid = (coef_i < coef_n);
  assign coef_data  = coef_valid ? DW'(coefs[coef_i]) : '0;
  always_ff @(posedge clk) if (coef_valid && coef_ready) coef_i <= coef_i + 1;

  int checks = 0, failures = 0;
  int got [$];
  int stalls = 0;
  always_ff @(posedge clk) begin
    out_ready <= ($urandom % 8) != 0;
    if (out_valid && out_ready) got.push_back(int'(out_data));
    if (out_valid && !out_ready) stalls++;
  end

  task automatic run_layer(string name, int nc, int nf, int h, int w, int k, int s);
    int in_map [];
    longint exp_q [$];
    int cyc, budget, ho;
    in_map = new[nc*h*w];
    foreach (in_map[i]) begin
      in_map[i] = int'($urandom % 512) - 256;
      ibuf[i] = DW'(in_map[i]);
    end
    coef_n = nf*nc*k*k;
    coefs = new[coef_n];
    foreach (coefs[i]) coefs[i] = int'($urandom % 128) - 64;
    coef_i = 0;
    deconv_ref(in_map, coefs, nc, nf, h, w, k, s, 0, 1'b0, FRAC, DW, exp_q);
    cfg = '0;
    cfg.mode = MODE_DECONV; cfg.nc = 16'(nc); cfg.nf = 16'(nf); cfg.h = 16'(h); cfg.w = 16'(w);
    cfg.k = 8'(k); cfg.s = 8'(s); cfg.p = 8'(0);
    got.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    @(posedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++; $display("FAIL %s: %0d results, expected %0d", name, got.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got.size(); i++) begin
      checks++;
      if (longint'(got[i]) != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s idx %0d: got %0d exp %0d", name, i, got[i], exp_q[i]);
      end
    end
    ho = s*(h-1)+k;
    budget = nf*nc*(h*w*k + k*k + 4) + nf*8 + 2*ho*ho + 50;
    checks++;
    if (cyc > budget) begin failures++; $display("FAIL %s: %0d cycles > %0d", name, cyc, budget); end
    $display("%s (k=%0d s=%0d) %0dx%0d -> %0dx%0d, %0d channels, %0d filters: %0d cycles",
             name, k, s, h, w, ho, ho, nc, nf, cyc);
  endtask

  initial begin
    start = 0; cfg = '0; coef_n = 0; coef_i = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run_layer("deconv1", 21, 21, 1, 1, 4, 2);
    run_layer("deconv2", 21, 21, 4, 4, 4, 2);
    run_layer("deconv3", 21, 21, 10, 10, 16, 8);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no result stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
