// Self-checking testbench of the CONV unit.
//
// Runs layers in the three combinations of the pooling and crop enables,
// with a random block, random kernels, ReLU on and off, a filter count that
// is not a multiple of PF and random back-pressure on the result stream.
// The reference is the definition of a zero-padded 3x3 convolution summed
// over channels, followed by the same shift/ReLU/saturation, then crop of
// the full map and 2x2 max of the pooled map. Also checks the cycle count
// against one cycle per PV output pixels per channel per filter group.
module tb_conv_module;
  import cnn_pkg::*;
  localparam int DW = 16, AW = 2*DW + 8, FRAC = 4, KC = 3, PV = 4, PF = 2, BH = 8, BW = 8, NCMAX = 3;
  localparam int IB_AB = $clog2(NCMAX * BH * BW);
  localparam int NRD = KC * (PV + KC - 1);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;

  layer_cfg_t cfg;
  logic start, busy, done;
  logic [IB_AB-1:0] ib_raddr [NRD];
  logic signed [DW-1:0] ib_rdata [NRD];
  logic coef_valid, coef_ready;
  logic signed [DW-1:0] coef_data;
  logic out_valid, out_ready;
  logic signed [DW-1:0] out_data;

  conv_module #(.DW(DW), .AW(AW), .FRAC(FRAC), .KC(KC), .PV(PV), .PF(PF), .BH(BH), .BW(BW), .NCMAX(NCMAX)) dut (.*);

  logic signed [DW-1:0] ibuf [NCMAX*BH*BW];
  logic signed [DW-1:0] coefs [4096];
  int coef_n, coef_i;
  always_ff @(posedge clk)
    for (int v = 0; v < NRD; v++) ib_rdata[v] <= ibuf[ib_raddr[v]];
  assign coef_valid = (coef_i < coef_n);
  assign coef_data  = coefs[coef_i];
  always_ff @(posedge clk) if (coef_valid && coef_ready) coef_i <= coef_i + 1;

  int checks = 0, failures = 0;
  int got [$];
  always_ff @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) got.push_back(int'(out_data));
  end

  function automatic longint q(longint a, bit relu);
    longint v = a >>> FRAC;
    if (relu && v < 0) v = 0;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  task automatic run_layer(int nc, int nf, int h, int w, bit pool, bit crop_en, int crop, bit relu);
    longint o [];
    longint exp_q [$];
    int cyc, budget, ng;
    for (int i = 0; i < nc*h*w; i++) ibuf[i] = DW'($signed($urandom % 256) - 128);
    // coefficient stream: per filter group, per channel, per filter of the group, 3x3 row-major
    coef_n = 0; coef_i = 0;
    o = new[nf*h*w];
    foreach (o[i]) o[i] = 0;
    for (int g = 0; g < nf; g += PF)
      for (int c = 0; c < nc; c++)
        for (int f = g; f < g + PF && f < nf; f++)
          for (int a = 0; a < 3; a++)
            for (int b = 0; b < 3; b++) begin
              logic signed [DW-1:0] kv = DW'($signed($urandom % 64) - 32);
              coefs[coef_n++] = kv;
              for (int y = 0; y < h; y++)
                for (int x = 0; x < w; x++) begin
                  int yy = y + a - 1, xx = x + b - 1;
                  if (yy >= 0 && yy < h && xx >= 0 && xx < w)
                    o[(f*h+y)*w+x] += longint'(ibuf[(c*h+yy)*w+xx]) * longint'(kv);
                end
            end
    for (int f = 0; f < nf; f++) begin
      int lo = crop_en ? crop : 0;
      if (crop_en || !pool)
        for (int y = lo; y < h - lo; y++)
          for (int x = lo; x < w - lo; x++) exp_q.push_back(q(o[(f*h+y)*w+x], relu));
      if (pool)
        for (int y = 0; y < h/2; y++)
          for (int x = 0; x < w/2; x++) begin
            longint m = o[(f*h+2*y)*w+2*x];
            if (o[(f*h+2*y)*w+2*x+1] > m) m = o[(f*h+2*y)*w+2*x+1];
            if (o[(f*h+2*y+1)*w+2*x] > m) m = o[(f*h+2*y+1)*w+2*x];
            if (o[(f*h+2*y+1)*w+2*x+1] > m) m = o[(f*h+2*y+1)*w+2*x+1];
            exp_q.push_back(q(m, relu));
          end
    end
    cfg = '0;
    cfg.mode = MODE_CONV; cfg.nc = 16'(nc); cfg.nf = 16'(nf); cfg.h = 16'(h); cfg.w = 16'(w);
    cfg.pool_en = pool; cfg.crop_en = crop_en; cfg.crop = 8'(crop); cfg.relu_en = relu;
    got.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    @(posedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++; $display("FAIL pool=%0d crop=%0d: %0d results, expected %0d", pool, crop_en, got.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got.size(); i++) begin
      checks++;
      if (longint'(got[i]) != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL pool=%0d crop=%0d idx %0d: got %0d exp %0d", pool, crop_en, i, got[i], exp_q[i]);
      end
    end
    ng = (nf + PF - 1) / PF;
    budget = ng*nc*(h*((w+PV-1)/PV) + PF*9 + 2) + ng*8 + 3*(exp_q.size()/nf)*PF + 50;
    checks++;
    if (cyc > budget) begin failures++; $display("FAIL cycles %0d > %0d", cyc, budget); end
    $display("conv nc=%0d nf=%0d %0dx%0d pool=%0d crop=%0d/%0d relu=%0d: %0d cycles", nc, nf, h, w, pool, crop_en, crop, relu, cyc);
  endtask

  initial begin
    start = 0; cfg = '0; coef_n = 0; coef_i = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run_layer(3, 3, 8, 8, 0, 0, 0, 0);  // single convolution
    run_layer(2, 2, 6, 8, 1, 0, 0, 1);  // convolution + pooling
    run_layer(2, 3, 8, 6, 1, 1, 1, 1);  // convolution + crop and pooling
    run_layer(1, 1, 5, 7, 0, 1, 2, 0);  // convolution + crop, odd sizes
    run_layer(12, 2, 4, 4, 0, 0, 0, 1); // more channels than NCMAX on a smaller block
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
