// End-to-end testbench of the CNN accelerator at reduced sizes.
//
// A processor model programs each layer through AXI4-Lite, a DDR model with
// random back-pressure serves both DMA ports, and every layer's output in
// memory is compared with the arithmetic reference (tb_ref_pkg) computed
// from that layer's input in memory. The layers form a small segmentation
// network (conv+pool, conv, 2x2 deconv back to full size, conv with ReLU,
// and a final 1x1 convolution run on the DECONV unit as k = s = 1),
// followed by layers that exercise the remaining modes: conv with crop and
// pooling, single conv with crop, deconv with overlap (k=4, s=2) and with
// border removal (k=3, s=2, p=1). Counts how often each mechanism occurred
// (pooling, crop, ReLU, both units, mode switch, parallel deconv kernels,
// single overlapping kernel, write-back overlapped with computation,
// memory back-pressure, result back-pressure, partial last beat) and fails
// any that never did.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int DW = 16, FRAC = 6, BH = 8, BW = 8, NCMAX = 4, PVC = 4, PFC = 2, PVD = 4, KMAX = 4;
  localparam int WPB = 4;
  localparam logic [31:0] IN_A = 32'h100, COEF_A = 32'h400, OUT_A = 32'h800;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;

  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [7:0] s_axil_awaddr, s_axil_araddr;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic irq;
  logic        req_valid [2], req_ready [2], req_we [2], rsp_valid [2];
  logic [31:0] req_addr [2];
  logic [63:0] req_wdata [2], rsp_rdata [2];
  logic [1:0]  req_id [2], rsp_id [2];

  cnn_accel_top #(.DW(DW), .FRAC(FRAC), .BH(BH), .BW(BW), .NCMAX(NCMAX), .PV_CONV(PVC), .PF_CONV(PFC),
                  .PV_DECONV(PVD), .KMAX(KMAX)) u_dut (
    .clk, .rst_n, .s_axil_awvalid, .s_axil_awready, .s_axil_awaddr, .s_axil_wvalid, .s_axil_wready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_bvalid, .s_axil_bready, .s_axil_bresp, .s_axil_arvalid,
    .s_axil_arready, .s_axil_araddr, .s_axil_rvalid, .s_axil_rready, .s_axil_rdata, .s_axil_rresp,
    .m0_req_valid(req_valid[0]), .m0_req_ready(req_ready[0]), .m0_req_we(req_we[0]), .m0_req_addr(req_addr[0]),
    .m0_req_wdata(req_wdata[0]), .m0_req_id(req_id[0]), .m0_rsp_valid(rsp_valid[0]), .m0_rsp_id(rsp_id[0]),
    .m0_rsp_rdata(rsp_rdata[0]),
    .m1_req_valid(req_valid[1]), .m1_req_ready(req_ready[1]), .m1_req_we(req_we[1]), .m1_req_addr(req_addr[1]),
    .m1_req_wdata(req_wdata[1]), .m1_req_id(req_id[1]), .m1_rsp_valid(rsp_valid[1]), .m1_rsp_id(rsp_id[1]),
    .m1_rsp_rdata(rsp_rdata[1]), .irq
  );

  ddr_model #(.DEPTH(4096)) u_ddr (.clk, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_id,
                                   .rsp_valid, .rsp_id, .rsp_rdata);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pool = 0, n_crop = 0, n_relu = 0, n_conv = 0, n_deconv = 0, n_switch = 0;
  int n_par_dc = 0, n_ovl_dc = 0, n_wb_overlap = 0, n_res_stall = 0, n_partial = 0;
  mode_e last_mode = MODE_CONV;

  always @(posedge clk) begin
    if ((u_dut.u_conv.wb_busy && u_dut.u_conv.st_valid) || (u_dut.u_deconv.wb_busy && u_dut.u_deconv.st_valid))
      n_wb_overlap++;
    if ((u_dut.u_conv.out_valid && !u_dut.u_conv.out_ready) || (u_dut.u_deconv.out_valid && !u_dut.u_deconv.out_ready))
      n_res_stall++;
    if (u_dut.u_deconv.st_valid && u_dut.u_deconv.st_lane[1]) n_par_dc++;
  end

  // ---- AXI4-Lite processor model
  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awvalid = 1; s_axil_awaddr = a; s_axil_wvalid = 1; s_axil_wdata = d; s_axil_wstrb = 4'hf;
    fork
      begin do @(posedge clk); while (!s_axil_awready); @(negedge clk); s_axil_awvalid = 0; end
      begin do @(posedge clk); while (!s_axil_wready);  @(negedge clk); s_axil_wvalid = 0; end
    join
    s_axil_bready = 1;
    do @(posedge clk); while (!s_axil_bvalid);
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_arvalid = 1; s_axil_araddr = a;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk); s_axil_arvalid = 0; s_axil_rready = 1;
    while (!s_axil_rvalid) @(posedge clk);
    d = s_axil_rdata;
    @(negedge clk); s_axil_rready = 0;
  endtask

  // ---- memory helpers (word n of a region is lane n%4 of beat base+n/4)
  task automatic put_words(input logic [31:0] base, input int v[]);
    for (int n = 0; n < v.size(); n++)
      u_ddr.mem[base + n/WPB][(n%WPB)*DW +: DW] = DW'(v[n]);
  endtask
  function automatic void get_words(input logic [31:0] base, input int cnt, ref int v[]);
    v = new[cnt];
    for (int n = 0; n < cnt; n++) v[n] = int'($signed(u_ddr.mem[base + n/WPB][(n%WPB)*DW +: DW]));
  endfunction

  task automatic run_layer(input mode_e mode, input int nc, nf, h, w, k, s, p,
                           input bit pool, crop_en, input int crop, input bit relu,
                           input int in_map[], input int coefs[], output int out_map[]);
    longint exp_q [$];
    logic [31:0] st;
    int cyc = 0;
    put_words(IN_A, in_map);
    put_words(COEF_A, coefs);
    for (int b = 0; b < 512; b++) u_ddr.mem[OUT_A + b] = 64'hdead_beef_dead_beef;
    if (mode == MODE_CONV) conv_ref(in_map, coefs, nc, nf, h, w, PFC, pool, crop_en, crop, relu, FRAC, DW, exp_q);
    else                   deconv_ref(in_map, coefs, nc, nf, h, w, k, s, p, relu, FRAC, DW, exp_q);
    axil_write(REG_MODE, {28'd0, relu, crop_en, pool, mode});
    axil_write(REG_NC_NF, {16'(nf), 16'(nc)});
    axil_write(REG_H_W, {16'(w), 16'(h)});
    axil_write(REG_KSP, {8'(crop), 8'(p), 8'(s), 8'(k)});
    axil_write(REG_IN_BASE, IN_A);
    axil_write(REG_COEF_BASE, COEF_A);
    axil_write(REG_OUT_BASE, OUT_A);
    axil_write(REG_CTRL, 32'd1);
    do begin
      @(posedge clk); cyc++;
    end while (!irq);
    axil_read(REG_STATUS, st);
    checks++;
    if (st[1:0] != 2'b10) begin failures++; $display("FAIL status %b", st[1:0]); end
    get_words(OUT_A, exp_q.size(), out_map);
    for (int n = 0; n < exp_q.size(); n++) begin
      checks++;
      if (longint'(out_map[n]) != exp_q[n]) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d word %0d: got %0d exp %0d", mode, n, out_map[n], exp_q[n]);
      end
    end
    // the word after the result must be untouched unless it shares the last beat
    if (exp_q.size() % WPB != 0) n_partial++;
    checks++;
    if (u_ddr.mem[OUT_A + (exp_q.size() + WPB - 1)/WPB] != 64'hdead_beef_dead_beef) begin
      failures++; $display("FAIL write past the end of the result");
    end
    if (pool) n_pool++;
    if (crop_en) n_crop++;
    if (relu) n_relu++;
    if (mode == MODE_CONV) n_conv++; else n_deconv++;
    if (mode == MODE_DECONV && k != s) n_ovl_dc++;
    if (mode != last_mode) n_switch++;
    last_mode = mode;
    $display("layer mode=%0d nc=%0d nf=%0d %0dx%0d k=%0d s=%0d p=%0d pool=%0d crop=%0d: %0d words, %0d cycles",
             mode, nc, nf, h, w, k, s, p, pool, crop_en, exp_q.size(), cyc);
  endtask

  function automatic void rnd(ref int v[], input int cnt, input int span);
    v = new[cnt];
    foreach (v[i]) v[i] = $signed($urandom % span) - span/2;
  endfunction

  initial begin
    int x [], c [], y [];
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    repeat (4) @(negedge clk); rst_n = 1;
    // small segmentation network: 3x8x8 image -> 1x8x8 score map
    rnd(x, 3*8*8, 256);
    rnd(c, 4*3*9, 64);  run_layer(MODE_CONV,   3, 4, 8, 8, 0, 0, 0, 1, 0, 0, 1, x, c, y);
    x = y; rnd(c, 4*4*9, 64);  run_layer(MODE_CONV, 4, 4, 4, 4, 0, 0, 0, 0, 0, 0, 1, x, c, y);
    x = y; rnd(c, 2*4*4, 64);  run_layer(MODE_DECONV, 4, 2, 4, 4, 2, 2, 0, 0, 0, 0, 0, x, c, y);
    x = y; rnd(c, 1*2*9, 64);  run_layer(MODE_CONV, 2, 1, 8, 8, 0, 0, 0, 0, 0, 0, 1, x, c, y);
    rnd(x, 2*8*8, 256); rnd(c, 1*2*1, 64);  run_layer(MODE_DECONV, 2, 1, 8, 8, 1, 1, 0, 0, 0, 0, 0, x, c, y);  // 1x1 conv on DECONV
    // remaining modes
    rnd(x, 2*8*8, 256); rnd(c, 3*2*9, 64);  run_layer(MODE_CONV, 2, 3, 8, 8, 0, 0, 0, 1, 1, 0, 0, x, c, y);
    rnd(x, 2*6*6, 256); rnd(c, 2*2*9, 64);  run_layer(MODE_CONV, 2, 2, 6, 6, 0, 0, 0, 0, 1, 1, 0, x, c, y);
    rnd(x, 2*4*4, 256); rnd(c, 2*2*16, 64); run_layer(MODE_DECONV, 2, 2, 4, 4, 4, 2, 0, 0, 0, 0, 0, x, c, y);
    rnd(x, 1*4*4, 256); rnd(c, 1*1*9, 64);  run_layer(MODE_DECONV, 1, 1, 4, 4, 3, 2, 1, 0, 0, 0, 1, x, c, y);
    rnd(x, 3*8*8, 256); rnd(c, 2*3*9, 64);  run_layer(MODE_CONV, 3, 2, 8, 8, 0, 0, 0, 0, 0, 0, 0, x, c, y);

    $display("mechanisms: pool=%0d crop=%0d relu=%0d conv=%0d deconv=%0d mode_switch=%0d parallel_deconv_cycles=%0d overlap_deconv=%0d wb_overlap_cycles=%0d mem_stalls=%0d result_stalls=%0d partial_beat=%0d",
             n_pool, n_crop, n_relu, n_conv, n_deconv, n_switch, n_par_dc, n_ovl_dc, n_wb_overlap,
             u_ddr.stalls, n_res_stall, n_partial);
    checks++; if (n_pool == 0)       begin failures++; $display("FAIL never: pooling"); end
    checks++; if (n_crop == 0)       begin failures++; $display("FAIL never: crop"); end
    checks++; if (n_relu == 0)       begin failures++; $display("FAIL never: relu"); end
    checks++; if (n_switch == 0)     begin failures++; $display("FAIL never: mode switch"); end
    checks++; if (n_par_dc == 0)     begin failures++; $display("FAIL never: parallel deconv kernels"); end
    checks++; if (n_ovl_dc == 0)     begin failures++; $display("FAIL never: overlapping deconv"); end
    checks++; if (n_wb_overlap == 0) begin failures++; $display("FAIL never: write-back during compute"); end
    checks++; if (u_ddr.stalls == 0) begin failures++; $display("FAIL never: memory back-pressure"); end
    checks++; if (n_res_stall == 0)  begin failures++; $display("FAIL never: result back-pressure"); end
    checks++; if (n_partial == 0)    begin failures++; $display("FAIL never: partial last beat"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
