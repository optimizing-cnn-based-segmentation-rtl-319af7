// Testbench of the AXI4-Lite bridge: writes every configuration register
// (address and data phases in either order and with gaps), reads them back,
// checks the decoded layer configuration, the one-cycle start pulse, that
// start is ignored while busy, the sticky done flag, the cycle counter and
// that unmapped addresses read as zero.
module tb_axil_bridge;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [7:0] awaddr, araddr;
  logic [31:0] wdata, rdata, cycles;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  layer_cfg_t cfg;
  logic start, busy, done;
  int checks = 0, failures = 0, starts = 0;

  axil_bridge dut (.*);

  always @(posedge clk) if (start) starts++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input int order);
    // order 0: both phases together, 1: data two cycles late, 2: address two cycles late
    int t = 0;
    bit aw_done = 0, w_done = 0;
    awaddr = a; wdata = d;
    @(negedge clk);
    while (!aw_done || !w_done) begin
      automatic bit aw_hs, w_hs;
      if (!aw_done) awvalid = (order != 2 || t >= 2);
      if (!w_done)  wvalid  = (order != 1 || t >= 2);
      #1;
      aw_hs = awvalid && awready;
      w_hs  = wvalid && wready;
      @(negedge clk);
      t++;
      if (aw_hs) begin aw_done = 1; awvalid = 0; end
      if (w_hs)  begin w_done = 1;  wvalid = 0; end
    end
    bready = 1;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "bresp OKAY");
    @(negedge clk); bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); arvalid = 1; araddr = a;
    while (!arready) @(negedge clk);
    @(negedge clk); arvalid = 0;
    repeat ($urandom % 3) @(negedge clk);
    rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk); rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] vals [9];
    logic [7:0] regs [9] = '{REG_MODE, REG_NC_NF, REG_H_W, REG_KSP, REG_IN_BASE, REG_COEF_BASE,
                             REG_OUT_BASE, REG_CYCLES, 8'h40};
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0;
    wdata = 0; wstrb = 4'hf; busy = 0; done = 0; cycles = 32'd1234;
    repeat (2) @(negedge clk); rst_n = 1;
    vals = '{32'h0000_000b, 32'h0040_0080, 32'h0020_0040, 32'h0301_0204, 32'h1000, 32'h2000, 32'h3000, 0, 0};
    for (int i = 0; i < 7; i++) wr(regs[i], vals[i], i % 3);
    check(cfg.mode == MODE_DECONV && cfg.pool_en && !cfg.crop_en && cfg.relu_en, "mode bits");
    check(cfg.nc == 16'h80 && cfg.nf == 16'h40, "nc/nf");
    check(cfg.h == 16'h40 && cfg.w == 16'h20, "h/w");
    check(cfg.k == 4 && cfg.s == 2 && cfg.p == 1 && cfg.crop == 3, "k/s/p/crop");
    check(cfg.in_base == 32'h1000 && cfg.coef_base == 32'h2000 && cfg.out_base == 32'h3000, "bases");
    for (int i = 0; i < 7; i++) begin rd(regs[i], d); check(d == vals[i], $sformatf("readback reg %0h", regs[i])); end
    rd(REG_CYCLES, d); check(d == 32'd1234, "cycles register");
    rd(8'h40, d); check(d == 0, "unmapped reads zero");
    // start pulse
    wr(REG_CTRL, 1, 0);
    @(negedge clk);
    check(starts == 1, "one start pulse");
    busy = 1;
    rd(REG_STATUS, d); check(d[1:0] == 2'b01, "status busy");
    wr(REG_CTRL, 1, 0);
    check(starts == 1, "start ignored while busy");
    @(negedge clk); busy = 0; done = 1; @(negedge clk); done = 0;
    rd(REG_STATUS, d); check(d[1:0] == 2'b10, "done sticky");
    wr(REG_CTRL, 1, 1);
    rd(REG_STATUS, d); check(d[1] == 1'b0, "done cleared by start");
    check(starts == 2, "second start");
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
