// Testbench of the DMA: against the DDR model (with back-pressure) it loads
// an input block into a model of the input buffer, streams a coefficient
// region with random consumer stalls while result words are written back
// concurrently, flushes a partial last beat and checks every word, the
// load_done pulse, wr_idle and that nothing is written past the result.
module tb_dma;
  import cnn_pkg::*;
  localparam int DW = 16, IB_AB = 10, WPB = 4;
  localparam logic [31:0] IN_A = 32'h40, COEF_A = 32'h80, OUT_A = 32'h100;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;

  layer_cfg_t cfg;
  logic load_start, load_done, coef_start, coef_valid, coef_ready, res_valid, res_ready, flush, wr_idle;
  logic signed [DW-1:0] coef_data, res_data;
  logic ib_wr_en;
  logic [IB_AB-1:0] ib_wr_addr;
  logic signed [DW-1:0] ib_wr_data [WPB];
  logic        req_valid [2], req_ready [2], req_we [2], rsp_valid [2];
  logic [31:0] req_addr [2];
  logic [63:0] req_wdata [2], rsp_rdata [2];
  logic [1:0]  req_id [2], rsp_id [2];

  dma #(.DW(DW), .IB_AB(IB_AB)) dut (
    .clk, .rst_n, .cfg, .load_start, .load_done, .coef_start, .coef_valid, .coef_ready, .coef_data,
    .res_valid, .res_ready, .res_data, .flush, .wr_idle, .ib_wr_en, .ib_wr_addr, .ib_wr_data,
    .mem_req_valid(req_valid[0]), .mem_req_ready(req_ready[0]), .mem_req_we(req_we[0]),
    .mem_req_addr(req_addr[0]), .mem_req_wdata(req_wdata[0]), .mem_req_id(req_id[0]),
    .mem_rsp_valid(rsp_valid[0]), .mem_rsp_id(rsp_id[0]), .mem_rsp_rdata(rsp_rdata[0])
  );
  ddr_model #(.DEPTH(1024)) u_ddr (.clk, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_id,
                                   .rsp_valid, .rsp_id, .rsp_rdata);
  assign req_valid[1] = 1'b0;
  assign req_we[1] = 1'b0;
  assign req_addr[1] = '0;
  assign req_wdata[1] = '0;
  assign req_id[1] = '0;

  int checks = 0, failures = 0;
  logic signed [DW-1:0] ib [1 << IB_AB];
  int loads = 0;
  always @(posedge clk) begin
    if (ib_wr_en) for (int n = 0; n < WPB; n++) ib[ib_wr_addr + n] <= ib_wr_data[n];
    if (load_done) loads++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int coef_got [$];
  always @(posedge clk) if (coef_valid && coef_ready) coef_got.push_back(int'(coef_data));

  initial begin
    int n_in, n_coef = 37, n_res = 23, sent = 0, cyc = 0;
    load_start = 0; coef_start = 0; coef_ready = 0; res_valid = 0; res_data = 0; flush = 0;
    cfg = '0; cfg.nc = 3; cfg.h = 4; cfg.w = 4; cfg.in_base = IN_A; cfg.coef_base = COEF_A; cfg.out_base = OUT_A;
    n_in = 3*4*4;
    for (int b = 0; b < 1024; b++) u_ddr.mem[b] = {$urandom, $urandom};
    for (int b = 0; b < 16; b++) u_ddr.mem[OUT_A + b] = 64'hdead_beef_dead_beef;
    repeat (2) @(negedge clk); rst_n = 1;
    // load
    @(negedge clk); load_start = 1; @(negedge clk); load_start = 0;
    while (loads == 0 && cyc < 2000) begin @(negedge clk); cyc++; end
    check(loads == 1, "one load_done");
    for (int n = 0; n < n_in; n++)
      check(ib[n] == DW'(u_ddr.mem[IN_A + n/WPB] >> ((n%WPB)*DW)), $sformatf("input word %0d: %h vs %h", n, ib[n], DW'(u_ddr.mem[IN_A + n/WPB] >> ((n%WPB)*DW))));
    // coefficients and results at the same time
    @(negedge clk); coef_start = 1; @(negedge clk); coef_start = 0;
    fork
      begin
        while (coef_got.size() < n_coef) begin
          coef_ready = ($urandom % 3) != 0;
          @(negedge clk);
        end
        coef_ready = 0;
      end
      begin
        while (sent < n_res) begin
          res_valid = ($urandom % 4) != 0;
          res_data  = DW'(1000 + 7*sent);
          #1;
          if (res_valid && res_ready) begin @(negedge clk); sent++; end
          else @(negedge clk);
        end
        res_valid = 0;
      end
    join
    for (int n = 0; n < n_coef; n++)
      check(coef_got[n] == int'($signed(DW'(u_ddr.mem[COEF_A + n/WPB] >> ((n%WPB)*DW)))), $sformatf("coef word %0d", n));
    check(!wr_idle, "partial beat pending before flush");
    flush = 1;
    while (!wr_idle) @(negedge clk);
    @(negedge clk); flush = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < n_res; n++)
      check(u_ddr.mem[OUT_A + n/WPB][(n%WPB)*DW +: DW] == DW'(1000 + 7*n), $sformatf("result word %0d", n));
    check(u_ddr.mem[OUT_A + (n_res + WPB - 1)/WPB] == 64'hdead_beef_dead_beef, "nothing written past the result");
    check(u_ddr.stalls > 0, "memory back-pressure seen");
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
