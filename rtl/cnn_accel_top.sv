// CNN accelerator for real-time segmentation: CONV and DECONV units sharing
// one input buffer.
//
// A layer runs in three phases, sequenced here after the processor writes
// CTRL.start through the AXI4-Lite bridge:
//   1. LOAD: the DMA of the selected unit (DMA 0 for CONV, DMA 1 for DECONV)
//      copies the input block from memory into the shared input buffer;
//   2. RUN:  the unit computes all filters; its DMA streams the coefficients
//      in and writes each finished filter back while the next is computed
//      (double output buffers);
//   3. FLUSH: the last partial beat is written; STATUS.done is set.
// Only one unit runs at a time, which is what allows the input buffer to be
// shared; its read ports are switched to the active unit.
// Default parameters are the 16-bit configuration of the design: 64x64
// blocks, CONV with 4 parallel filters x 16 pixels, DECONV with 16 parallel
// kernels for 2x2 kernels (k = s = 2), input buffer for 128 channels.
// Ports: AXI4-Lite slave (s_axil_*), one memory port per DMA (m0_* for CONV,
// m1_* for DECONV, see dma), and `irq`, a one-cycle pulse at layer end.
// The structure follows the document; the sequencing, the memory port
// protocol and the register map are this design's.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned DW        = 16,
  parameter int unsigned FRAC      = 8,
  parameter int unsigned BH        = 64,
  parameter int unsigned BW        = 64,
  parameter int unsigned NCMAX     = 128,
  parameter int unsigned PV_CONV   = 16,
  parameter int unsigned PF_CONV   = 4,
  parameter int unsigned PV_DECONV = 16,
  parameter int unsigned KMAX      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  output logic [1:0]        s_axil_bresp,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  input  logic [7:0]        s_axil_araddr,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  // memory port of DMA 0 (CONV)
  output logic              m0_req_valid,
  input  logic              m0_req_ready,
  output logic              m0_req_we,
  output logic [ADDR_W-1:0] m0_req_addr,
  output logic [MEM_W-1:0]  m0_req_wdata,
  output logic [ID_W-1:0]   m0_req_id,
  input  logic              m0_rsp_valid,
  input  logic [ID_W-1:0]   m0_rsp_id,
  input  logic [MEM_W-1:0]  m0_rsp_rdata,
  // memory port of DMA 1 (DECONV)
  output logic              m1_req_valid,
  input  logic              m1_req_ready,
  output logic              m1_req_we,
  output logic [ADDR_W-1:0] m1_req_addr,
  output logic [MEM_W-1:0]  m1_req_wdata,
  output logic [ID_W-1:0]   m1_req_id,
  input  logic              m1_rsp_valid,
  input  logic [ID_W-1:0]   m1_rsp_id,
  input  logic [MEM_W-1:0]  m1_rsp_rdata,
  output logic              irq
);
  localparam int unsigned AW    = 2*DW + 8;
  localparam int unsigned IB_D  = NCMAX * BH * BW;
  localparam int unsigned IB_AB = $clog2(IB_D);
  localparam int unsigned NRD   = 3 * (PV_CONV + 2);
  localparam int unsigned WPB   = MEM_W / DW;

  layer_cfg_t cfg;
  logic       start, busy, done;
  logic [31:0] cycles;

  axil_bridge u_axil (
    .clk, .rst_n,
    .awvalid(s_axil_awvalid), .awready(s_axil_awready), .awaddr(s_axil_awaddr),
    .wvalid(s_axil_wvalid), .wready(s_axil_wready), .wdata(s_axil_wdata), .wstrb(s_axil_wstrb),
    .bvalid(s_axil_bvalid), .bready(s_axil_bready), .bresp(s_axil_bresp),
    .arvalid(s_axil_arvalid), .arready(s_axil_arready), .araddr(s_axil_araddr),
    .rvalid(s_axil_rvalid), .rready(s_axil_rready), .rdata(s_axil_rdata), .rresp(s_axil_rresp),
    .cfg, .start, .busy, .done, .cycles
  );

  // ---- layer sequencer
  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_RUN, L_FLUSH} lstate_e;
  lstate_e lstate;
  logic    is_dc;
  logic    load_start, load_done0, load_done1, eng_start, eng_done, flush, wr_idle0, wr_idle1;
  logic    conv_done, deconv_done, conv_busy, deconv_busy;

  assign is_dc    = (cfg.mode == MODE_DECONV);
  assign eng_done = is_dc ? deconv_done : conv_done;
  assign busy     = (lstate != L_IDLE);
  assign flush    = (lstate == L_FLUSH);
  assign irq      = done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate <= L_IDLE; load_start <= 1'b0; eng_start <= 1'b0; done <= 1'b0; cycles <= '0;
    end else begin
      load_start <= 1'b0;
      eng_start  <= 1'b0;
      done       <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      unique case (lstate)
        L_IDLE:  if (start) begin lstate <= L_LOAD; load_start <= 1'b1; cycles <= '0; end
        L_LOAD:  if (is_dc ? load_done1 : load_done0) begin lstate <= L_RUN; eng_start <= 1'b1; end
        L_RUN:   if (eng_done) lstate <= L_FLUSH;
        L_FLUSH: if (is_dc ? wr_idle1 : wr_idle0) begin lstate <= L_IDLE; done <= 1'b1; end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  // ---- shared input buffer
  logic                 ib_we0, ib_we1;
  logic [IB_AB-1:0]     ib_wa0, ib_wa1;
  logic signed [DW-1:0] ib_wd0 [WPB];
  logic signed [DW-1:0] ib_wd1 [WPB];
  logic                 ib_we;
  logic [IB_AB-1:0]     ib_wa;
  logic signed [DW-1:0] ib_wd [WPB];
  logic [IB_AB-1:0]     ib_ra [NRD];
  logic signed [DW-1:0] ib_rd [NRD];
  logic [IB_AB-1:0]     cv_ra [NRD];
  logic [IB_AB-1:0]     dc_ra [PV_DECONV];
  logic signed [DW-1:0] dc_rd [PV_DECONV];

  always_comb begin
    for (int n = 0; n < NRD; n++) ib_ra[n] = is_dc ? '0 : cv_ra[n];
    if (is_dc)
      for (int n = 0; n < PV_DECONV; n++) ib_ra[n] = dc_ra[n];
    for (int n = 0; n < PV_DECONV; n++) dc_rd[n] = ib_rd[n];
    ib_we = is_dc ? ib_we1 : ib_we0;
    ib_wa = is_dc ? ib_wa1 : ib_wa0;
    ib_wd = is_dc ? ib_wd1 : ib_wd0;
  end

  shared_input_buffer #(.DW(DW), .DEPTH(IB_D), .NR(NRD), .WPB(WPB)) u_ibuf (
    .clk,
    .wr_en(ib_we), .wr_addr(ib_wa), .wr_data(ib_wd),
    .rd_addr(ib_ra), .rd_data(ib_rd)
  );

  // ---- CONV and DMA 0
  logic                 cv_cvalid, cv_cready, cv_ovalid, cv_oready;
  logic signed [DW-1:0] cv_cdata, cv_odata;

  conv_module #(.DW(DW), .AW(AW), .FRAC(FRAC), .KC(3), .PV(PV_CONV), .PF(PF_CONV),
                .BH(BH), .BW(BW), .NCMAX(NCMAX)) u_conv (
    .clk, .rst_n, .cfg, .start(eng_start && !is_dc), .busy(conv_busy), .done(conv_done),
    .ib_raddr(cv_ra), .ib_rdata(ib_rd),
    .coef_valid(cv_cvalid), .coef_ready(cv_cready), .coef_data(cv_cdata),
    .out_valid(cv_ovalid), .out_ready(cv_oready), .out_data(cv_odata)
  );

  dma #(.DW(DW), .IB_AB(IB_AB)) u_dma0 (
    .clk, .rst_n, .cfg,
    .load_start(load_start && !is_dc), .load_done(load_done0),
    .coef_start(eng_start && !is_dc),
    .coef_valid(cv_cvalid), .coef_ready(cv_cready), .coef_data(cv_cdata),
    .res_valid(cv_ovalid), .res_ready(cv_oready), .res_data(cv_odata),
    .flush(flush && !is_dc), .wr_idle(wr_idle0),
    .ib_wr_en(ib_we0), .ib_wr_addr(ib_wa0), .ib_wr_data(ib_wd0),
    .mem_req_valid(m0_req_valid), .mem_req_ready(m0_req_ready), .mem_req_we(m0_req_we),
    .mem_req_addr(m0_req_addr), .mem_req_wdata(m0_req_wdata), .mem_req_id(m0_req_id),
    .mem_rsp_valid(m0_rsp_valid), .mem_rsp_id(m0_rsp_id), .mem_rsp_rdata(m0_rsp_rdata)
  );

  // ---- DECONV and DMA 1
  logic                 dc_cvalid, dc_cready, dc_ovalid, dc_oready;
  logic signed [DW-1:0] dc_cdata, dc_odata;

  deconv_module #(.DW(DW), .AW(AW), .FRAC(FRAC), .KMAX(KMAX), .PV(PV_DECONV),
                  .BH(BH), .BW(BW), .NCMAX(NCMAX)) u_deconv (
    .clk, .rst_n, .cfg, .start(eng_start && is_dc), .busy(deconv_busy), .done(deconv_done),
    .ib_raddr(dc_ra), .ib_rdata(dc_rd),
    .coef_valid(dc_cvalid), .coef_ready(dc_cready), .coef_data(dc_cdata),
    .out_valid(dc_ovalid), .out_ready(dc_oready), .out_data(dc_odata)
  );

  dma #(.DW(DW), .IB_AB(IB_AB)) u_dma1 (
    .clk, .rst_n, .cfg,
    .load_start(load_start && is_dc), .load_done(load_done1),
    .coef_start(eng_start && is_dc),
    .coef_valid(dc_cvalid), .coef_ready(dc_cready), .coef_data(dc_cdata),
    .res_valid(dc_ovalid), .res_ready(dc_oready), .res_data(dc_odata),
    .flush(flush && is_dc), .wr_idle(wr_idle1),
    .ib_wr_en(ib_we1), .ib_wr_addr(ib_wa1), .ib_wr_data(ib_wd1),
    .mem_req_valid(m1_req_valid), .mem_req_ready(m1_req_ready), .mem_req_we(m1_req_we),
    .mem_req_addr(m1_req_addr), .mem_req_wdata(m1_req_wdata), .mem_req_id(m1_req_id),
    .mem_rsp_valid(m1_rsp_valid), .mem_rsp_id(m1_rsp_id), .mem_rsp_rdata(m1_rsp_rdata)
  );

  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n) !(conv_busy && deconv_busy))
    else $error("cnn_accel_top: both units busy");
  a_pv: assert property (@(posedge clk) PV_DECONV <= NRD)
    else $error("cnn_accel_top: more DECONV kernels than input buffer read ports");
endmodule
