// DMA engine between external memory and one computation unit.
//
// Three channels share one memory port:
//   - load:   on load_start, reads the input block (nc*h*w words, packed
//             WPB per beat from in_base) and writes it beat by beat into the
//             shared input buffer; load_done pulses after the last beat;
//   - coef:   after coef_start, reads beats from coef_base onwards on demand
//             and presents them as a word stream (coef_valid/ready/data);
//   - result: packs the result word stream into beats and writes them to
//             consecutive beats from out_base; `flush` writes a last partial
//             beat; wr_idle is high when nothing is left to write.
// Memory port: request valid/ready with write enable, beat address, write
// data and a read id; read responses return in request order with their id,
// one beat per cycle, and cannot be stalled. Writes get no response.
// Priority: result writes, then the block load, then coefficients; at most
// one coefficient beat is in flight.
// The DMAs' role (fill the shared input buffer, stream coefficients, return
// results) follows the document; this protocol and the packing are this
// design's choices.
module dma
  import cnn_pkg::*;
#(
  parameter int unsigned DW    = 16,
  parameter int unsigned IB_AB = 20,
  localparam int unsigned WPB  = MEM_W / DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  layer_cfg_t           cfg,
  input  logic                 load_start,
  output logic                 load_done,
  input  logic                 coef_start,
  output logic                 coef_valid,
  input  logic                 coef_ready,
  output logic signed [DW-1:0] coef_data,
  input  logic                 res_valid,
  output logic                 res_ready,
  input  logic signed [DW-1:0] res_data,
  input  logic                 flush,
  output logic                 wr_idle,
  // shared input buffer write port
  output logic                 ib_wr_en,
  output logic [IB_AB-1:0]     ib_wr_addr,
  output logic signed [DW-1:0] ib_wr_data [WPB],
  // external memory port
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic                 mem_req_we,
  output logic [ADDR_W-1:0]    mem_req_addr,
  output logic [MEM_W-1:0]     mem_req_wdata,
  output logic [ID_W-1:0]      mem_req_id,
  input  logic                 mem_rsp_valid,
  input  logic [ID_W-1:0]      mem_rsp_id,
  input  logic [MEM_W-1:0]     mem_rsp_rdata
);
  localparam logic [ID_W-1:0] ID_LOAD = ID_W'(0);
  localparam logic [ID_W-1:0] ID_COEF = ID_W'(1);
  localparam int unsigned WB = $clog2(WPB + 1);

  // ---- load channel
  logic        ld_active;
  logic [31:0] ld_beats, ld_req, ld_rsp;
  // ---- coef channel
  logic              cf_active, cf_pend, cf_have;
  logic [31:0]       cf_ptr;
  logic [MEM_W-1:0]  cf_beat;
  logic [WB-1:0]     cf_idx;
  // ---- result channel
  logic              rs_pend;       // a full (or flushed) beat waits for the port
  logic [MEM_W-1:0]  rs_beat;
  logic [WB-1:0]     rs_cnt;
  logic [31:0]       rs_ptr;

  // arbitration
  logic want_wr, want_ld, want_cf;
  assign want_wr = rs_pend;
  assign want_ld = ld_active && (ld_req != ld_beats);
  assign want_cf = cf_active && !cf_have && !cf_pend;

  always_comb begin
    mem_req_valid = want_wr || want_ld || want_cf;
    mem_req_we    = want_wr;
    mem_req_wdata = rs_beat;
    mem_req_id    = want_ld ? ID_LOAD : ID_COEF;
    if (want_wr)      mem_req_addr = cfg.out_base + rs_ptr;
    else if (want_ld) mem_req_addr = cfg.in_base + ld_req;
    else              mem_req_addr = cfg.coef_base + cf_ptr;
  end
  wire grant    = mem_req_valid && mem_req_ready;
  wire grant_wr = grant && want_wr;
  wire grant_ld = grant && !want_wr && want_ld;
  wire grant_cf = grant && !want_wr && !want_ld;

  assign coef_valid = cf_have;
  assign coef_data  = DW'(cf_beat >> (cf_idx * DW));
  assign res_ready  = !rs_pend;
  assign wr_idle    = !rs_pend && (rs_cnt == '0);

  assign ib_wr_en   = mem_rsp_valid && (mem_rsp_id == ID_LOAD);
  assign ib_wr_addr = IB_AB'(ld_rsp * WPB);
  always_comb
    for (int n = 0; n < WPB; n++) ib_wr_data[n] = DW'(mem_rsp_rdata >> (n * DW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_active <= 1'b0; ld_beats <= '0; ld_req <= '0; ld_rsp <= '0; load_done <= 1'b0;
      cf_active <= 1'b0; cf_pend <= 1'b0; cf_have <= 1'b0; cf_ptr <= '0; cf_beat <= '0; cf_idx <= '0;
      rs_pend <= 1'b0; rs_beat <= '0; rs_cnt <= '0; rs_ptr <= '0;
    end else begin
      load_done <= 1'b0;
      // load
      if (load_start) begin
        ld_active <= 1'b1;
        ld_beats  <= (32'(cfg.nc) * cfg.h * cfg.w + WPB - 1) / WPB;
        ld_req    <= '0;
        ld_rsp    <= '0;
        rs_ptr    <= '0;
      end else begin
        if (grant_ld) ld_req <= ld_req + 1'b1;
        if (ib_wr_en) begin
          ld_rsp <= ld_rsp + 1'b1;
          if (ld_rsp + 1'b1 == ld_beats) begin
            ld_active <= 1'b0;
            load_done <= 1'b1;
          end
        end
      end
      // coefficients
      if (coef_start) begin
        cf_active <= 1'b1; cf_ptr <= '0; cf_have <= 1'b0; cf_idx <= '0;
      end else begin
        if (grant_cf) begin cf_pend <= 1'b1; cf_ptr <= cf_ptr + 1'b1; end
        if (mem_rsp_valid && mem_rsp_id == ID_COEF) begin
          cf_pend <= 1'b0; cf_have <= 1'b1; cf_beat <= mem_rsp_rdata; cf_idx <= '0;
        end
        if (coef_valid && coef_ready) begin
          if (cf_idx == WB'(WPB - 1)) begin cf_have <= 1'b0; cf_idx <= '0; end
          else cf_idx <= cf_idx + 1'b1;
        end
      end
      if (flush && !load_start) cf_active <= 1'b0;
      // results
      if (grant_wr) begin
        rs_pend <= 1'b0;
        rs_ptr  <= rs_ptr + 1'b1;
        rs_cnt  <= '0;
      end
      if (res_valid && res_ready) begin
        rs_beat[rs_cnt*DW +: DW] <= res_data;
        rs_cnt <= rs_cnt + 1'b1;
        if (rs_cnt == WB'(WPB - 1)) rs_pend <= 1'b1;
      end else if (flush && !rs_pend && rs_cnt != '0) begin
        rs_pend <= 1'b1;
      end
    end
  end

  a_no_grant_on_pending: assert property (@(posedge clk) disable iff (!rst_n)
                                          mem_req_valid && !mem_req_ready |=> mem_req_valid)
    else $error("dma: request withdrawn before it was accepted");
endmodule
