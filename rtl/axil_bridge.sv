// AXI4-Lite bridge with the layer register map.
//
// The processor configures a layer by writing the registers listed in
// cnn_pkg (mode and enables, N_C/N_F, block size, k/s/p/crop, the three
// memory base addresses) and then writes 1 to CTRL[0]; that write produces a
// one-cycle `start` pulse. STATUS reads busy in bit 0 and a sticky done flag
// in bit 1 (set by `done`, cleared by the next start). CYCLES returns the
// length of the last layer in clock cycles.
// Protocol: 32-bit AXI4-Lite slave; write address and data are accepted
// independently and answered with OKAY once both have arrived; reads answer
// one cycle after the address. Unmapped addresses read as zero, writes to
// them are ignored. Registers are written as whole words (wstrb is not used). The bridge and its role follow the document; the
// register map and timing are this design's.
module axil_bridge
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        awvalid,
  output logic        awready,
  input  logic [7:0]  awaddr,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  input  logic        arvalid,
  output logic        arready,
  input  logic [7:0]  araddr,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output layer_cfg_t  cfg,
  output logic        start,
  input  logic        busy,
  input  logic        done,
  input  logic [31:0] cycles
);
  logic        aw_have, w_have, done_flag;
  logic [7:0]  aw_q;
  logic [31:0] w_q;

  assign awready = !aw_have && !bvalid;
  assign wready  = !w_have && !bvalid;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign arready = !rvalid;

  function automatic logic [31:0] rd_reg(input logic [7:0] a);
    unique case (a)
      REG_STATUS:    return {30'd0, done_flag, busy};
      REG_MODE:      return {28'd0, cfg.relu_en, cfg.crop_en, cfg.pool_en, cfg.mode};
      REG_NC_NF:     return {cfg.nf, cfg.nc};
      REG_H_W:       return {cfg.w, cfg.h};
      REG_KSP:       return {cfg.crop, cfg.p, cfg.s, cfg.k};
      REG_IN_BASE:   return cfg.in_base;
      REG_COEF_BASE: return cfg.coef_base;
      REG_OUT_BASE:  return cfg.out_base;
      REG_CYCLES:    return cycles;
      default:       return 32'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0; w_have <= 1'b0; aw_q <= '0; w_q <= '0;
      bvalid <= 1'b0; rvalid <= 1'b0; rdata <= '0;
      cfg <= '0; start <= 1'b0; done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (awvalid && awready) begin aw_have <= 1'b1; aw_q <= awaddr; end
      if (wvalid && wready)   begin w_have  <= 1'b1; w_q  <= wdata;  end
      if (aw_have && w_have) begin
        aw_have <= 1'b0;
        w_have  <= 1'b0;
        bvalid  <= 1'b1;
        unique case (aw_q)
          REG_CTRL:      if (w_q[0] && !busy) begin start <= 1'b1; done_flag <= 1'b0; end
          REG_MODE:      {cfg.relu_en, cfg.crop_en, cfg.pool_en, cfg.mode} <= {w_q[3:1], mode_e'(w_q[0])};
          REG_NC_NF:     {cfg.nf, cfg.nc} <= w_q;
          REG_H_W:       {cfg.w, cfg.h} <= w_q;
          REG_KSP:       {cfg.crop, cfg.p, cfg.s, cfg.k} <= w_q;
          REG_IN_BASE:   cfg.in_base <= w_q;
          REG_COEF_BASE: cfg.coef_base <= w_q;
          REG_OUT_BASE:  cfg.out_base <= w_q;
          default: ;
        endcase
      end
      if (bvalid && bready) bvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        rdata  <= rd_reg(araddr);
      end else if (rvalid && rready) rvalid <= 1'b0;
    end
  end

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid)
    else $error("axil_bridge: bvalid dropped before bready");
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata))
    else $error("axil_bridge: read data changed before rready");
endmodule
