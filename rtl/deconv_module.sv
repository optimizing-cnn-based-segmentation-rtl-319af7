// DECONV computation unit.
//
// Runs one deconvolution layer on the input block held in the shared input
// buffer, following the two nested loops of the layer (filters outside,
// channels inside). For each (filter f, channel c) it
//   1. clears the coefficient buffer and loads the k*k kernel from the
//      coefficient stream (column-major, kernels ordered f-major, c-minor),
//   2. walks the input rows and columns; every pixel takes k steps, one per
//      kernel column, and is fed to a deconv_kernel,
//   3. accumulates the kernel outputs of all channels in the output buffer
//      (the first channel writes, later ones add).
// When a filter is complete its output bank is swapped and streamed out
// (rows and columns p .. H_O-p-1 of H_O = s*(h-1)+k, i.e. the border of size
// p is removed, then quantized) while the next filter is computed into the
// other bank.
// Data parallelism: PV kernels share the coefficient column and work on PV
// input rows at once (rows r, r+1, .. of a row group). Neighbouring rows
// only stay independent when k == s (no overlap, the U-Net case); for s < k
// a single kernel runs so the row overlap stays inside its partial result
// buffer. Filter parallelism is 1, as in the evaluated configurations.
// With k = s = 1 the layer is a 1x1 convolution, which is how the final
// 1x1 layer of a U-Net is run on this unit.
// Interface: cfg must hold still from start until done. The input buffer
// read ports have one cycle of latency. out_valid/out_ready/out_data is the
// result word stream, one word per cycle. done pulses for one cycle.
// Loop order, kernel structure and double buffer follow the document;
// the row-group lane split and stream formats are this design's choices.
module deconv_module
  import cnn_pkg::*;
#(
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = 2*DW + 8,
  parameter int unsigned FRAC  = 8,
  parameter int unsigned KMAX  = 2,
  parameter int unsigned PV    = 16,
  parameter int unsigned BH    = 64,
  parameter int unsigned BW    = 64,
  parameter int unsigned NCMAX = 128,
  localparam int unsigned IB_AB = $clog2(NCMAX * BH * BW),
  localparam int unsigned OBD   = KMAX * BH * KMAX * BW,
  localparam int unsigned OB_AB = $clog2(OBD)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  layer_cfg_t           cfg,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // shared input buffer read ports
  output logic [IB_AB-1:0]     ib_raddr [PV],
  input  logic signed [DW-1:0] ib_rdata [PV],
  // coefficient word stream
  input  logic                 coef_valid,
  output logic                 coef_ready,
  input  logic signed [DW-1:0] coef_data,
  // result word stream
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data
);
  typedef enum logic [2:0] {S_IDLE, S_CLR, S_LOAD, S_RUN, S_DRAIN, S_SWAP, S_FINISH} state_e;
  state_e state;

  logic [15:0] f, c, rb, cc;
  logic [7:0]  j;
  logic [2:0]  drain;
  logic [15:0] nl;                 // active lanes
  logic [15:0] ho, wo;             // full output size
  logic        wsel;

  assign nl = (cfg.k == cfg.s) ? 16'(PV) : 16'd1;
  assign ho = 16'(cfg.s) * (cfg.h - 1'b1) + 16'(cfg.k);
  assign wo = 16'(cfg.s) * (cfg.w - 1'b1) + 16'(cfg.k);

  // ---- coefficient buffer
  logic                 cb_full, cb_pop, cb_clear, coef_ready_i;
  logic signed [DW-1:0] cb_col [KMAX];

  assign cb_clear = (state == S_CLR);
  assign cb_pop   = (state == S_RUN);

  coef_buffer #(.DW(DW), .KMAX(KMAX)) u_coef (
    .clk, .rst_n, .k(cfg.k), .clear(cb_clear),
    .in_valid(coef_valid && state == S_LOAD), .in_ready(coef_ready_i), .in_data(coef_data),
    .full(cb_full), .pop(cb_pop), .col(cb_col)
  );
  assign coef_ready = coef_ready_i && (state == S_LOAD);

  // ---- step issue (input buffer address), registered step for the kernels
  logic                 st_valid, st_first;
  logic [PV-1:0]        st_lane;
  logic [7:0]           st_j;
  logic [15:0]          st_rb, st_cc;
  logic signed [DW-1:0] st_col [KMAX];
  logic [1:0]           first_d;

  always_comb
    for (int v = 0; v < PV; v++)
      ib_raddr[v] = IB_AB'((32'(c) * cfg.h + rb + 16'(v)) * cfg.w + cc);

  wire last_j  = (j == cfg.k - 1'b1);
  wire last_cc = (cc == cfg.w - 1'b1);
  wire last_rb = (rb + nl >= cfg.h);
  wire last_c  = (c == cfg.nc - 1'b1);
  wire last_f  = (f == cfg.nf - 1'b1);

  // ---- write-back
  logic        wb_busy;
  logic [15:0] wb_r, wb_c;
  logic [OB_AB-1:0]     ob_raddr [1];
  logic signed [AW-1:0] ob_rdata [1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      f <= '0; c <= '0; rb <= '0; cc <= '0; j <= '0;
      drain <= '0; wsel <= 1'b0; done <= 1'b0;
      st_valid <= 1'b0; st_first <= 1'b0; st_lane <= '0; st_j <= '0;
      st_rb <= '0; st_cc <= '0;
      for (int i = 0; i < KMAX; i++) st_col[i] <= '0;
      wb_busy <= 1'b0; wb_r <= '0; wb_c <= '0;
    end else begin
      done     <= 1'b0;
      st_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f <= '0; c <= '0; rb <= '0; cc <= '0; j <= '0;
          state <= S_CLR;
        end
        S_CLR:  state <= S_LOAD;
        S_LOAD: if (cb_full) state <= S_RUN;
        S_RUN: begin
          st_valid <= 1'b1;
          st_first <= (c == '0);
          st_j     <= j;
          st_rb    <= rb;
          st_cc    <= cc;
          st_col   <= cb_col;
          for (int v = 0; v < PV; v++)
            st_lane[v] <= (16'(v) < nl) && (rb + 16'(v) < cfg.h);
          j <= last_j ? '0 : j + 1'b1;
          if (last_j) begin
            cc <= last_cc ? '0 : cc + 1'b1;
            if (last_cc) begin
              rb <= last_rb ? '0 : rb + nl;
              if (last_rb) begin
                if (last_c) begin
                  c     <= '0;
                  drain <= '0;
                  state <= S_DRAIN;
                end else begin
                  c     <= c + 1'b1;
                  state <= S_CLR;
                end
              end
            end
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd5) state <= S_SWAP;
        end
        S_SWAP: if (!wb_busy) begin
          wsel    <= !wsel;
          wb_busy <= 1'b1;
          wb_r    <= 16'(cfg.p);
          wb_c    <= 16'(cfg.p);
          if (last_f) state <= S_FINISH;
          else begin
            f     <= f + 1'b1;
            state <= S_CLR;
          end
        end
        S_FINISH: if (!wb_busy) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      if (wb_busy && out_ready) begin
        if (wb_c == wo - 16'(cfg.p) - 1'b1) begin
          wb_c <= 16'(cfg.p);
          if (wb_r == ho - 16'(cfg.p) - 1'b1) wb_busy <= 1'b0;
          else                                wb_r <= wb_r + 1'b1;
        end else begin
          wb_c <= wb_c + 1'b1;
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

  // ---- deconvolution kernels
  logic [KMAX-1:0]      kv   [PV];
  logic [15:0]          krow [PV];
  logic [15:0]          kcol [PV];
  logic signed [AW-1:0] kval [PV][KMAX];

  for (genvar v = 0; v < PV; v++) begin : g_lane
    deconv_kernel #(.DW(DW), .AW(AW), .KMAX(KMAX), .WMAX(BW)) u_kernel (
      .clk, .rst_n, .k(cfg.k), .s(cfg.s), .h(cfg.h), .w(cfg.w),
      .in_valid(st_valid && st_lane[v]), .in_x(ib_rdata[v]), .in_col(st_col),
      .in_j(st_j), .in_r(st_rb + 16'(v)), .in_c(st_cc),
      .out_valid(kv[v]), .out_row0(krow[v]), .out_colx(kcol[v]), .out_val(kval[v])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_d <= '0;
    else        first_d <= {first_d[0], st_first};
  end

  // ---- ACC: channel accumulation into the ping-pong output buffer
  logic [PV*KMAX-1:0]   acc_valid, acc_first;
  logic [OB_AB-1:0]     acc_addr [PV*KMAX];
  logic signed [AW-1:0] acc_data [PV*KMAX];

  always_comb
    for (int v = 0; v < PV; v++)
      for (int i = 0; i < KMAX; i++) begin
        acc_valid[v*KMAX+i] = kv[v][i];
        acc_first[v*KMAX+i] = first_d[1];
        acc_addr [v*KMAX+i] = OB_AB'(32'(krow[v] + 16'(i)) * wo + kcol[v]);
        acc_data [v*KMAX+i] = kval[v][i];
      end

  assign ob_raddr[0] = OB_AB'(32'(wb_r) * wo + wb_c);

  output_buffer #(.AW(AW), .DEPTH(OBD), .NW(PV*KMAX), .NR(1)) u_obuf (
    .clk, .wsel, .acc_valid, .acc_first, .acc_addr, .acc_data,
    .rd_addr(ob_raddr), .rd_data(ob_rdata)
  );

  assign out_valid = wb_busy;
  assign out_data  = DW'(quantize(128'(ob_rdata[0]), FRAC, DW, cfg.relu_en));

  a_cfg: assert property (@(posedge clk) disable iff (!rst_n)
                          start |-> (cfg.h <= BH && cfg.w <= BW &&
                                    32'(cfg.nc) * cfg.h * cfg.w <= NCMAX * BH * BW && cfg.k <= KMAX))
    else $error("deconv_module: layer exceeds the built sizes");
endmodule
