// CONV computation unit: 3x3 convolution with optional 2x2 max pooling and crop.
//
// Runs one convolution layer (KC x KC kernel, stride 1, zero padding KC/2 so
// the output has the size of the input) on the block held in the shared
// input buffer. Filters are processed PF at a time (filter parallelism) and
// PV neighbouring output pixels of one row per cycle (data parallelism).
// For each filter group and each input channel the PF*KC*KC coefficients are
// first loaded from the coefficient stream (order: filter, kernel row,
// kernel column; groups and channels as in the loops), then every cycle one
// KC x (PV+KC-1) input window is read from the input buffer (one cycle read
// latency) and the PV*PF dot products are accumulated in the double output
// buffer, one buffer per parallel filter.
// When all channels are done the buffers swap and the results are streamed
// out while the next filter group is computed. Per filter the stream holds:
//   - the convolution map (minus `crop` pixels on every border when crop_en),
//     unless only pooling is enabled,
//   - the 2x2 max-pooled map (h/2 x w/2) when pool_en.
// With both enables a layer produces the copy for the skip connection and
// the pooled map for the next layer in one pass. Values are shifted by FRAC,
// clamped at zero when relu_en, and saturated to DW bits.
// Interface and timing as in deconv_module. Pooling and crop inside the
// convolution unit and the double buffer follow the document; the window
// scheme, stream formats and treatment of block borders as zero padding are
// this design's choices.
module conv_module
  import cnn_pkg::*;
#(
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = 2*DW + 8,
  parameter int unsigned FRAC  = 8,
  parameter int unsigned KC    = 3,
  parameter int unsigned PV    = 16,
  parameter int unsigned PF    = 4,
  parameter int unsigned BH    = 64,
  parameter int unsigned BW    = 64,
  parameter int unsigned NCMAX = 128,
  localparam int unsigned IB_AB = $clog2(NCMAX * BH * BW),
  localparam int unsigned WX    = PV + KC - 1,          // window width
  localparam int unsigned NRD   = KC * WX,              // input buffer read ports
  localparam int unsigned OBD   = BH * BW,
  localparam int unsigned OB_AB = $clog2(OBD)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  layer_cfg_t           cfg,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [IB_AB-1:0]     ib_raddr [NRD],
  input  logic signed [DW-1:0] ib_rdata [NRD],
  input  logic                 coef_valid,
  output logic                 coef_ready,
  input  logic signed [DW-1:0] coef_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data
);
  localparam int unsigned HALF = KC / 2;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_SWAP, S_FINISH} state_e;
  state_e state;

  logic [15:0] fg, c, y, x0;
  logic [15:0] ld_i;                 // coefficient being loaded
  logic [2:0]  drain;
  logic        wsel;
  logic [15:0] npf;                  // filters in the current group
  logic signed [DW-1:0] coef [PF][KC][KC];

  assign npf = (cfg.nf - fg < 16'(PF)) ? cfg.nf - fg : 16'(PF);
  assign coef_ready = (state == S_LOAD);

  wire last_x = (x0 + 16'(PV) >= cfg.w);
  wire last_y = (y == cfg.h - 1'b1);
  wire last_c = (c == cfg.nc - 1'b1);
  wire last_g = (fg + 16'(PF) >= cfg.nf);

  // ---- window addresses; out-of-block taps read as zero
  logic            st_valid, st_first;
  logic [15:0]     st_y, st_x0;
  logic [NRD-1:0]  st_zero;
  logic [NRD-1:0]  zero_now;

  always_comb begin
    for (int ry = 0; ry < KC; ry++)
      for (int cx = 0; cx < WX; cx++) begin
        automatic int yy = int'(y) + ry - HALF;
        automatic int xx = int'(x0) + cx - HALF;
        zero_now[ry*WX+cx] = (yy < 0) || (yy >= int'(cfg.h)) || (xx < 0) || (xx >= int'(cfg.w));
        ib_raddr[ry*WX+cx] = zero_now[ry*WX+cx] ? '0
                           : IB_AB'((int'(c) * int'(cfg.h) + yy) * int'(cfg.w) + xx);
      end
  end

  // ---- write-back state
  logic        wb_busy, wb_pool;     // wb_pool: streaming the pooled map
  logic [15:0] wb_q, wb_r, wb_c, wb_n;
  logic [15:0] full_lo, full_hi_r, full_hi_c;
  assign full_lo   = cfg.crop_en ? 16'(cfg.crop) : '0;
  assign full_hi_r = cfg.h - full_lo - 1'b1;
  assign full_hi_c = cfg.w - full_lo - 1'b1;
  wire   do_full   = cfg.crop_en || !cfg.pool_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      fg <= '0; c <= '0; y <= '0; x0 <= '0; ld_i <= '0; drain <= '0;
      wsel <= 1'b0; done <= 1'b0;
      st_valid <= 1'b0; st_first <= 1'b0; st_y <= '0; st_x0 <= '0; st_zero <= '0;
      wb_busy <= 1'b0; wb_pool <= 1'b0; wb_q <= '0; wb_r <= '0; wb_c <= '0; wb_n <= '0;
      for (int q = 0; q < PF; q++)
        for (int a = 0; a < KC; a++)
          for (int b = 0; b < KC; b++) coef[q][a][b] <= '0;
    end else begin
      done     <= 1'b0;
      st_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          fg <= '0; c <= '0; y <= '0; x0 <= '0; ld_i <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (coef_valid) begin
          coef[ld_i / (KC*KC)][(ld_i / KC) % KC][ld_i % KC] <= coef_data;
          if (ld_i == npf * 16'(KC*KC) - 1'b1) begin
            ld_i  <= '0;
            state <= S_RUN;
          end else ld_i <= ld_i + 1'b1;
        end
        S_RUN: begin
          st_valid <= 1'b1;
          st_first <= (c == '0);
          st_y     <= y;
          st_x0    <= x0;
          st_zero  <= zero_now;
          x0 <= last_x ? '0 : x0 + 16'(PV);
          if (last_x) begin
            y <= last_y ? '0 : y + 1'b1;
            if (last_y) begin
              if (last_c) begin
                c <= '0; drain <= '0; state <= S_DRAIN;
              end else begin
                c <= c + 1'b1; state <= S_LOAD;
              end
            end
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd3) state <= S_SWAP;
        end
        S_SWAP: if (!wb_busy) begin
          wsel    <= !wsel;
          wb_busy <= 1'b1;
          wb_n    <= npf;
          wb_q    <= '0;
          wb_pool <= !do_full;
          wb_r    <= do_full ? full_lo : '0;
          wb_c    <= do_full ? full_lo : '0;
          if (last_g) state <= S_FINISH;
          else begin
            fg <= fg + 16'(PF); state <= S_LOAD;
          end
        end
        S_FINISH: if (!wb_busy) begin
          done <= 1'b1; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // write-back walk: filter q; full map then pooled map
      if (wb_busy && out_ready) begin
        if (!wb_pool) begin
          if (wb_c == full_hi_c) begin
            wb_c <= full_lo;
            if (wb_r == full_hi_r) begin
              wb_r <= '0; wb_c <= '0;
              if (cfg.pool_en) wb_pool <= 1'b1;
              else if (wb_q == wb_n - 1'b1) wb_busy <= 1'b0;
              else begin wb_q <= wb_q + 1'b1; wb_r <= full_lo; wb_c <= full_lo; end
            end else wb_r <= wb_r + 1'b1;
          end else wb_c <= wb_c + 1'b1;
        end else begin
          if (wb_c == (cfg.w >> 1) - 1'b1) begin
            wb_c <= '0;
            if (wb_r == (cfg.h >> 1) - 1'b1) begin
              wb_r <= do_full ? full_lo : '0;
              wb_c <= do_full ? full_lo : '0;
              wb_pool <= !do_full;
              if (wb_q == wb_n - 1'b1) wb_busy <= 1'b0;
              else wb_q <= wb_q + 1'b1;
            end else wb_r <= wb_r + 1'b1;
          end else wb_c <= wb_c + 1'b1;
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

  // ---- PV x PF dot products (one cycle after the window read)
  logic signed [AW-1:0] dot [PF][PV];
  logic signed [DW-1:0] win [KC][WX];

  always_comb begin
    for (int ry = 0; ry < KC; ry++)
      for (int cx = 0; cx < WX; cx++)
        win[ry][cx] = st_zero[ry*WX+cx] ? '0 : ib_rdata[ry*WX+cx];
    for (int q = 0; q < PF; q++)
      for (int v = 0; v < PV; v++) begin
        dot[q][v] = '0;
        for (int a = 0; a < KC; a++)
          for (int b = 0; b < KC; b++)
            dot[q][v] = dot[q][v] + AW'(win[a][v+b] * coef[q][a][b]);
      end
  end

  // ACC stage registers
  logic                 a_valid, a_first;
  logic [15:0]          a_y, a_x0;
  logic signed [AW-1:0] a_dot [PF][PV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0; a_first <= 1'b0; a_y <= '0; a_x0 <= '0;
      for (int q = 0; q < PF; q++) for (int v = 0; v < PV; v++) a_dot[q][v] <= '0;
    end else begin
      a_valid <= st_valid;
      a_first <= st_first;
      a_y     <= st_y;
      a_x0    <= st_x0;
      a_dot   <= dot;
    end
  end

  // ---- one ping-pong output buffer per parallel filter; 4 read ports for pooling
  logic signed [AW-1:0] ob_rd [PF][4];
  logic [OB_AB-1:0]     ob_ra [4];
  logic [15:0]          py, px;

  assign py = wb_pool ? {wb_r[14:0], 1'b0} : wb_r;
  assign px = wb_pool ? {wb_c[14:0], 1'b0} : wb_c;
  always_comb begin
    ob_ra[0] = OB_AB'(32'(py) * cfg.w + px);
    ob_ra[1] = OB_AB'(32'(py) * cfg.w + px + 1);
    ob_ra[2] = OB_AB'(32'(py + 1'b1) * cfg.w + px);
    ob_ra[3] = OB_AB'(32'(py + 1'b1) * cfg.w + px + 1);
  end

  for (genvar q = 0; q < PF; q++) begin : g_filt
    logic [PV-1:0]        av, af;
    logic [OB_AB-1:0]     aa [PV];
    logic signed [AW-1:0] ad [PV];
    always_comb
      for (int v = 0; v < PV; v++) begin
        av[v] = a_valid && (16'(q) < npf) && (a_x0 + 16'(v) < cfg.w);
        af[v] = a_first;
        aa[v] = OB_AB'(32'(a_y) * cfg.w + a_x0 + v);
        ad[v] = a_dot[q][v];
      end
    output_buffer #(.AW(AW), .DEPTH(OBD), .NW(PV), .NR(4)) u_obuf (
      .clk, .wsel, .acc_valid(av), .acc_first(af), .acc_addr(aa), .acc_data(ad),
      .rd_addr(ob_ra), .rd_data(ob_rd[q])
    );
  end

  logic signed [AW-1:0] sel [4];
  logic signed [AW-1:0] wb_val;
  always_comb begin
    for (int n = 0; n < 4; n++) sel[n] = '0;
    for (int q = 0; q < PF; q++)
      if (16'(q) == wb_q) sel = ob_rd[q];
    wb_val = sel[0];
    if (wb_pool)
      for (int n = 1; n < 4; n++) if (sel[n] > wb_val) wb_val = sel[n];
  end

  assign out_valid = wb_busy;
  assign out_data  = DW'(quantize(128'(wb_val), FRAC, DW, cfg.relu_en));

  a_cfg: assert property (@(posedge clk) disable iff (!rst_n)
                          start |-> (cfg.h <= BH && cfg.w <= BW &&
                                    32'(cfg.nc) * cfg.h * cfg.w <= NCMAX * BH * BW &&
                                    (!cfg.pool_en || (!cfg.h[0] && !cfg.w[0]))))
    else $error("conv_module: layer exceeds the built sizes");
endmodule
