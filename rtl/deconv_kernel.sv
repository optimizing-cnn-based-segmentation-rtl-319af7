// Parametrized deconvolution kernel: one pipeline of the DECONV unit.
//
// Implements deconvolution without inserting zeros into the input: every
// input pixel x(r,c) is multiplied by the k*k kernel and the products are
// summed where the k*k output tiles of neighbouring pixels overlap (tiles are
// placed s pixels apart, so k-s columns and k-s rows overlap).
//
// Each step one kernel column j (k coefficients, latched in the K coefficient
// registers together with the pixel) is multiplied by the pixel with k
// multipliers; multiplier i produces the term of output row s*r+i, output
// column s*c+j. A pixel therefore takes k steps, columns 0..k-1 in order.
//   Column overlap: each row's adder output is also pushed into a shift
//   register of k-s stages (the k*(k-s) register array), so the term of column
//   j+s of the previous pixel reaches the adder exactly when column j (< k-s)
//   of the current pixel is computed, and is added there.
//   Row overlap: rows i >= s of a finished column are not yet complete; they
//   are stored in the partial result buffer ((k-s) rows by the output width)
//   and added to rows i-s of the next input row.
// A value leaves the kernel (out_valid[i]) once no later pixel can add to it:
// columns j < s (or every column of the last pixel of a row) and rows i < s
// (or every row of the last input row). The ACC stage after the kernel sums
// the channels. Interface: in_* is one step (pixel, kernel column, position);
// out_* is registered two clock edges later with row s*r+i for slot i.
// k and s are run-time values with 1 <= s <= k <= KMAX. The adder output (not
// the raw product) feeds the shift register, so a column covered by three
// tiles (k > 2s) is summed as well; for k <= 2s this is the same as feeding
// the product.
// Structure (multipliers, register array, adders, partial result buffer,
// output select) follows the document; step order, widths and pipeline
// depth are this design's choices.
module deconv_kernel #(
  parameter int unsigned DW   = 16,
  parameter int unsigned AW   = 2*DW + 8,
  parameter int unsigned KMAX = 2,
  parameter int unsigned WMAX = 64      // largest input row width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            k,
  input  logic [7:0]            s,
  input  logic [15:0]           h,       // input rows of the block
  input  logic [15:0]           w,       // input columns of the block
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  in_x,
  input  logic signed [DW-1:0]  in_col [KMAX],
  input  logic [7:0]            in_j,    // kernel column of this step
  input  logic [15:0]           in_r,    // input row of the pixel
  input  logic [15:0]           in_c,    // input column of the pixel
  output logic [KMAX-1:0]       out_valid,
  output logic [15:0]           out_row0, // output row of slot 0 (= s*r)
  output logic [15:0]           out_colx, // output column (= s*c + j)
  output logic signed [AW-1:0]  out_val [KMAX]
);
  localparam int unsigned WOMAX = KMAX * WMAX;
  localparam int unsigned PRB_R = (KMAX > 1) ? KMAX - 1 : 1;
  localparam int unsigned DL    = (KMAX > 1) ? KMAX - 1 : 1;

  // ---- stage 0: K coefficient registers and pixel register
  logic                 v0;
  logic signed [DW-1:0] x0;
  logic signed [DW-1:0] kreg [KMAX];
  logic [7:0]           j0;
  logic [15:0]          r0, c0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0;
      x0 <= '0;
      j0 <= '0;
      r0 <= '0;
      c0 <= '0;
      for (int i = 0; i < KMAX; i++) kreg[i] <= '0;
    end else begin
      v0 <= in_valid;
      if (in_valid) begin
        x0   <= in_x;
        kreg <= in_col;
        j0   <= in_j;
        r0   <= in_r;
        c0   <= in_c;
      end
    end
  end

  // ---- stage 1: multipliers, overlap adders, register array, partial results
  logic signed [AW-1:0] dline [KMAX][DL];       // k*(k-s) register array (max size)
  logic signed [AW-1:0] prb   [PRB_R][WOMAX];   // partial result buffer

  logic [7:0]           kms;                    // k - s
  logic [15:0]          ocol;
  logic                 col_final, row_last, add_col;
  logic signed [AW-1:0] prod [KMAX];
  logic signed [AW-1:0] ssum [KMAX];            // after column overlap
  logic signed [AW-1:0] vsum [KMAX];            // after row overlap
  logic signed [AW-1:0] dtap [KMAX];

  always_comb begin
    kms       = k - s;
    ocol      = 16'(s) * c0 + 16'(j0);
    col_final = (j0 < s) || (c0 == w - 1'b1);
    row_last  = (r0 == h - 1'b1);
    add_col   = (j0 < kms) && (c0 != '0);
    for (int i = 0; i < KMAX; i++) begin
      prod[i] = AW'(x0 * kreg[i]);
      dtap[i] = (kms != 0) ? dline[i][kms - 1'b1] : '0;
      ssum[i] = prod[i] + (add_col ? dtap[i] : '0);
      vsum[i] = ssum[i];
      if ((8'(i) < kms) && (r0 != '0)) vsum[i] = ssum[i] + prb[i][ocol];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_row0  <= '0;
      out_colx  <= '0;
      for (int i = 0; i < KMAX; i++) begin
        out_val[i] <= '0;
        for (int d = 0; d < DL; d++) dline[i][d] <= '0;
      end
    end else begin
      out_valid <= '0;
      if (v0) begin
        out_row0 <= 16'(s) * r0;
        out_colx <= ocol;
        for (int i = 0; i < KMAX; i++) begin
          dline[i][0] <= ssum[i];
          for (int d = 1; d < DL; d++) dline[i][d] <= dline[i][d-1];
          out_val[i] <= vsum[i];
          if (8'(i) < k && col_final) begin
            if ((8'(i) < s) || row_last) out_valid[i] <= 1'b1;
            else                         prb[i - s][ocol] <= vsum[i];
          end
        end
      end
    end
  end

  a_stride: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid |-> (s != 0 && s <= k && k <= KMAX))
    else $error("deconv_kernel: unsupported k/s");
endmodule
