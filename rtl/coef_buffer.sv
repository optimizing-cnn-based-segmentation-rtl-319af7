// Coefficient buffer of the deconvolution unit (FIFO of k*k words).
//
// The coefficients of one (filter, channel) kernel arrive from the DMA as a
// word stream in column-major order (column 0 rows 0..k-1, column 1, ...).
// Words are packed into k-word columns and queued; once k columns are held
// `full` rises and the stream is back-pressured. Each `pop` presents the
// head column on `col` and recirculates it to the tail, so the same kernel
// is reused for every input pixel of the channel (one column per cycle,
// k cycles per pixel). `clear` empties the buffer before the next kernel.
// Timing: `col` is the registered head column; it is valid whenever `full`
// is high and advances one column on the clock edge after `pop`.
// The k*k FIFO size and one-column-per-cycle reading follow the
// document; the column-major stream order and recirculation are this design's.
module coef_buffer #(
  parameter int unsigned DW   = 16,
  parameter int unsigned KMAX = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [7:0]               k,
  input  logic                     clear,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DW-1:0]     in_data,
  output logic                     full,
  input  logic                     pop,
  output logic signed [DW-1:0]     col [KMAX]
);
  localparam int unsigned CW = $clog2(KMAX + 1);

  logic signed [DW-1:0] mem [KMAX][KMAX];   // [column slot][row]
  logic [CW-1:0] ncols;                      // columns held
  logic [CW-1:0] row_i;                      // next row of the column being filled
  logic [CW-1:0] head;                       // slot of the head column

  assign full     = (ncols == CW'(k));
  assign in_ready = !full && !clear;
  assign col      = mem[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncols <= '0;
      row_i <= '0;
      head  <= '0;
      for (int c = 0; c < KMAX; c++)
        for (int r = 0; r < KMAX; r++) mem[c][r] <= '0;
    end else if (clear) begin
      ncols <= '0;
      row_i <= '0;
      head  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        mem[ncols][row_i] <= in_data;
        if (row_i == CW'(k - 1)) begin
          row_i <= '0;
          ncols <= ncols + 1'b1;
        end else begin
          row_i <= row_i + 1'b1;
        end
      end
      if (pop && full) head <= (head == CW'(k - 1)) ? '0 : head + 1'b1;
    end
  end

  a_pop_full: assert property (@(posedge clk) disable iff (!rst_n) pop |-> full)
    else $error("coef_buffer: pop while not full");
endmodule
