// Shared input buffer of the CONV and DECONV units.
//
// Holds one input block of every channel, DEPTH = N_C^max * B_H * B_W words
// of DW bits, addressed channel-major then row-major:
// addr = (c * h + y) * w + x. Layers never run at the same time, so one
// buffer serves both units and is sized once for the largest layer.
// One write port of WPB consecutive words (one memory beat from the DMA,
// words wr_addr .. wr_addr+WPB-1) and NR read ports with one cycle of latency (rd_data[n] is the word at rd_addr[n] of the previous cycle).
// Sharing and sizing follow the document; the port count and read latency
// are this design's choices.
module shared_input_buffer #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 128 * 64 * 64,
  parameter int unsigned NR    = 54,
  parameter int unsigned WPB   = 4,
  localparam int unsigned AB   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AB-1:0]        wr_addr,
  input  logic signed [DW-1:0] wr_data [WPB],
  input  logic [AB-1:0]        rd_addr [NR],
  output logic signed [DW-1:0] rd_data [NR]
);
  logic signed [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int n = 0; n < WPB; n++) mem[wr_addr + AB'(n)] <= wr_data[n];
    for (int n = 0; n < NR; n++) rd_data[n] <= mem[rd_addr[n]];
  end
endmodule
