// Ping-pong output buffer with accumulate-on-write (the ACC stage).
//
// Two banks of DEPTH words of AW bits. The computation unit writes bank
// `wsel`; the write-back logic reads the other bank, so the result of one
// filter is transferred to memory while the next filter is computed.
// Each of the NW accumulate ports does, in one clock edge,
//   bank[wsel][addr] <= (first ? 0 : bank[wsel][addr]) + data
// which sums the contributions of the input channels (`first` marks the
// first channel). The NR read ports are combinational reads of bank !wsel.
// The double buffer and channel accumulation follow the document; the port
// counts and asynchronous read are this design's choices. Ports must not
// write the same address in the same cycle.
module output_buffer #(
  parameter int unsigned AW    = 40,
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned NW    = 2,
  parameter int unsigned NR    = 1,
  localparam int unsigned AB   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 wsel,
  input  logic [NW-1:0]        acc_valid,
  input  logic [NW-1:0]        acc_first,
  input  logic [AB-1:0]        acc_addr [NW],
  input  logic signed [AW-1:0] acc_data [NW],
  input  logic [AB-1:0]        rd_addr  [NR],
  output logic signed [AW-1:0] rd_data  [NR]
);
  logic signed [AW-1:0] bank0 [DEPTH];
  logic signed [AW-1:0] bank1 [DEPTH];

  always_ff @(posedge clk) begin
    for (int n = 0; n < NW; n++) begin
      if (acc_valid[n]) begin
        if (wsel) bank1[acc_addr[n]] <= (acc_first[n] ? '0 : bank1[acc_addr[n]]) + acc_data[n];
        else      bank0[acc_addr[n]] <= (acc_first[n] ? '0 : bank0[acc_addr[n]]) + acc_data[n];
      end
    end
  end

  always_comb
    for (int n = 0; n < NR; n++) rd_data[n] = wsel ? bank0[rd_addr[n]] : bank1[rd_addr[n]];
endmodule
