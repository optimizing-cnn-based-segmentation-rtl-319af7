// Behavioural model of the external DDR memory behind the two DMA ports.
//
// One array of 64-bit beats shared by both ports. Each port accepts a request
// when its ready is high (ready is randomly withheld about one cycle in
// STALL_PCT percent to exercise back-pressure); writes update the array at
// once, reads return in order LAT cycles later with the request id, one
// response per port per cycle. Testbenches fill and inspect `mem` directly.
module ddr_model #(
  parameter int DEPTH     = 65536,
  parameter int LAT       = 6,
  parameter int STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        req_valid [2],
  output logic        req_ready [2],
  input  logic        req_we    [2],
  input  logic [31:0] req_addr  [2],
  input  logic [63:0] req_wdata [2],
  input  logic [1:0]  req_id    [2],
  output logic        rsp_valid [2],
  output logic [1:0]  rsp_id    [2],
  output logic [63:0] rsp_rdata [2]
);
  logic [63:0] mem [DEPTH];
  typedef struct { longint due; logic [1:0] id; logic [63:0] data; } rsp_t;
  rsp_t q [2][$];
  longint now = 0;
  int stalls = 0;

  initial for (int p = 0; p < 2; p++) begin req_ready[p] = 1'b1; rsp_valid[p] = 1'b0; end

  always @(posedge clk) begin
    now++;
    for (int p = 0; p < 2; p++) begin
      rsp_t r;
      if (req_valid[p] && req_ready[p]) begin
        if (req_we[p]) mem[req_addr[p] % DEPTH] <= req_wdata[p];
        else begin
          r.due = now + LAT; r.id = req_id[p]; r.data = mem[req_addr[p] % DEPTH];
          q[p].push_back(r);
        end
      end
      if (q[p].size() > 0 && q[p][0].due <= now) begin
        r = q[p].pop_front();
        rsp_valid[p] <= 1'b1; rsp_id[p] <= r.id; rsp_rdata[p] <= r.data;
      end else rsp_valid[p] <= 1'b0;
      req_ready[p] <= ($urandom % 100) >= STALL_PCT;
      if (req_valid[p] && !req_ready[p]) stalls++;
    end
  end
endmodule
