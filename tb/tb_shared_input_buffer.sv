// Testbench of the shared input buffer: writes random beats of WPB words at
// random addresses, then reads every word back through all read ports and
// checks the data and the one-cycle read latency.
module tb_shared_input_buffer;
  localparam int DW = 16, DEPTH = 256, NR = 5, WPB = 4;
  localparam int AB = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = !clk;
  logic wr_en;
  logic [AB-1:0] wr_addr;
  logic signed [DW-1:0] wr_data [WPB];
  logic [AB-1:0] rd_addr [NR];
  logic signed [DW-1:0] rd_data [NR];
  int checks = 0, failures = 0;
  int model [DEPTH];

  shared_input_buffer #(.DW(DW), .DEPTH(DEPTH), .NR(NR), .WPB(WPB)) dut (.*);

  initial begin
    wr_en = 0; wr_addr = 0;
    foreach (wr_data[n]) wr_data[n] = 0;
    foreach (rd_addr[n]) rd_addr[n] = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a += WPB) begin
      wr_en = 1; wr_addr = AB'(a);
      for (int n = 0; n < WPB; n++) begin
        wr_data[n] = DW'($urandom);
        model[a+n] = int'(wr_data[n]);
      end
      @(negedge clk);
    end
    // overwrite a few beats at unaligned addresses
    for (int t = 0; t < 10; t++) begin
      automatic int a = $urandom % (DEPTH - WPB);
      wr_en = 1; wr_addr = AB'(a);
      for (int n = 0; n < WPB; n++) begin
        wr_data[n] = DW'($urandom);
        model[a+n] = int'(wr_data[n]);
      end
      @(negedge clk);
    end
    wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int want [NR];
      for (int n = 0; n < NR; n++) begin
        automatic int a = $urandom % DEPTH;
        rd_addr[n] = AB'(a);
        want[n] = model[a];
      end
      @(negedge clk);
      for (int n = 0; n < NR; n++) begin
        checks++;
        if (int'(rd_data[n]) != want[n]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d: %0d vs %0d", n, rd_data[n], want[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
