// Testbench of the ping-pong output buffer: accumulates random values with
// several ports into one bank (first write, then additions), swaps banks
// and reads the totals back while new data goes into the other bank, and
// checks that the banks do not disturb each other.
module tb_output_buffer;
  localparam int AW = 40, DEPTH = 64, NW = 3, NR = 2;
  localparam int AB = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = !clk;
  logic wsel;
  logic [NW-1:0] acc_valid, acc_first;
  logic [AB-1:0] acc_addr [NW];
  logic signed [AW-1:0] acc_data [NW];
  logic [AB-1:0] rd_addr [NR];
  logic signed [AW-1:0] rd_data [NR];
  int checks = 0, failures = 0;
  longint model [2][DEPTH];

  output_buffer #(.AW(AW), .DEPTH(DEPTH), .NW(NW), .NR(NR)) dut (.*);

  task automatic fill(input bit bank, input int passes);
    wsel = bank;
    for (int p = 0; p < passes; p++)
      for (int a = 0; a < DEPTH; a += NW) begin
        for (int n = 0; n < NW; n++) begin
          acc_valid[n] = (a + n < DEPTH);
          acc_first[n] = (p == 0);
          acc_addr[n]  = AB'(a + n);
          acc_data[n]  = AW'($signed($urandom % 2000) - 1000);
          if (acc_valid[n]) model[bank][a+n] = (p == 0 ? 0 : model[bank][a+n]) + acc_data[n];
        end
        @(negedge clk);
      end
    acc_valid = '0;
  endtask

  task automatic readback(input bit bank);
    wsel = !bank;   // the read ports see the bank not being written
    for (int a = 0; a < DEPTH; a += NR) begin
      for (int n = 0; n < NR; n++) rd_addr[n] = AB'((a + n) % DEPTH);
      #1;
      for (int n = 0; n < NR; n++) begin
        checks++;
        if (longint'(rd_data[n]) != model[bank][(a+n) % DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d: %0d vs %0d", bank, a+n, rd_data[n], model[bank][(a+n)%DEPTH]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    acc_valid = '0; acc_first = '0; wsel = 0;
    foreach (acc_addr[n]) begin acc_addr[n] = '0; acc_data[n] = '0; end
    foreach (rd_addr[n]) rd_addr[n] = '0;
    @(negedge clk);
    fill(0, 3);
    fill(1, 2);       // other bank
    readback(0);
    readback(1);
    fill(0, 1);       // first-channel write replaces old totals
    readback(0);
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
