// Testbench of the coefficient buffer: loads k*k words column-major for
// several k, with gaps in the stream, checks that `full` rises after exactly
// k*k words, that the stream is then held off, that pops return columns
// 0..k-1 in order and wrap around, and that `clear` empties the buffer.
module tb_coef_buffer;
  localparam int DW = 16, KMAX = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: the asynchronous reset acts before the first clock
  always #5 clk = !clk;
  logic [7:0] k;
  logic clear, in_valid, in_ready, full, pop;
  logic signed [DW-1:0] in_data;
  logic signed [DW-1:0] col [KMAX];
  int checks = 0, failures = 0;

  coef_buffer #(.DW(DW), .KMAX(KMAX)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(input int kk);
    int kern [16];
    int sent = 0, cyc = 0;
    k = 8'(kk);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(!full, "not full after clear");
    foreach (kern[i]) kern[i] = $urandom % 30000;
    while (sent < kk*kk) begin
      in_valid = ($urandom % 3) != 0;
      in_data  = DW'(kern[sent]);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      @(negedge clk);
      cyc++;
      if (sent < kk*kk) check(!full, "full too early");
    end
    in_valid = 1;
    @(negedge clk);
    check(full, "full after k*k words");
    check(!in_ready, "stream held off when full");
    in_valid = 0;
    for (int n = 0; n < 3*kk; n++) begin
      for (int i = 0; i < kk; i++)
        check(col[i] == DW'(kern[(n % kk)*kk + i]), $sformatf("k=%0d pop %0d row %0d", kk, n, i));
      pop = 1; @(negedge clk); pop = 0;
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; pop = 0; in_data = 0; k = 2;
    repeat (2) @(negedge clk); rst_n = 1;
    run(2); run(4); run(3); run(2);
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
