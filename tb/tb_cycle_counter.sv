// tb_cycle_counter: checks reset to zero, one count per cycle at the
// default 32-bit width, and wrap-around on a 4-bit instance.
module tb_cycle_counter;
  logic clk = 0, reset = 1;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;

  cycle_counter dut (.clk, .reset, .count);
  cycle_counter #(.WIDTH(4)) dut4 (.clk, .reset, .count(count4));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++; if (count !== 0 || count4 !== 0) begin failures++; $display("FAIL reset"); end
    reset = 0;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk); #1;
      checks++;
      if (count !== 32'(i)) begin failures++; $display("FAIL count %0d exp %0d", count, i); end
      checks++;
      if (count4 !== 4'(i % 16)) begin failures++; $display("FAIL count4 %0d exp %0d", count4, i % 16); end
    end
    reset = 1;
    @(posedge clk); #1;
    checks++; if (count !== 0) begin failures++; $display("FAIL re-reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
