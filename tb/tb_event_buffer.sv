// tb_event_buffer: random writes and read-pointer advances against a queue
// model at the default depth of 256. Checks the registered read data at the
// read pointer, count, full, the overflow flag (set by a write into a full
// buffer, which is dropped) and the synchronous clear.
module tb_event_buffer;
  localparam int DEPTH = 256;

  logic clk = 0, reset = 1, clear = 0, wr_en = 0, adv = 0;
  logic [31:0] wr_ts, rd_ts;
  logic [15:0] wr_ev, rd_ev;
  logic [8:0]  count;
  logic        full, overflow;
  int checks = 0, failures = 0;
  logic [47:0] model [$];
  bit          model_ovf;
  int          n_full = 0, n_ovf = 0, n_wrap = 0;

  event_buffer dut (.clk, .reset, .clear, .wr_en, .wr_ts, .wr_ev, .adv,
                    .rd_ts, .rd_ev, .count, .full, .overflow);

  always #10 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask


  task automatic verify();
    check("count", 64'(count), 64'(model.size()));
    check("full", 64'(full), 64'(model.size() == DEPTH));
    check("overflow", 64'(overflow), 64'(model_ovf));
    if (model.size() > 0) begin
      check("rd_ts", 64'(rd_ts), 64'(model[0][47:16]));
      check("rd_ev", 64'(rd_ev), 64'(model[0][15:0]));
    end
  endtask

  int total_writes = 0;

  task automatic do_write(input logic [31:0] ts, input logic [15:0] ev);
    bit was_full = (model.size() == DEPTH);
    wr_en = 1; adv = 0; wr_ts = ts; wr_ev = ev;
    @(posedge clk); #1;
    wr_en = 0;
    if (was_full) begin model_ovf = 1; n_ovf++; end
    else begin model.push_back({ts, ev}); total_writes++; end
    @(posedge clk); #1;
    verify();
    if (model.size() == DEPTH) n_full++;
  endtask

  task automatic do_adv();
    adv = 1;
    @(posedge clk); #1;
    adv = 0;
    if (model.size() > 0) void'(model.pop_front());
    @(posedge clk); #1;
    verify();
  endtask

  initial begin
    model_ovf = 0;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    verify();
    // Fill to full and beyond.
    for (int i = 0; i < DEPTH + 3; i++) do_write($urandom, 16'($urandom));
    // Drain half, refill (pointers wrap), then random mix.
    for (int i = 0; i < DEPTH / 2; i++) do_adv();
    for (int i = 0; i < DEPTH / 2 + 10; i++) do_write($urandom, 16'($urandom));
    n_wrap++;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 1) == 0) do_write($urandom, 16'($urandom));
      else do_adv();
    end
    // Advance on empty is ignored.
    while (model.size() > 0) do_adv();
    do_adv();
    // Clear empties the buffer and the overflow flag.
    for (int i = 0; i < 5; i++) do_write($urandom, 16'($urandom));
    clear = 1; @(posedge clk); #1; clear = 0;
    model.delete(); model_ovf = 0;
    @(posedge clk); #1;
    verify();
    do_write(32'hCAFEF00D, 16'h0201);
    checks++;
    if (n_full == 0 || n_ovf == 0) begin failures++; $display("FAIL full/overflow never reached"); end
    $display("full seen %0d, overflow writes %0d", n_full, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
