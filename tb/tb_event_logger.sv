// tb_event_logger: exercises the six-register Avalon-MM interface of the
// event logger the way driver software does, and checks every read against
// a model: timestamps equal to the cycle of the EVENT_WRITE, event words,
// STATUS bits, read-pointer advance, deadline misses (including the exact
// boundary), CONTROL clear-missed and clear-all, buffer full, overflow
// (events at a full buffer are dropped and do not reach the deadline
// monitor), DEADLINE = 0, and the one-cycle read latency.
module tb_event_logger;
  import profiler_pkg::*;

  logic clk = 0, reset = 1;
  logic [2:0]  avs_address = 0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  task_id_t    current_task_id;
  logic        deadline_missed;
  logic [31:0] deadline_cycles, cycle_count;
  int checks = 0, failures = 0;

  event_logger dut (.clk, .reset, .avs_address, .avs_read, .avs_write, .avs_writedata,
                    .avs_readdata, .current_task_id, .deadline_missed,
                    .deadline_cycles, .cycle_count);

  always #10 clk = ~clk;

  // Reference time: cycles since the last reset edge, counted by the bench.
  logic [31:0] now;
  always_ff @(posedge clk) now <= reset ? 32'd0 : now + 1;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model
  logic [47:0] q [$];
  bit m_ovf, m_missed, m_out;
  logic [31:0] m_start, m_deadline;
  task_id_t m_task;
  int n_events = 0, n_miss = 0, n_full = 0, n_ovf = 0, n_drain = 0;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------------ bus
  task automatic bus_write(input logic [2:0] a, input logic [31:0] d, output logic [31:0] t);
    avs_address = a; avs_writedata = d; avs_write = 1;
    t = now;
    @(posedge clk); #1;
    avs_write = 0;
  endtask

  task automatic bus_read(input logic [2:0] a, output logic [31:0] d);
    avs_address = a; avs_read = 1;
    @(posedge clk); #1;
    avs_read = 0;
    d = avs_readdata;       // valid in the cycle after the read
  endtask

  task automatic log_event(input logic [7:0] t, input task_id_t id);
    logic [31:0] ts;
    bus_write(REG_EVENT_WRITE, {16'h0, t, id}, ts);
    if (q.size() == 256) begin m_ovf = 1; n_ovf++; return; end
    q.push_back({ts, t, id});
    n_events++;
    if (q.size() == 256) n_full++;
    if (t == EVT_TASK_START) begin m_task = id; m_start = ts; m_out = 1; end
    else if (t == EVT_TASK_END) begin
      if (m_out && m_deadline != 0 && (ts - m_start) > m_deadline) begin m_missed = 1; n_miss++; end
      m_out = 0;
    end
  endtask

  task automatic set_deadline(input logic [31:0] d);
    logic [31:0] t;
    bus_write(REG_DEADLINE, d, t);
    m_deadline = d;
  endtask

  task automatic control(input logic [31:0] d);
    logic [31:0] t;
    bus_write(REG_CONTROL, d, t);
    if (d[0]) begin q.delete(); m_ovf = 0; m_missed = 0; m_out = 0; m_task = 0; end
    if (d[1]) m_missed = 0;
  endtask

  task automatic check_status();
    logic [31:0] s;
    bus_read(REG_STATUS, s);
    check("STATUS", 64'(s), 64'({13'b0, m_missed, q.size() == 256, m_ovf, 7'b0, 9'(q.size())}));
    check("conduit task", 64'(current_task_id), 64'(m_task));
    check("conduit missed", 64'(deadline_missed), 64'(m_missed));
  endtask

  task automatic drain(input int n);
    logic [31:0] d, t;
    for (int i = 0; i < n && q.size() > 0; i++) begin
      bus_read(REG_READ_TIMESTAMP, d);
      check("READ_TIMESTAMP", 64'(d), 64'(q[0][47:16]));
      bus_read(REG_READ_INFO, d);
      check("READ_INFO", 64'(d), 64'({16'h0, q[0][15:0]}));
      bus_write(REG_STATUS, 32'h1, t);
      void'(q.pop_front());
      n_drain++;
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [31:0] d, t;
    m_ovf = 0; m_missed = 0; m_out = 0; m_start = 0; m_deadline = 0; m_task = 0;
    repeat (3) @(posedge clk); #1;
    reset = 0;
    check_status();
    bus_read(REG_DEADLINE, d);
    check("write-only reads zero", 64'(d), 64'(0));

    // Read latency: STATUS reflects an event written in the previous cycle.
    log_event(EVT_TASK_START, 8'd7);
    bus_read(REG_STATUS, d);
    check("count after one write", 64'(d[8:0]), 64'(1));
    check("task id in next cycle", 64'(current_task_id), 64'(7));
    control(32'h1);
    check_status();

    // Boundary of the deadline check at the bus level: END written exactly
    // `deadline` cycles after START is on time, one cycle later is late.
    set_deadline(32'd40);
    log_event(EVT_TASK_START, 8'd1); idle(39); log_event(EVT_TASK_END, 8'd1);
    check_status();
    check("on time", 64'(deadline_missed), 64'(0));
    log_event(EVT_TASK_START, 8'd2); idle(40); log_event(EVT_TASK_END, 8'd2);
    check("late flag next cycle", 64'(deadline_missed), 64'(1));
    check_status();
    // Sticky until CONTROL[1]; clearing it keeps the buffer.
    log_event(EVT_TASK_START, 8'd3); log_event(EVT_TASK_END, 8'd3);
    check_status();
    control(32'h2);
    check_status();
    drain(3);
    check_status();

    // DEADLINE = 0 disables the monitor.
    set_deadline(32'd0);
    log_event(EVT_TASK_START, 8'd4); idle(300); log_event(EVT_TASK_END, 8'd4);
    check_status();

    // Random traffic with interleaved draining.
    set_deadline(32'd25);
    for (int i = 0; i < 600; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 35) log_event(EVT_TASK_START, 8'($urandom_range(0, 5)));
      else if (r < 70) log_event(EVT_TASK_END, 8'($urandom_range(0, 5)));
      else if (r < 75) log_event(8'($urandom_range(3, 255)), 8'($urandom));
      else if (r < 85) drain($urandom_range(1, 4));
      else if (r < 88) control(32'h2);
      else if (r < 95) idle($urandom_range(1, 30));
      else check_status();
    end
    check_status();
    drain(256);
    check_status();

    // Fill the buffer: full at 256, overflow on the 257th; an END arriving
    // at a full buffer is not seen by the monitor.
    control(32'h1);
    set_deadline(32'd5);
    log_event(EVT_TASK_START, 8'd9);
    for (int i = 0; i < 255; i++) log_event(8'h10, 8'(i));
    check_status();
    idle(20);
    log_event(EVT_TASK_END, 8'd9);          // dropped
    log_event(EVT_TASK_START, 8'd6);        // dropped
    check_status();
    check("dropped END not checked", 64'(deadline_missed), 64'(0));
    check("dropped START not taken", 64'(current_task_id), 64'(9));
    drain(1);
    log_event(EVT_TASK_END, 8'd9);          // accepted, late
    check_status();
    drain(256);
    check_status();
    control(32'h1);
    check_status();

    $display("events %0d misses %0d full %0d overflow %0d drained %0d",
             n_events, n_miss, n_full, n_ovf, n_drain);
    checks++;
    if (n_miss < 3 || n_full == 0 || n_ovf == 0 || n_drain < 100) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
