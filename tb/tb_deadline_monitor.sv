// tb_deadline_monitor: drives random TASK_START / TASK_END / other events
// with random gaps and deadlines and compares current_task_id,
// start_outstanding and the sticky deadline_missed flag with a model.
// Directed cases cover elapsed == deadline (no miss), deadline + 1 (miss),
// deadline 0 (disabled), an END with no START, clear_missed, clear_all and
// counter wrap-around between START and END. The miss must be visible in
// the cycle right after the TASK_END event.
module tb_deadline_monitor;
  import profiler_pkg::*;

  logic clk = 0, reset = 1, clear_all = 0, clear_missed = 0, ev_valid = 0;
  logic [7:0]  ev_type;
  task_id_t    ev_task, current_task_id;
  logic [31:0] cycle_count, deadline_cycles;
  logic        deadline_missed, start_outstanding;
  int checks = 0, failures = 0;

  // model
  task_id_t m_task;
  logic [31:0] m_start;
  bit m_out, m_missed;
  int n_miss_events = 0, n_ok_ends = 0, n_disabled = 0;

  deadline_monitor dut (.clk, .reset, .clear_all, .clear_missed, .ev_valid, .ev_type,
                        .ev_task, .cycle_count, .deadline_cycles, .current_task_id,
                        .deadline_missed, .start_outstanding);

  always #10 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic verify();
    check("current_task_id", 64'(current_task_id), 64'(m_task));
    check("start_outstanding", 64'(start_outstanding), 64'(m_out));
    check("deadline_missed", 64'(deadline_missed), 64'(m_missed));
  endtask

  // Let n cycles pass with the counter running.
  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk); #1;
      cycle_count = cycle_count + 1;
    end
  endtask

  task automatic event_(input logic [7:0] t, input task_id_t id);
    logic [31:0] el;
    ev_valid = 1; ev_type = t; ev_task = id;
    el = cycle_count - m_start;
    @(posedge clk); #1;
    ev_valid = 0;
    if (t == 8'h01) begin m_task = id; m_start = cycle_count; m_out = 1; end
    else if (t == 8'h02) begin
      if (m_out && deadline_cycles != 0 && el > deadline_cycles) begin
        m_missed = 1; n_miss_events++;
      end else n_ok_ends++;
      if (m_out && deadline_cycles == 0) n_disabled++;
      m_out = 0;
    end
    cycle_count = cycle_count + 1;
    verify();
  endtask

  task automatic clr(input bit all);
    clear_all = all; clear_missed = !all;
    @(posedge clk); #1;
    clear_all = 0; clear_missed = 0;
    cycle_count = cycle_count + 1;
    m_missed = 0;
    if (all) begin m_task = 0; m_out = 0; m_start = 0; end
    verify();
  endtask

  initial begin
    cycle_count = 32'd1000; deadline_cycles = 0; ev_type = 0; ev_task = 0;
    m_task = 0; m_start = 0; m_out = 0; m_missed = 0;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    verify();
    // exact boundary: elapsed == deadline is not a miss
    deadline_cycles = 50;
    event_(8'h01, 8'd1); idle(49); event_(8'h02, 8'd1);
    check("boundary equal no miss", 64'(deadline_missed), 64'(0));
    // elapsed == deadline + 1 is a miss, visible right after the END cycle
    event_(8'h01, 8'd2); idle(50); event_(8'h02, 8'd2);
    check("boundary +1 miss", 64'(deadline_missed), 64'(1));
    check("task id held after END", 64'(current_task_id), 64'(2));
    clr(0);
    // deadline 0 disables
    deadline_cycles = 0;
    event_(8'h01, 8'd3); idle(500); event_(8'h02, 8'd3);
    check("disabled", 64'(deadline_missed), 64'(0));
    // END with no START
    deadline_cycles = 1;
    idle(10); event_(8'h02, 8'd3);
    check("end without start", 64'(deadline_missed), 64'(0));
    // wrap of the cycle counter between START and END
    cycle_count = 32'hFFFF_FFF0; deadline_cycles = 20;
    event_(8'h01, 8'd4); idle(30); event_(8'h02, 8'd4);
    check("wrap miss", 64'(deadline_missed), 64'(1));
    clr(1);
    // random
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 3) deadline_cycles = $urandom_range(0, 3) == 0 ? 0 : $urandom_range(1, 40);
      if (r < 40) event_(8'h01, 8'($urandom_range(0, 9)));
      else if (r < 80) event_(8'h02, 8'($urandom_range(0, 9)));
      else if (r < 85) event_(8'($urandom_range(3, 255)), 8'($urandom));
      else if (r < 88) clr(0);
      else if (r < 89) clr(1);
      else if (r < 95) begin
        event_(8'h01, 8'($urandom_range(0, 9)));
        idle($urandom_range(0, 60));
        event_(8'h02, 8'($urandom_range(0, 9)));
      end else idle($urandom_range(1, 40));
    end
    $display("misses %0d, on-time ends %0d, disabled %0d", n_miss_events, n_ok_ends, n_disabled);
    checks++;
    if (n_miss_events < 3 || n_ok_ends < 3) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
