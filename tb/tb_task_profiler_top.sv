// tb_task_profiler_top: end-to-end test of the profiler at its default
// parameters, driven over the Avalon-MM port the way the driver software
// does, with every VGA pixel of every cycle compared against a reference
// renderer that follows the bench's own model of the logger state.
//
// Phases:
//  A  the two-thread measurement run: clear all, DEADLINE = 100,000 cycles
//     (2 ms), task 1 runs 292 cycles every 5,000 cycles and task 2 runs 1,372
//     cycles every 10,000 cycles (periods shortened from 500 ms and 1 s),
//     ten runs each = 40 events; then drain and check 40 entries, exact
//     execution times and periods, no overflow, no miss.
//  B  one whole frame with task 1 shown, so the centred digit is drawn.
//  C  a deadline miss (red flash, both shades), CONTROL[1] clear.
//  D  background colours of ids 0, 3, 4 and 12 (no digit).
//  E  DEADLINE = 0 disables the monitor.
//  F  fill to 256 entries, overflow, drain, CONTROL[0] clear all.
// Each mechanism is counted and must occur at least once.
module tb_task_profiler_top;
  import profiler_pkg::*;
  import glyph_ref_pkg::*;

  logic clk = 0, reset = 1;
  logic [2:0]  avs_address = 0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [7:0]  viz_current_task_id;
  logic        viz_deadline_missed;
  logic [7:0]  VGA_R, VGA_G, VGA_B;
  logic        VGA_HS, VGA_VS, VGA_BLANK_N, VGA_SYNC_N, VGA_CLK;
  int checks = 0, failures = 0;

  task_profiler_top dut (.CLOCK_50(clk), .reset, .avs_address, .avs_read, .avs_write,
                         .avs_writedata, .avs_readdata, .viz_current_task_id,
                         .viz_deadline_missed, .VGA_R, .VGA_G, .VGA_B, .VGA_HS, .VGA_VS,
                         .VGA_BLANK_N, .VGA_SYNC_N, .VGA_CLK);

  always #10 clk = ~clk;

  logic [31:0] now;
  always_ff @(posedge clk) now <= reset ? 32'd0 : now + 1;

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model
  logic [47:0] q [$];
  bit m_ovf, m_missed, m_out;
  logic [31:0] m_start, m_deadline;
  task_id_t m_task;

  // mechanism counters
  int n_capture = 0, n_miss = 0, n_full = 0, n_ovf = 0, n_adv = 0, n_clr_missed = 0;
  int n_clr_all = 0, n_disabled = 0, n_digit = 0, n_flash_hi = 0, n_flash_lo = 0;
  int n_hold = 0;
  int n_bg [5] = '{0, 0, 0, 0, 0};

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
    d = avs_readdata;
  endtask

  task automatic log_event(input logic [7:0] t, input task_id_t id);
    logic [31:0] ts;
    bus_write(REG_EVENT_WRITE, {16'h0, t, id}, ts);
    if (q.size() == 256) begin m_ovf = 1; n_ovf++; return; end
    q.push_back({ts, t, id});
    n_capture++;
    if (q.size() == 256) n_full++;
    if (t == EVT_TASK_START) begin m_task = id; m_start = ts; m_out = 1; end
    else if (t == EVT_TASK_END) begin
      if (m_out && m_deadline == 0) n_disabled++;
      if (m_out && m_deadline != 0 && (ts - m_start) > m_deadline) begin m_missed = 1; n_miss++; end
      m_out = 0;
    end
  endtask

  task automatic write_reg(input logic [2:0] a, input logic [31:0] d);
    logic [31:0] t;
    bus_write(a, d, t);
    if (a == REG_DEADLINE) m_deadline = d;
    if (a == REG_CONTROL) begin
      if (d[0]) begin q.delete(); m_ovf = 0; m_missed = 0; m_out = 0; m_task = 0; n_clr_all++; end
      if (d[1]) begin m_missed = 0; n_clr_missed++; end
    end
  endtask

  task automatic check_status();
    logic [31:0] s;
    bus_read(REG_STATUS, s);
    check("STATUS", 64'(s), 64'({13'b0, m_missed, q.size() == 256, m_ovf, 7'b0, 9'(q.size())}));
    check("conduit task", 64'(viz_current_task_id), 64'(m_task));
    check("conduit missed", 64'(viz_deadline_missed), 64'(m_missed));
  endtask

  // Drains like the driver: count from STATUS, then read/advance per entry.
  // Returns the drained entries.
  task automatic drain_all(output logic [47:0] got [$]);
    logic [31:0] s, ts, info, t;
    got.delete();
    bus_read(REG_STATUS, s);
    for (int i = 0; i < int'(s[8:0]); i++) begin
      bus_read(REG_READ_TIMESTAMP, ts);
      bus_read(REG_READ_INFO, info);
      check("READ_TIMESTAMP", 64'(ts), 64'(q[0][47:16]));
      check("READ_INFO", 64'(info), 64'({16'h0, q[0][15:0]}));
      got.push_back({ts, info[15:0]});
      bus_write(REG_STATUS, 32'h1, t);
      void'(q.pop_front());
      n_adv++;
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // ------------------------------------------------------------ VGA monitor
  // Samples mid-cycle; the model is updated right after each edge, which is
  // when the design's conduit registers change as well.
  longint cyc = 0;
  int vga_errs = 0;
  bit run_mon = 0;
  always @(negedge clk) if (run_mon) begin
    int hc, line, x;
    bit vis;
    logic [23:0] exp;
    hc   = int'(cyc % 1600);
    line = int'((cyc / 1600) % 525);
    x    = hc / 2;
    vis  = (x < 640) && (line < 480);
    exp  = ref_pixel(x, line, vis, hc, int'(m_task), m_missed);
    checks++;
    if ({VGA_R, VGA_G, VGA_B} !== exp || VGA_HS !== !(x >= 656 && x < 752) ||
        VGA_VS !== !(line >= 490 && line < 492)) begin
      vga_errs++;
      failures++;
      if (vga_errs < 10)
        $display("FAIL vga (%0d,%0d) task %0d missed %0d: got %06h exp %06h", x, line,
                 m_task, m_missed, {VGA_R, VGA_G, VGA_B}, exp);
    end
    if (vis && exp == 24'hFFFFFF) n_digit++;
    if (vis && exp == 24'hFF0000) n_flash_hi++;
    if (vis && exp == 24'h600000) n_flash_lo++;
    if (vis && !m_missed && exp != 24'hFFFFFF) n_bg[m_task > 4 ? 4 : m_task]++;
  end
  always @(posedge clk) if (run_mon) cyc++;

  // ------------------------------------------------------------ scenario
  initial begin
    logic [47:0] got [$];
    logic [31:0] t1_start [$], t1_end [$], t2_start [$], t2_end [$];
    static int ids [3] = '{0, 4, 12};
    m_ovf = 0; m_missed = 0; m_out = 0; m_start = 0; m_deadline = 0; m_task = 0;
    repeat (3) @(posedge clk); #1;
    reset = 0;
    run_mon = 1;      // raster counter starts at the edge after reset
    cyc = 0;

    // ---- A: two-thread run
    write_reg(REG_CONTROL, 32'h1);
    write_reg(REG_DEADLINE, 32'd100000);
    for (int k = 0; k < 20; k++) begin
      // task 1 every 5,000 cycles, task 2 every 10,000 cycles offset by 2,500
      log_event(EVT_TASK_START, 8'd1); idle(292 - 1); log_event(EVT_TASK_END, 8'd1);
      idle(2500 - 292 - 1);
      if (k % 2 == 0) begin
        log_event(EVT_TASK_START, 8'd2); idle(1372 - 1); log_event(EVT_TASK_END, 8'd2);
        idle(2500 - 1372 - 1);
      end else idle(2500);
      if (k == 0) begin
        n_hold++;
        check("task id held after END", 64'(viz_current_task_id), 64'(2));
      end
      if (k == 9) break;
    end
    // 10 runs of task 1 and 5 of task 2 so far; five more of task 2.
    for (int k = 0; k < 5; k++) begin
      log_event(EVT_TASK_START, 8'd2); idle(1372 - 1); log_event(EVT_TASK_END, 8'd2);
      idle(10000 - 1372 - 1);
    end
    check_status();
    drain_all(got);
    check("events captured", 64'(got.size()), 40);
    foreach (got[i]) begin
      if (got[i][15:0] == 16'h0101) t1_start.push_back(got[i][47:16]);
      if (got[i][15:0] == 16'h0201) t1_end.push_back(got[i][47:16]);
      if (got[i][15:0] == 16'h0102) t2_start.push_back(got[i][47:16]);
      if (got[i][15:0] == 16'h0202) t2_end.push_back(got[i][47:16]);
    end
    check("task 1 runs", 64'(t1_start.size()), 10);
    check("task 2 runs", 64'(t2_start.size()), 10);
    foreach (t1_start[i]) check("task 1 exec cycles", 64'(t1_end[i] - t1_start[i]), 292);
    foreach (t2_start[i]) check("task 2 exec cycles", 64'(t2_end[i] - t2_start[i]), 1372);
    for (int i = 1; i < 10; i++) check("task 1 period", 64'(t1_start[i] - t1_start[i-1]), 5000);
    for (int i = 1; i < 5; i++) check("task 2 period", 64'(t2_start[i] - t2_start[i-1]), 10000);
    check_status();   // empty, no overflow, no miss

    // ---- B: hold task 1 for a full frame (digit "1" on blue); no END is
    //      written, the START of phase C restarts the deadline window
    log_event(EVT_TASK_START, 8'd1);
    idle(840000);

    // ---- C: deadline miss and red flash for two lines, then clear
    write_reg(REG_DEADLINE, 32'd1000);
    log_event(EVT_TASK_START, 8'd3); idle(1500); log_event(EVT_TASK_END, 8'd3);
    check_status();
    check("miss reported", 64'(viz_deadline_missed), 64'(1));
    idle(1600 * 3);
    write_reg(REG_CONTROL, 32'h2);
    check_status();
    idle(1600 * 2);       // orange background

    // ---- D: other backgrounds, each over enough lines to cover the digit box
    for (int i = 0; i < 3; i++) begin
      log_event(EVT_TASK_START, 8'(ids[i])); log_event(EVT_TASK_END, 8'(ids[i]));
      idle(280000);
    end

    // ---- E: monitor disabled
    write_reg(REG_DEADLINE, 32'd0);
    log_event(EVT_TASK_START, 8'd2); idle(5000); log_event(EVT_TASK_END, 8'd2);
    check_status();
    check("no miss when disabled", 64'(viz_deadline_missed), 64'(0));

    // ---- F: fill, overflow, drain, clear all
    write_reg(REG_DEADLINE, 32'd100000);
    for (int i = 0; i < 258; i++) log_event(EVT_TASK_START, 8'(i % 5));
    check_status();
    drain_all(got);
    check("drained full buffer", 64'(got.size()), 256);
    check_status();
    write_reg(REG_CONTROL, 32'h1);
    check_status();
    idle(100);

    run_mon = 0;
    $display("capture %0d adv %0d miss %0d clr_missed %0d clr_all %0d full %0d ovf %0d disabled %0d",
             n_capture, n_adv, n_miss, n_clr_missed, n_clr_all, n_full, n_ovf, n_disabled);
    $display("digit px %0d flash hi %0d lo %0d bg grey %0d blue %0d green %0d orange %0d purple %0d",
             n_digit, n_flash_hi, n_flash_lo, n_bg[0], n_bg[1], n_bg[2], n_bg[3], n_bg[4]);
    check_mech("capture", n_capture);      check_mech("rd_ptr advance", n_adv);
    check_mech("deadline miss", n_miss);   check_mech("clear missed", n_clr_missed);
    check_mech("clear all", n_clr_all);    check_mech("buffer full", n_full);
    check_mech("overflow", n_ovf);         check_mech("monitor disabled", n_disabled);
    check_mech("digit drawn", n_digit);    check_mech("red flash bright", n_flash_hi);
    check_mech("red flash dark", n_flash_lo); check_mech("task id held", n_hold);
    for (int i = 0; i < 5; i++) check_mech($sformatf("background %0d", i), n_bg[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mech(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask
endmodule
