// task_profiler_top: FPGA fabric of the real-time task profiler.
//
// A processor writes {event_type, task_id} words to the event logger
// through an Avalon-MM slave port; the logger timestamps each one with a
// 50 MHz cycle counter, buffers 256 events for later read-out and checks
// each task's start-to-end time against a programmable deadline in the
// cycle of the TASK_END write. The logger's "viz" conduit (current task id
// and sticky deadline-miss flag) feeds the VGA renderer directly, without
// software in the loop. The processor, its AXI bridge and the bus
// interconnect are outside this module: their Avalon-MM master side
// appears as the avs_* ports (word address 0-5 = byte offset 0x00-0x14 from
// the bridge base). The partition follows the design description; the
// port naming is this design's own.
//
// Interface: CLOCK_50, reset (synchronous, active high), Avalon-MM slave
// (read latency 1), VGA pins, and the conduit brought out for observation.
// Timing: an EVENT_WRITE changes the conduit at the end of its cycle and the
// VGA colour from the next cycle on.
module task_profiler_top
  import profiler_pkg::*;
(
  input  logic        CLOCK_50,
  input  logic        reset,
  input  logic [2:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic [7:0]  viz_current_task_id,
  output logic        viz_deadline_missed,
  output logic [7:0]  VGA_R,
  output logic [7:0]  VGA_G,
  output logic [7:0]  VGA_B,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_N,
  output logic        VGA_SYNC_N,
  output logic        VGA_CLK
);

  task_id_t current_task_id;
  logic     deadline_missed;

  event_logger u_logger (
    .clk            (CLOCK_50),
    .reset,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .current_task_id,
    .deadline_missed,
    .deadline_cycles(),
    .cycle_count    ()
  );

  task_visualizer u_viz (
    .clk            (CLOCK_50),
    .reset,
    .current_task_id,
    .deadline_missed,
    .VGA_R, .VGA_G, .VGA_B, .VGA_HS, .VGA_VS,
    .VGA_BLANK_N, .VGA_SYNC_N, .VGA_CLK
  );

  assign viz_current_task_id = current_task_id;
  assign viz_deadline_missed = deadline_missed;

endmodule
