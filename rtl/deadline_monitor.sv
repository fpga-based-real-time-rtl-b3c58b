// deadline_monitor: single-cycle task deadline check.
//
// On an accepted TASK_START event the monitor stores the current cycle
// count in last_start_ts, marks a start as outstanding and takes the
// event's task id as current_task_id. On an accepted TASK_END it computes
// (cycle_count - last_start_ts) with modulo-2**TS_W arithmetic and, if a
// start is outstanding and the deadline is not zero, sets the sticky
// deadline_missed flag when the difference is greater than the deadline;
// the outstanding mark is then cleared. Only one start is tracked at a time:
// a second TASK_START before a TASK_END restarts the window. This behaviour,
// the strict "greater than" comparison, "deadline 0 disables monitoring"
// and current_task_id being held (not cleared) at TASK_END follow the
// design description. Clearing current_task_id on clear_all is this
// design's choice.
//
// Interface: ev_valid with ev_type/ev_task is one accepted event;
// clear_all clears everything, clear_missed only the sticky flag.
// Timing: the comparison is combinational in the cycle of the TASK_END
// event; deadline_missed is high from the next cycle.
module deadline_monitor
  import profiler_pkg::*;
#(
  parameter int unsigned TS_W = 32
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            clear_all,
  input  logic            clear_missed,
  input  logic            ev_valid,
  input  logic [7:0]      ev_type,
  input  task_id_t        ev_task,
  input  logic [TS_W-1:0] cycle_count,
  input  logic [TS_W-1:0] deadline_cycles,
  output task_id_t        current_task_id,
  output logic            deadline_missed,
  output logic            start_outstanding
);

  logic [TS_W-1:0] last_start_ts;
  logic [TS_W-1:0] elapsed;
  logic            late;

  assign elapsed = cycle_count - last_start_ts;
  assign late    = start_outstanding && (deadline_cycles != '0) && (elapsed > deadline_cycles);

  always_ff @(posedge clk) begin
    if (reset || clear_all) begin
      current_task_id   <= '0;
      last_start_ts     <= '0;
      start_outstanding <= 1'b0;
      deadline_missed   <= 1'b0;
    end else begin
      if (clear_missed) deadline_missed <= 1'b0;
      if (ev_valid) begin
        if (ev_type == EVT_TASK_START) begin
          current_task_id   <= ev_task;
          last_start_ts     <= cycle_count;
          start_outstanding <= 1'b1;
        end else if (ev_type == EVT_TASK_END) begin
          if (late) deadline_missed <= 1'b1;
          start_outstanding <= 1'b0;
        end
      end
    end
  end

endmodule
