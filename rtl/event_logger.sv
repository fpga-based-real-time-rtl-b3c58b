// event_logger: hardware event logger with deadline check (Avalon-MM slave).
//
// Software writes one 32-bit word to EVENT_WRITE ({event_type[15:8],
// task_id[7:0]}). In that same clock edge the logger stores the free-running
// cycle count as the event's timestamp, together with the low 16 bits of
// the word, in a 256-entry buffer, and hands the event to the deadline
// monitor. Software drains the buffer by reading READ_TIMESTAMP and
// READ_INFO at the read pointer and writing STATUS to advance it.
// current_task_id and deadline_missed leave the block as the "viz" conduit
// for the VGA renderer.
//
// Register map (word offsets, all 32 bits):
//   0 EVENT_WRITE    W  [15:8] event_type, [7:0] task_id; captures an event
//   1 READ_TIMESTAMP R  timestamp of the entry at the read pointer
//   2 READ_INFO      R  [15:8] event_type, [7:0] task_id at the read pointer
//   3 STATUS         R  [8:0] entry_count, [16] overflow, [17] buffer_full,
//                       [18] deadline_missed; W (any value): advance read ptr
//   4 CONTROL        W  [0] clear all, [1] clear deadline_missed only
//   5 DEADLINE       W  deadline in cycles, 0 disables the monitor
// The map, the bit layout and the rule that an event arriving at a full
// buffer is dropped whole (neither stored nor seen by the deadline
// monitor) follow the design description. This design's own choices: a
// fixed read latency of one cycle with no waitrequest; reads of the
// write-only offsets 0, 4 and 5 and of offsets 6-7 return zero (the
// DEADLINE value stays readable only through the deadline_cycles output);
// "clear all" empties the buffer and clears the overflow, deadline and
// start state and current_task_id, but keeps the DEADLINE register and the
// cycle counter; reset is synchronous and active high and sets DEADLINE to
// zero (monitor off).
//
// Timing: a write takes effect at the clock edge that ends its cycle; a
// read presented in cycle t returns readdata in cycle t+1.
module event_logger
  import profiler_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        reset,
  // Avalon-MM slave, word addressed
  input  logic [2:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // viz conduit
  output task_id_t    current_task_id,
  output logic        deadline_missed,
  // observation of internal state (unused by software)
  output logic [TIMESTAMP_W-1:0] deadline_cycles,
  output logic [TIMESTAMP_W-1:0] cycle_count
);

  initial assert (CW <= 16) else $error("event_logger: entry_count does not fit STATUS[15:0]");

  // ---------------------------------------------------------------- decode
  logic write_event, advance, clear_all, clear_missed;
  assign write_event  = avs_write && (avs_address == REG_EVENT_WRITE);
  assign advance      = avs_write && (avs_address == REG_STATUS);
  assign clear_all    = avs_write && (avs_address == REG_CONTROL) && avs_writedata[CTRL_CLEAR_ALL];
  assign clear_missed = avs_write && (avs_address == REG_CONTROL) && avs_writedata[CTRL_CLEAR_MISSED];

  always_ff @(posedge clk) begin
    if (reset) deadline_cycles <= '0;
    else if (avs_write && avs_address == REG_DEADLINE) deadline_cycles <= avs_writedata;
  end

  // ---------------------------------------------------------- timestamping
  cycle_counter #(.WIDTH(TIMESTAMP_W)) u_counter (
    .clk, .reset, .count(cycle_count)
  );

  // ---------------------------------------------------------------- buffer
  logic [TIMESTAMP_W-1:0] rd_ts;
  logic [EVENT_W-1:0] rd_ev;
  logic [CW-1:0]   entry_count;
  logic            buffer_full, overflow_flag;

  event_buffer #(.DEPTH(DEPTH), .TS_W(TIMESTAMP_W), .EV_W(EVENT_W)) u_buffer (
    .clk, .reset,
    .clear   (clear_all),
    .wr_en   (write_event),
    .wr_ts   (cycle_count),
    .wr_ev   (avs_writedata[EVENT_W-1:0]),
    .adv     (advance),
    .rd_ts, .rd_ev,
    .count   (entry_count),
    .full    (buffer_full),
    .overflow(overflow_flag)
  );

  // ------------------------------------------------------ deadline monitor


  deadline_monitor #(.TS_W(TIMESTAMP_W)) u_monitor (
    .clk, .reset,
    .clear_all, .clear_missed,
    .ev_valid        (write_event && !buffer_full),
    .ev_type         (avs_writedata[15:8]),
    .ev_task         (avs_writedata[7:0]),
    .cycle_count,
    .deadline_cycles,
    .current_task_id,
    .deadline_missed,
    .start_outstanding()
  );

  // ------------------------------------------------------------- read path
  // The address is registered with the read; the buffer's registered read
  // port and the status bits are muxed in the following cycle.
  reg_addr_e   rd_addr_q;
  logic [31:0] status_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_addr_q <= REG_EVENT_WRITE;
      status_q  <= '0;
    end else if (avs_read) begin
      rd_addr_q <= reg_addr_e'(avs_address);
      status_q  <= '0;
      status_q[STATUS_COUNT_LSB +: CW] <= entry_count;
      status_q[STATUS_OVERFLOW]        <= overflow_flag;
      status_q[STATUS_FULL]            <= buffer_full;
      status_q[STATUS_DL_MISSED]       <= deadline_missed;
    end
  end

  always_comb begin
    unique case (rd_addr_q)
      REG_READ_TIMESTAMP: avs_readdata = rd_ts;
      REG_READ_INFO:      avs_readdata = 32'(rd_ev);
      REG_STATUS:         avs_readdata = status_q;
      default:            avs_readdata = '0;
    endcase
  end

  a_no_read_write: assert property (@(posedge clk) disable iff (reset) !(avs_read && avs_write))
    else $error("event_logger: read and write in the same cycle");

endmodule
