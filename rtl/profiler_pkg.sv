// profiler_pkg: types and constants shared by the task profiler.
//
// Holds the event type codes (0x01 TASK_START, 0x02 TASK_END), the word
// offsets of the six Avalon-MM registers, the bit layout of the STATUS
// register and the RGB pixel type used by the VGA renderer. The codes,
// offsets and bit positions follow the published register map; the type
// names and the RGB struct are this design's own.
package profiler_pkg;

  // Timestamp width: a free-running 32-bit cycle counter.
  localparam int unsigned TIMESTAMP_W = 32;
  // Stored event word: {event_type[15:8], task_id[7:0]}.
  localparam int unsigned EVENT_W = 16;

  typedef logic [7:0] task_id_t;

  typedef enum logic [7:0] {
    EVT_TASK_START = 8'h01,
    EVT_TASK_END   = 8'h02
  } event_type_e;

  // Word offsets on the Avalon-MM slave (byte address = base + 4*offset).
  typedef enum logic [2:0] {
    REG_EVENT_WRITE    = 3'd0,
    REG_READ_TIMESTAMP = 3'd1,
    REG_READ_INFO      = 3'd2,
    REG_STATUS         = 3'd3,
    REG_CONTROL        = 3'd4,
    REG_DEADLINE       = 3'd5
  } reg_addr_e;

  // STATUS bit positions.
  localparam int unsigned STATUS_COUNT_LSB   = 0;   // [8:0] entry_count
  localparam int unsigned STATUS_OVERFLOW    = 16;
  localparam int unsigned STATUS_FULL        = 17;
  localparam int unsigned STATUS_DL_MISSED   = 18;

  // CONTROL bit positions.
  localparam int unsigned CTRL_CLEAR_ALL     = 0;
  localparam int unsigned CTRL_CLEAR_MISSED  = 1;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

endpackage
