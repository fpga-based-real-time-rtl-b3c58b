// event_buffer: circular event store of the event logger.
//
// Each captured event is kept as a timestamp word (TS_W bits) and an event
// word (EV_W bits: event_type in [15:8], task_id in [7:0]) in two separate
// arrays of DEPTH entries, so that each array maps onto one block RAM
// (256 x 32 and 256 x 16 bits = one M10K each at the defaults). Entries are
// written at wr_ptr and read out at rd_ptr; `count` holds 0..DEPTH entries.
// The split into two 256-entry arrays follows the design description; the
// circular organisation, the sticky overflow flag being set by a write into
// a full buffer (that event is dropped) and the synchronous clear are this
// design's choices.
//
// Interface:
//   wr_en/wr_ts/wr_ev  store one event (ignored and flagged as overflow
//                      when full)
//   adv                drop the entry at rd_ptr (ignored when empty)
//   clear              empty the buffer and clear the overflow flag
//   rd_ts/rd_ev        registered read of the entry at rd_ptr
//   count, full, overflow
// Timing: rd_ts/rd_ev show, one cycle after an edge, the entry that rd_ptr
// pointed to during the cycle before that edge (block-RAM read latency of
// one). count/full/overflow are registers updated at the write edge.
module event_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned TS_W  = 32,
  parameter int unsigned EV_W  = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            clear,
  input  logic            wr_en,
  input  logic [TS_W-1:0] wr_ts,
  input  logic [EV_W-1:0] wr_ev,
  input  logic            adv,
  output logic [TS_W-1:0] rd_ts,
  output logic [EV_W-1:0] rd_ev,
  output logic [CW-1:0]   count,
  output logic            full,
  output logic            overflow
);

  logic [TS_W-1:0] buf_ts [DEPTH];
  logic [EV_W-1:0] buf_ev [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;

  logic do_wr, do_adv;
  assign full   = (count == CW'(DEPTH));
  assign do_wr  = wr_en && !full;
  assign do_adv = adv && (count != '0);

  // Block-RAM style storage: no reset, synchronous read.
  always_ff @(posedge clk) begin
    if (do_wr) begin
      buf_ts[wr_ptr] <= wr_ts;
      buf_ev[wr_ptr] <= wr_ev;
    end
    rd_ts <= buf_ts[rd_ptr];
    rd_ev <= buf_ev[rd_ptr];
  end

  // Pointer wrap: DEPTH is a power of two, so the pointers wrap naturally;
  // for other depths they wrap explicitly.
  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset || clear) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr)              wr_ptr   <= next_ptr(wr_ptr);
      if (do_adv)             rd_ptr   <= next_ptr(rd_ptr);
      if (wr_en && full)      overflow <= 1'b1;
      if (do_wr && !do_adv)   count    <= count + 1'b1;
      else if (!do_wr && do_adv) count <= count - 1'b1;
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (reset) count <= CW'(DEPTH))
    else $error("event_buffer: count above DEPTH");

endmodule
