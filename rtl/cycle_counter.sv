// cycle_counter: free-running timestamp counter.
//
// Counts clock cycles from reset and wraps at 2**WIDTH. At the default
// 32 bits on the 50 MHz board clock one count is 20 ns and the counter
// wraps after about 85.9 s. The width and the clock follow the design
// description; the synchronous, active-high reset to zero is this
// design's choice. The counter keeps running through a CONTROL "clear
// all", so timestamps stay monotonic across clears.
//
// Interface: clk, reset (synchronous, active high), count (registered).
// Timing: count increments by one every rising clock edge.
module cycle_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset) count <= '0;
    else       count <= count + 1'b1;
  end

endmodule
