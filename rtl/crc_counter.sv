// crc_counter: the bit counter COUNT and its incrementer INC.
//
// COUNT is a plain binary up-counter. It is cleared while the controller is in
// state 1 and stepped by one on every clock of states 2 and 3; it wraps from
// all ones to zero, which is how the same register first counts the message
// bits (0 to 63) and then the CRC bits (0 to 15) without being cleared in
// between. The incremented value X = COUNT + 1 is produced combinationally
// and loaded on the clock edge. Width, clear-in-state-1 and increment-in-
// states-2-and-3 follow the original register-transfer description; the
// counter has no reset of its own there, and none is added here, because
// state 1 always clears it before it is read.
//
// Interface: clk; clear (synchronous, has priority); inc (count enable);
// count (registered value).
// Timing: count changes one clock after clear or inc is sampled high.
module crc_counter #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] count_inc;  // X = INC(COUNT)

  always_comb count_inc = count + WIDTH'(1);

  always_ff @(posedge clk) begin
    if (clear)    count <= '0;
    else if (inc) count <= count_inc;
  end

endmodule
