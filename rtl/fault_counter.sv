// fault_counter: binary counter of fault flags for long-term monitoring.
//
// Tapping the pipelined fault flag at a point of the array and counting the
// samples that arrive flagged shows which part of the system fails and how
// often. The source paper suggests counters clocked by the fault signals; here the
// counter is synchronous to the array clock and counts the clocks in which
// the flag is high (one per flagged sample), saturating at its maximum. Both
// are this design's choices, as is the synchronous clear.
//
// Timing: count updates one clock after the flag.
module fault_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         fault,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '0;
    else if (clear)                 count <= '0;
    else if (fault && (count != '1)) count <= count + 1'b1;
  end
endmodule
