// cycle_clock: CIU Cycle Clock, the count of computer cycles since the start
// of the accelerator pulse.
//
// A 16-bit counter cleared by the master pulser's signal and advanced by one
// on every computer-cycle tick (one per 1.75 us). The count is a plain
// register output, so the computer can read it at any time without disturbing
// it. A pulse period of 8.33 ms is about 4760 cycles, well inside 16 bits.
// Document: width, reset by master pulse, increment per computer cycle,
// non-destructive read. Design choice: the counter holds at all ones instead
// of wrapping if master pulses stop, and a master pulse on the same clock as
// a tick clears the count to zero.
module cycle_clock #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             master_pulse,  // one-clock strobe from master pulser
  input  logic             cyc_tick,      // one-clock strobe per computer cycle
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                count <= '0;
    else if (master_pulse)     count <= '0;
    else if (cyc_tick && count != '1) count <= count + 1'b1;
  end
endmodule
