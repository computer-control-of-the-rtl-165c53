// watchdog_timer: the executive's Watchdog Timer.
//
// A down-counter stepped by a 20 kc tick. The executive reloads it each time it
// finishes with a program, typically with 20,000 counts (one second). If the
// count ever reaches zero the timer raises an interrupt, which holds until the
// computer acknowledges it, and the counter stops at zero until the next
// reload. Document: 20 kc rate, down-counting, typical load 20,000, interrupt
// at zero. Design choice: the load value is an input (the computer writes
// it), and a reload also clears a pending interrupt.
module watchdog_timer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick_20k,    // one-clock strobe at 20 kc
  input  logic             load,        // reload strobe from the executive
  input  logic [WIDTH-1:0] load_value,  // typically 20000
  input  logic             irq_ack,
  output logic [WIDTH-1:0] count,
  output logic             irq
);
  logic armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      armed <= 1'b0;
      irq   <= 1'b0;
    end else if (load) begin
      count <= load_value;
      armed <= (load_value != '0);
      irq   <= (load_value == '0);
    end else begin
      if (irq_ack) irq <= 1'b0;
      if (armed && tick_20k) begin
        count <= count - 1'b1;
        if (count == WIDTH'(1)) begin
          armed <= 1'b0;
          irq   <= 1'b1;
        end
      end
    end
  end
endmodule
