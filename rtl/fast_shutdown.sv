// fast_shutdown: the hard-wired fast shutdown chain.
//
// Any fault line from any module (a condition that could spill beam) turns
// the injector inhibit on combinationally, with no clock in the path, so the
// injector is stopped within gate delays, not through the computer. A latch
// then keeps the inhibit on after the fault clears, and the computer is told
// by an interrupt which modules tripped (a sticky per-module record it can
// read). The inhibit is released only by an explicit reset, and only while no
// fault is present. Document: hard-wired, microsecond response, injector
// inhibit, computer alerted by priority interrupt, inhibit not routed through
// the computer. Design choice: the latching, the per-module trip record and
// the reset rule.
module fast_shutdown #(
  parameter int unsigned N = 55
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fault,          // active-high fault lines from modules
  input  logic         reset_req,      // operator/computer re-enable request
  input  logic         irq_ack,
  output logic         inj_inhibit,    // to the injector
  output logic [N-1:0] tripped,        // sticky record of faulted modules
  output logic         irq
);
  logic latched;

  // combinational path: fault reaches the injector without a clock edge
  assign inj_inhibit = latched | (|fault);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched <= 1'b0;
      tripped <= '0;
      irq     <= 1'b0;
    end else begin
      if (|fault) begin
        latched <= 1'b1;
        tripped <= tripped | fault;
        if (!latched) irq <= 1'b1;
      end else if (reset_req) begin
        latched <= 1'b0;
        tripped <= '0;
      end
      if (irq_ack && !((|fault) && !latched)) irq <= 1'b0;
    end
  end
endmodule
