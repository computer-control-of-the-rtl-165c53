// tick_divider: one-clock enable pulse every DIV clocks.
//
// Used to derive the slower time bases of the control system from the single
// system clock: the computer cycle (1.75 us), the 20 kc watchdog count and the
// 60 per second display refresh. The counter restarts at reset; the first
// tick comes DIV clocks after reset is released. DIV is this design's choice
// of clock ratio; the rates themselves are the document's.
module tick_divider #(
  parameter int unsigned DIV = 7
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
