// console_interface: link from the operator's console to the computer.
//
// Pressing a console button loads two 16-bit buffers and raises a priority
// interrupt; the computer reads both buffers (cpu_read) and decodes the
// request. The buffers hold:
//   word 0 = {button number (8 bits), module thumbwheels (2 BCD digits)}
//   word 1 = {channel thumbwheels (2 BCD digits), value/location thumbwheels
//             (2 BCD digits)}
// The console has several thumbwheel sets (video upper and lower, channel
// control, display location / analog demand); a button reads the set of its
// own panel area, set number = button number / BTN_PER_SET.
// A button held down on a REPEAT_MASK input (the Up/Down slewing buttons)
// repeats its request every REPEAT_CLKS clocks: with the computer adding
// 0.1 % per request, a momentary press gives one 0.1 % step and a held button
// 10 steps per second, i.e. 1 % per second. A press while the buffers still
// wait for the computer is lost and sets `overrun` until the next read.
// If several buttons rise in one clock the lowest-numbered wins.
// Document: two 16-bit buffers set by buttons and thumbwheels, priority
// interrupt, Up/Down 1 %/s and 0.1 % single step. Design choice: the word
// layout, BCD thumbwheels, button grouping, auto-repeat in hardware, overrun.
module console_interface #(
  parameter int unsigned N_BTN       = 32,
  parameter int unsigned N_SET       = 4,
  parameter int unsigned BTN_PER_SET = 8,
  parameter logic [31:0] REPEAT_MASK = 32'h0000_0300,  // Up = 8, Down = 9
  parameter int unsigned REPEAT_CLKS = 400_000          // 100 ms at 4 MHz
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_BTN-1:0]        btn,       // clean button levels
  input  logic [N_SET-1:0][23:0]  tw,        // {module, channel, value} BCD
  input  logic                    cpu_read,  // computer has read both words
  output logic [15:0]             buf0,
  output logic [15:0]             buf1,
  output logic                    irq,
  output logic                    overrun
);
  localparam int RW = $clog2(REPEAT_CLKS + 1);

  logic [N_BTN-1:0] btn_q, rise, rep;
  logic [RW-1:0]    rep_tmr;
  logic             event_any;
  logic [7:0]       code;
  logic [N_BTN-1:0] ev;

  assign rise = btn & ~btn_q;
  assign ev   = rise | rep;

  always_comb begin
    code = '0;
    for (int i = N_BTN - 1; i >= 0; i--)
      if (ev[i]) code = 8'(i);
  end
  assign event_any = |ev;

  // repeat strobe for held Up/Down buttons
  always_comb begin
    rep = '0;
    if (rep_tmr == '0) rep = btn & btn_q & REPEAT_MASK[N_BTN-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_q   <= '0;
      rep_tmr <= '0;
      buf0    <= '0;
      buf1    <= '0;
      irq     <= 1'b0;
      overrun <= 1'b0;
    end else begin
      btn_q <= btn;
      if (|(rise & REPEAT_MASK[N_BTN-1:0]) || rep_tmr == '0)
        rep_tmr <= RW'(REPEAT_CLKS - 1);
      else
        rep_tmr <= rep_tmr - 1'b1;

      if (cpu_read) begin
        irq     <= 1'b0;
        overrun <= 1'b0;
      end
      if (event_any) begin
        if (irq && !cpu_read) overrun <= 1'b1;
        else begin
          buf0 <= {code, tw[int'(code) / BTN_PER_SET][23:16]};
          buf1 <= tw[int'(code) / BTN_PER_SET][15:0];
          irq  <= 1'b1;
        end
      end
    end
  end
endmodule
