// ciu: Computer Interface Unit, the control-room end of the module links.
//
// Four subunits working side by side:
//   word_assembler         computer request words -> serial frames to modules
//   ciu_data_buffer        return lines -> 55-word buffer -> block transfer
//   command_busy_register  per-module command busy flags and completion irq
//   cycle_clock            computer cycles since the master pulse
// A tick divider makes the computer-cycle strobe (CYC_DIV clocks, default
// 7 clocks of 4 MHz = 1.75 us) used by the cycle clock and the block transfer.
// Per module there are four lines: data and timing out, data return and
// command busy in. The word assembler's bit time equals the computer cycle.
// Document: the four subunits and the four wire pairs per module. Design
// choice: the clock ratio and the way the subunits are strobed.
module ciu
  import lampf_pkg::*;
#(
  parameter int unsigned N       = N_MODULES,
  parameter int unsigned CYC_DIV = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  // computer side
  input  logic [15:0]  cpu_wdata,
  input  logic         cpu_we0,
  input  logic         cpu_we1,
  output logic         req_busy,
  output logic         req_done,
  output logic [15:0]  cycle_count,
  output logic [N-1:0] cmd_busy,
  output logic [N-1:0] cmd_done,
  output logic         cmd_irq,
  input  logic         cmd_irq_ack,
  input  logic         btc_start,
  output logic [15:0]  btc_data,
  output logic         btc_valid,
  output logic         btc_done,
  output logic         collect_done,
  output logic         buf_busy,      // buffer filling or unloading
  output logic         cyc_tick,
  // accelerator timing
  input  logic         master_pulse,
  // module lines
  output logic [N-1:0] sd,
  output logic [N-1:0] sc,
  input  logic [N-1:0] rd,
  input  logic [N-1:0] cbusy
);
  logic [N-1:0] sel_mask;
  logic         cmd_issue, sample_bit, collect_last;

  tick_divider #(.DIV(CYC_DIV)) u_cyc (.clk, .rst_n, .tick(cyc_tick));

  cycle_clock u_cycle_clock (
    .clk, .rst_n, .master_pulse, .cyc_tick, .count(cycle_count)
  );

  word_assembler #(.N(N), .BIT_CLKS(CYC_DIV)) u_word_assembler (
    .clk, .rst_n, .cpu_wdata, .cpu_we0, .cpu_we1,
    .busy(req_busy), .req_done, .master_pulse, .cycle_count,
    .sd, .sc, .cmd_issue, .sel_mask, .sample_bit, .collect_last
  );

  command_busy_register #(.N(N)) u_cbr (
    .clk, .rst_n, .issue(cmd_issue), .issue_mask(sel_mask),
    .busy_line(cbusy), .irq_ack(cmd_irq_ack),
    .busy(cmd_busy), .done(cmd_done), .irq(cmd_irq)
  );

  ciu_data_buffer #(.N(N)) u_buffer (
    .clk, .rst_n, .rd, .sel_mask, .sample_bit, .collect_last, .collect_done,
    .cyc_tick, .btc_start, .btc_data, .btc_valid, .btc_done,
    .xfer_busy(buf_busy)
  );
endmodule
