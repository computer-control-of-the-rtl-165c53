// rice_io: RICE Input/Output chassis, the channel interface between a RICE and
// its Module Interface Unit (MIU).
//
// Prototype capacity: 32 analog inputs, 11 binary input channels of 10 bits,
// 3 binary output channels of 10 bits with 10 latches each, and 15 pulse-motor
// outputs, each with a clockwise and a counter-clockwise line.
//  * Analog: adc_start latches the input number into the analog multiplexer
//    select register and starts the sar_adc converter; the multiplexer,
//    sample/hold, DAC and comparator are analog parts outside this module and
//    are reached through amux_sel, sampling, dac_sign/dac_mag and cmp.
//  * Binary inputs and binary-output feedback are resynchronised with two
//    flops before the RICE sees them.
//  * Binary outputs: bout_load writes a channel's ten latches, which drive
//    its ten output bits; bout_active tells the MIU that the channel's command
//    is being held (the RICE keeps it until the device feedback matches), and
//    its fall is the release of the command.
//  * Pulse outputs: the RICE's pulse level is routed to the addressed
//    output's clockwise or counter-clockwise line.
// Document: capacities, local A/D (20 us sample, 10 us/bit), latched binary
// outputs, pulse routing. Design choice: the resynchronisers, the separate
// command-active line per output channel and the port split between RICE and
// RICE I/O.
module rice_io
  import lampf_pkg::*;
#(
  parameter int unsigned SAMPLE_CLKS = 80,
  parameter int unsigned BIT_CLKS    = 40
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // ---- RICE side
  input  logic                           adc_start,
  input  logic [4:0]                     adc_chan,
  output logic                           adc_busy,
  output logic                           adc_done,
  output logic                           adc_sign,
  output logic [MAG_W-1:0]               adc_mag,
  output logic [N_BIN-1:0][ARG_W-1:0]    bin_data,
  input  logic                           bout_load,
  input  logic [1:0]                     bout_idx,
  input  logic [ARG_W-1:0]               bout_value,
  input  logic [N_BOUT-1:0]              bout_hold,
  output logic [N_BOUT-1:0][ARG_W-1:0]   bout_latch,
  output logic [N_BOUT-1:0][ARG_W-1:0]   bout_state,
  input  logic                           pulse_on,
  input  logic [3:0]                     pulse_idx,
  input  logic                           pulse_cw_sel,
  // ---- MIU / analog side
  output logic [4:0]                     amux_sel,
  output logic                           sampling,
  output logic                           dac_sign,
  output logic [MAG_W-1:0]               dac_mag,
  input  logic                           cmp,
  input  logic [N_BIN-1:0][ARG_W-1:0]    bin_in,
  output logic [N_BOUT-1:0][ARG_W-1:0]   bout_drive,
  output logic [N_BOUT-1:0]              bout_active,
  input  logic [N_BOUT-1:0][ARG_W-1:0]   bout_fb,
  output logic [N_PULSE-1:0]             pulse_cw,
  output logic [N_PULSE-1:0]             pulse_ccw
);
  logic [N_BIN-1:0][ARG_W-1:0]  bin_s1;
  logic [N_BOUT-1:0][ARG_W-1:0] fb_s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amux_sel   <= '0;
      bin_s1     <= '0;
      bin_data   <= '0;
      fb_s1      <= '0;
      bout_state <= '0;
      bout_latch <= '0;
    end else begin
      if (adc_start) amux_sel <= adc_chan;
      bin_s1     <= bin_in;
      bin_data   <= bin_s1;
      fb_s1      <= bout_fb;
      bout_state <= fb_s1;
      if (bout_load && int'(bout_idx) < N_BOUT) bout_latch[bout_idx] <= bout_value;
    end
  end

  always_comb begin
    bout_drive  = bout_latch;
    bout_active = bout_hold;
    pulse_cw  = '0;
    pulse_ccw = '0;
    if (pulse_on && int'(pulse_idx) < N_PULSE) begin
      if (pulse_cw_sel) pulse_cw[pulse_idx]  = 1'b1;
      else              pulse_ccw[pulse_idx] = 1'b1;
    end
  end

  sar_adc #(.MAG_BITS(MAG_W), .SAMPLE_CLKS(SAMPLE_CLKS), .BIT_CLKS(BIT_CLKS)) u_adc (
    .clk, .rst_n, .start(adc_start), .cmp, .sampling, .dac_sign, .dac_mag,
    .busy(adc_busy), .done(adc_done), .result_sign(adc_sign), .result_mag(adc_mag)
  );
endmodule
