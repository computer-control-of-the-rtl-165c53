// module_station: the equipment at one module control point.
//
// Wires together the RICE (digital controller), its RICE I/O chassis (channel
// interface and A/D converter) and the Video Control Unit. The station talks
// to the CIU over four lines (sd, sc out of the CIU; rd, cbusy back) and to
// the module's equipment through the MIU-side ports of the RICE I/O and the
// VCU relay drives. Timing is that of the parts; nothing is added here.
module module_station
  import lampf_pkg::*;
#(
  parameter int unsigned PULSE_PERIOD    = 4000,
  parameter int unsigned PULSE_WIDTH     = 400,
  parameter int unsigned ADC_SAMPLE_CLKS = 80,
  parameter int unsigned ADC_BIT_CLKS    = 40,
  parameter int unsigned N_VIDEO         = 16,
  parameter int unsigned BBM_CLKS        = 4000
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           sd,
  input  logic                           sc,
  output logic                           rd,
  output logic                           cbusy,
  output logic                           perr,
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
  output logic [N_PULSE-1:0]             pulse_ccw,
  output logic [N_VIDEO-1:0]             relay_upper,
  output logic [N_VIDEO-1:0]             relay_lower
);
  logic                         adc_start, adc_busy, adc_done, adc_sign;
  logic [4:0]                   adc_chan;
  logic [MAG_W-1:0]             adc_mag;
  logic [N_BIN-1:0][ARG_W-1:0]  bin_data;
  logic                         bout_load;
  logic [1:0]                   bout_idx;
  logic [ARG_W-1:0]             bout_value;
  logic [N_BOUT-1:0]            bout_hold;
  logic [N_BOUT-1:0][ARG_W-1:0] bout_latch, bout_state;
  logic                         pulse_on, pulse_cw_sel;
  logic [3:0]                   pulse_idx;
  logic                         vdo_load, vdo_cable;
  logic [CH_W-1:0]              vdo_chan;
  logic [1:0]                   switching;

  rice #(.PULSE_PERIOD(PULSE_PERIOD), .PULSE_WIDTH(PULSE_WIDTH)) u_rice (
    .clk, .rst_n, .sd, .sc, .rd, .cbusy,
    .adc_start, .adc_chan, .adc_busy, .adc_done, .adc_sign, .adc_mag,
    .bin_data, .bout_load, .bout_idx, .bout_value, .bout_hold, .bout_state,
    .pulse_on, .pulse_idx, .pulse_cw_sel,
    .vdo_load, .vdo_cable, .vdo_chan, .perr
  );

  rice_io #(.SAMPLE_CLKS(ADC_SAMPLE_CLKS), .BIT_CLKS(ADC_BIT_CLKS)) u_rice_io (
    .clk, .rst_n,
    .adc_start, .adc_chan, .adc_busy, .adc_done, .adc_sign, .adc_mag,
    .bin_data, .bout_load, .bout_idx, .bout_value, .bout_hold, .bout_latch,
    .bout_state, .pulse_on, .pulse_idx, .pulse_cw_sel,
    .amux_sel, .sampling, .dac_sign, .dac_mag, .cmp,
    .bin_in, .bout_drive, .bout_active, .bout_fb, .pulse_cw, .pulse_ccw
  );

  vcu #(.N_VIDEO(N_VIDEO), .BBM_CLKS(BBM_CLKS)) u_vcu (
    .clk, .rst_n, .vdo_load, .vdo_cable, .vdo_chan,
    .relay_upper, .relay_lower, .switching
  );
endmodule
