// lampf_control: digital hardware of the accelerator control system, from the
// computer's I/O lines to the equipment at every module.
//
// The accelerator is split into 55 modules, each with one control point.
// A central computer reaches every control point through one Computer
// Interface Unit (CIU) and, at each module, a station made of the RICE, its
// RICE I/O chassis and a Video Control Unit (module_station). The link to a
// station is serial, four lines per module: the CIU sends frames on a data and
// a timing line (to one module, a group, or all at once), the station returns
// its data word on a third line and its command-busy state on a fourth. Data
// from all selected modules is collected at the same time into a 55-word
// buffer and block-transferred to the computer.
// Beside this chain the top holds the other logic around the computer:
//   console_interface   two 16-bit buffers + interrupt from the console
//   watchdog_timer      20 kc down-counter restarting the executive
//   fast_shutdown       hard-wired injector inhibit, independent of the computer
//   display_controller  refresh, character generator and light pen of the
//                       console's display scope
// The computer itself, its block transfer channel, the MIU analog
// conditioning, the A/D analog front end, the scope's analog vector generator
// and the module equipment are outside: their signals are ports here.
// One clock (4 MHz by this design's choice) runs everything; the computer
// cycle (1.75 us) is every CYC_DIV = 7 clocks and the 20 kc watchdog count
// every WDT_DIV = 200 clocks.
module lampf_control
  import lampf_pkg::*;
#(
  parameter int unsigned N               = N_MODULES,
  parameter int unsigned CYC_DIV         = 7,
  parameter int unsigned WDT_DIV         = 200,
  parameter int unsigned PULSE_PERIOD    = 4000,
  parameter int unsigned PULSE_WIDTH     = 400,
  parameter int unsigned ADC_SAMPLE_CLKS = 80,
  parameter int unsigned ADC_BIT_CLKS    = 40,
  parameter int unsigned N_VIDEO         = 16,
  parameter int unsigned BBM_CLKS        = 4000,
  parameter int unsigned REPEAT_CLKS     = 400_000,
  parameter int unsigned FRAME_CLKS      = 66_667
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  master_pulse,
  // ---- computer: CIU
  input  logic [15:0]                           cpu_wdata,
  input  logic                                  cpu_we0,
  input  logic                                  cpu_we1,
  output logic                                  req_busy,
  output logic                                  req_done,
  output logic [15:0]                           cycle_count,
  output logic [N-1:0]                          cmd_busy,
  output logic [N-1:0]                          cmd_done,
  output logic                                  cmd_irq,
  input  logic                                  cmd_irq_ack,
  input  logic                                  btc_start,
  output logic [15:0]                           btc_data,
  output logic                                  btc_valid,
  output logic                                  btc_done,
  output logic                                  collect_done,
  output logic                                  buf_busy,
  // ---- computer: watchdog
  input  logic                                  wdt_load,
  input  logic [15:0]                           wdt_value,
  input  logic                                  wdt_ack,
  output logic [15:0]                           wdt_count,
  output logic                                  wdt_irq,
  // ---- console
  input  logic [31:0]                           btn,
  input  logic [3:0][23:0]                      tw,
  input  logic                                  con_read,
  output logic [15:0]                           con_buf0,
  output logic [15:0]                           con_buf1,
  output logic                                  con_irq,
  output logic                                  con_overrun,
  // ---- display scope
  input  logic                                  dsp_we,
  input  logic [8:0]                            dsp_addr,
  input  logic [23:0]                           dsp_wdata,
  output logic [9:0]                            beam_x,
  output logic [9:0]                            beam_y,
  output logic                                  unblank,
  output logic                                  bright,
  output logic                                  vec_start,
  output logic signed [8:0]                     vec_dx,
  output logic signed [8:0]                     vec_dy,
  input  logic                                  pen_hit,
  input  logic                                  pen_ack,
  output logic [8:0]                            pen_addr,
  output logic                                  pen_irq,
  output logic                                  dsp_frame,    // strobe at each refresh
  output logic                                  dsp_scanning, // list being drawn
  // ---- fast shutdown chain
  input  logic [N-1:0]                          fault,
  input  logic                                  fs_reset,
  input  logic                                  fs_ack,
  output logic                                  inj_inhibit,
  output logic [N-1:0]                          fs_tripped,
  output logic                                  fs_irq,
  // ---- module equipment (MIU side of every station)
  output logic [N-1:0]                          rice_perr,
  output logic [N-1:0][4:0]                     amux_sel,
  output logic [N-1:0]                          sampling,
  output logic [N-1:0]                          dac_sign,
  output logic [N-1:0][MAG_W-1:0]               dac_mag,
  input  logic [N-1:0]                          cmp,
  input  logic [N-1:0][N_BIN-1:0][ARG_W-1:0]    bin_in,
  output logic [N-1:0][N_BOUT-1:0][ARG_W-1:0]   bout_drive,
  output logic [N-1:0][N_BOUT-1:0]              bout_active,
  input  logic [N-1:0][N_BOUT-1:0][ARG_W-1:0]   bout_fb,
  output logic [N-1:0][N_PULSE-1:0]             pulse_cw,
  output logic [N-1:0][N_PULSE-1:0]             pulse_ccw,
  output logic [N-1:0][N_VIDEO-1:0]             relay_upper,
  output logic [N-1:0][N_VIDEO-1:0]             relay_lower
);
  logic [N-1:0] sd, sc, rd, cbusy;
  logic         tick_20k;

  ciu #(.N(N), .CYC_DIV(CYC_DIV)) u_ciu (
    .clk, .rst_n, .cpu_wdata, .cpu_we0, .cpu_we1, .req_busy, .req_done,
    .cycle_count, .cmd_busy, .cmd_done, .cmd_irq, .cmd_irq_ack,
    .btc_start, .btc_data, .btc_valid, .btc_done, .collect_done, .buf_busy,
    .cyc_tick(), .master_pulse, .sd, .sc, .rd, .cbusy
  );

  for (genvar m = 0; m < N; m++) begin : g_station
    module_station #(
      .PULSE_PERIOD(PULSE_PERIOD), .PULSE_WIDTH(PULSE_WIDTH),
      .ADC_SAMPLE_CLKS(ADC_SAMPLE_CLKS), .ADC_BIT_CLKS(ADC_BIT_CLKS),
      .N_VIDEO(N_VIDEO), .BBM_CLKS(BBM_CLKS)
    ) u_station (
      .clk, .rst_n, .sd(sd[m]), .sc(sc[m]), .rd(rd[m]), .cbusy(cbusy[m]),
      .perr(rice_perr[m]), .amux_sel(amux_sel[m]), .sampling(sampling[m]),
      .dac_sign(dac_sign[m]), .dac_mag(dac_mag[m]), .cmp(cmp[m]),
      .bin_in(bin_in[m]), .bout_drive(bout_drive[m]),
      .bout_active(bout_active[m]), .bout_fb(bout_fb[m]),
      .pulse_cw(pulse_cw[m]), .pulse_ccw(pulse_ccw[m]),
      .relay_upper(relay_upper[m]), .relay_lower(relay_lower[m])
    );
  end

  tick_divider #(.DIV(WDT_DIV)) u_wdt_tick (.clk, .rst_n, .tick(tick_20k));

  watchdog_timer u_wdt (
    .clk, .rst_n, .tick_20k, .load(wdt_load), .load_value(wdt_value),
    .irq_ack(wdt_ack), .count(wdt_count), .irq(wdt_irq)
  );

  console_interface #(.REPEAT_CLKS(REPEAT_CLKS)) u_console (
    .clk, .rst_n, .btn, .tw, .cpu_read(con_read),
    .buf0(con_buf0), .buf1(con_buf1), .irq(con_irq), .overrun(con_overrun)
  );

  fast_shutdown #(.N(N)) u_fs (
    .clk, .rst_n, .fault, .reset_req(fs_reset), .irq_ack(fs_ack),
    .inj_inhibit, .tripped(fs_tripped), .irq(fs_irq)
  );

  display_controller #(.FRAME_CLKS(FRAME_CLKS)) u_display (
    .clk, .rst_n, .cpu_we(dsp_we), .cpu_addr(dsp_addr), .cpu_wdata(dsp_wdata),
    .beam_x, .beam_y, .unblank, .bright, .vec_start, .vec_dx, .vec_dy,
    .pen_hit, .irq_ack(pen_ack), .pen_addr, .pen_irq,
    .frame_start(dsp_frame), .scanning(dsp_scanning)
  );
endmodule
