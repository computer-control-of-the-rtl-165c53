// tb_lampf_control: end-to-end test of the whole control system at its full
// size (55 modules, every parameter at its default, so real time scales:
// 4 MHz clock, 1.75 us computer cycle, 130 us conversion, 1 ms break before
// make, 100 ms console repeat, 60 frames/s display refresh).
//
// Around the top sit behavioural models of what is outside the digital
// hardware: the A/D analog front end of every module (adc_frontend_model),
// the binary-output devices (a device takes the latched value DEV_CLKS clocks
// after the command goes active, and reports it on its feedback lines), the
// master pulser, the console's buttons and thumbwheels, the light pen (it
// sees the beam while a pen-visible vector is drawn) and the computer, which
// is a set of tasks writing request words and reading the block transfer.
//
// Every mechanism is counted; the run fails if any count stays zero:
//   analog DTK to all modules, collect and block transfer (values checked)
//   DTK delayed after the master pulse by the cycle clock (sample time and
//   value checked), binary DTK of all 55 modules inside 250 us, group
//   broadcast, binary CMD hold and release with command busy and interrupt,
//   readback of a binary output, pulse CMD cw and ccw (pulse counts), VDO
//   relay switching, watchdog interrupt, fast shutdown, console request and
//   held-button repeat, display refresh and light pen.
// Interface: none (top-level testbench). Watchdog: 3,000,000 clocks.
// Design choice: the test sequence, device and light-pen models.
module tb_lampf_control;
  import lampf_pkg::*;
  localparam int N = N_MODULES;
  localparam int DEV_CLKS = 200;
  localparam int NV = 16;

  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;   // 4 MHz

  // computer side
  logic        master_pulse = 0, we0 = 0, we1 = 0, cmd_irq_ack = 0, btc_start = 0;
  logic [15:0] wdata = '0;
  logic        req_busy, req_done, cmd_irq, btc_valid, btc_done, collect_done, buf_busy;
  logic [15:0] cycle_count, btc_data;
  logic [N-1:0] cmd_busy, cmd_done;
  logic        wdt_load = 0, wdt_ack = 0, wdt_irq;
  logic [15:0] wdt_value = '0, wdt_count;
  logic [31:0] btn = '0;
  logic [3:0][23:0] tw = '0;
  logic        con_read = 0, con_irq, con_overrun;
  logic [15:0] con_buf0, con_buf1;
  logic        dsp_we = 0, pen_hit = 0, pen_ack = 0;
  logic [8:0]  dsp_addr = '0, pen_addr;
  logic [23:0] dsp_wdata = '0;
  logic [9:0]  beam_x, beam_y;
  logic        unblank, bright, vec_start, pen_irq, dsp_frame, dsp_scanning;
  logic signed [8:0] vec_dx, vec_dy;
  logic [N-1:0] fault = '0, fs_tripped;
  logic        fs_reset = 0, fs_ack = 0, inj_inhibit, fs_irq;
  // module equipment
  logic [N-1:0] rice_perr, sampling, dac_sign, cmp;
  logic [N-1:0][4:0] amux_sel;
  logic [N-1:0][MAG_W-1:0] dac_mag;
  logic [N-1:0][N_BIN-1:0][ARG_W-1:0] bin_in = '0;
  logic [N-1:0][N_BOUT-1:0][ARG_W-1:0] bout_drive, bout_fb = '0;
  logic [N-1:0][N_BOUT-1:0] bout_active;
  logic [N-1:0][N_PULSE-1:0] pulse_cw, pulse_ccw;
  logic [N-1:0][NV-1:0] relay_upper, relay_lower;

  lampf_control dut (
    .clk, .rst_n, .master_pulse, .cpu_wdata(wdata), .cpu_we0(we0), .cpu_we1(we1),
    .req_busy, .req_done, .cycle_count, .cmd_busy, .cmd_done, .cmd_irq, .cmd_irq_ack,
    .btc_start, .btc_data, .btc_valid, .btc_done, .collect_done, .buf_busy,
    .wdt_load, .wdt_value, .wdt_ack, .wdt_count, .wdt_irq,
    .btn, .tw, .con_read, .con_buf0, .con_buf1, .con_irq, .con_overrun,
    .dsp_we, .dsp_addr, .dsp_wdata, .beam_x, .beam_y, .unblank, .bright, .vec_start,
    .vec_dx, .vec_dy, .pen_hit, .pen_ack, .pen_addr, .pen_irq, .dsp_frame, .dsp_scanning,
    .fault, .fs_reset, .fs_ack, .inj_inhibit, .fs_tripped, .fs_irq,
    .rice_perr, .amux_sel, .sampling, .dac_sign, .dac_mag, .cmp, .bin_in,
    .bout_drive, .bout_active, .bout_fb, .pulse_cw, .pulse_ccw, .relay_upper, .relay_lower
  );

  // ---------------------------------------------------------------- models
  int vin [N][N_AIN];
  for (genvar m = 0; m < N; m++) begin : g_afe
    adc_frontend_model u_afe (.clk, .vin(vin[m]), .amux_sel(amux_sel[m]),
      .sampling(sampling[m]), .dac_sign(dac_sign[m]), .dac_mag(dac_mag[m]), .cmp(cmp[m]));
  end

  // binary-output devices: follow an active command after DEV_CLKS clocks
  int dev_tmr [N][N_BOUT];
  initial foreach (dev_tmr[m, c]) dev_tmr[m][c] = 0;
  always @(posedge clk)
    for (int m = 0; m < N; m++)
      for (int c = 0; c < N_BOUT; c++)
        if (bout_active[m][c]) begin
          if (dev_tmr[m][c] == DEV_CLKS) bout_fb[m][c] <= bout_drive[m][c];
          else dev_tmr[m][c]++;
        end else dev_tmr[m][c] = 0;

  // light pen: sees the beam while a vector is drawn
  always @(posedge clk) begin
    pen_hit <= 1'b0;
    if (vec_start) pen_hit <= 1'b1;
  end

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef enum int {
    M_DTK_ANALOG, M_DTK_SYNC, M_BIN_SCAN, M_GROUP, M_COLLECT_BTC, M_BIN_CMD,
    M_BOUT_READ, M_PULSE_CW, M_PULSE_CCW, M_VDO, M_WDT, M_FAST_SD,
    M_CONSOLE, M_REPEAT, M_REFRESH, M_PEN, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  initial foreach (mech[i]) mech[i] = 0;

  // pulse counting on the motor lines
  int ncw [N][N_PULSE], nccw [N][N_PULSE];
  logic [N-1:0][N_PULSE-1:0] cw_q = '0, ccw_q = '0;
  initial foreach (ncw[m, p]) begin ncw[m][p] = 0; nccw[m][p] = 0; end
  always @(posedge clk) if (rst_n) begin
    cw_q <= pulse_cw; ccw_q <= pulse_ccw;
    for (int m = 0; m < N; m++)
      for (int p = 0; p < N_PULSE; p++) begin
        if (pulse_cw[m][p] && !cw_q[m][p]) ncw[m][p]++;
        if (pulse_ccw[m][p] && !ccw_q[m][p]) nccw[m][p]++;
      end
  end

  // display refresh: frames in which the beam was unblanked
  int frames_lit = 0;
  logic lit_this_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (dsp_frame) begin
      if (lit_this_frame) frames_lit++;
      lit_this_frame <= 1'b0;
    end else if (unblank) lit_this_frame <= 1'b1;
  end

  // ---------------------------------------------------------------- computer
  task automatic issue(input int op, int modf, int ch, bit sync, input logic [15:0] w1);
    while (req_busy) @(negedge clk);
    @(negedge clk) we0 = 1; wdata = {3'(op), 6'(modf), 6'(ch), sync};
    @(negedge clk) we0 = 0; we1 = 1; wdata = w1;
    @(negedge clk) we1 = 0;
  endtask

  task automatic request(input int op, int modf, int ch, bit sync, input logic [15:0] w1);
    issue(op, modf, ch, sync, w1);
    while (!req_done) @(negedge clk);
  endtask

  logic [15:0] got [N];
  task automatic collect_and_transfer(input int modf);
    int i;
    request(4, modf, 0, 0, 16'd0);
    while (buf_busy) @(negedge clk);
    @(negedge clk) btc_start = 1;
    @(negedge clk) btc_start = 0;
    i = 0;
    while (!btc_done) begin
      @(posedge clk); #1;
      if (btc_valid) begin got[i] = btc_data; i++; end
    end
    check(i == N, "block transfer of 55 words");
    mech[M_COLLECT_BTC]++;
  endtask

  function automatic logic [15:0] aword(input int v);
    return {1'b1, 1'b0, 3'b000, v < 0, 10'(v < 0 ? -v : v)};
  endfunction

  task automatic wait_clks(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ok, t0, t, ch;
    foreach (vin[m, i]) vin[m][i] = ((m * 37 + i * 91) % 2047) - 1023;
    foreach (bin_in[m, k]) bin_in[m][k] = ARG_W'($urandom);
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait_clks(10);

    // ---- analog data take from all 55 modules, asynchronous
    ch = 6;
    request(2, 63, CH_AIN0 + ch, 0, 16'd0);
    wait_clks(600);                       // 130 us conversion
    collect_and_transfer(63);
    ok = 1;
    for (int m = 0; m < N; m++)
      if (got[m] != aword(vin[m][ch])) begin
        ok = 0; $display("module %0d: got %h want %h", m, got[m], aword(vin[m][ch]));
      end
    check(ok, "analog DTK of all modules");
    if (ok) mech[M_DTK_ANALOG]++;

    // ---- group broadcast: HF section only, another channel
    ch = 20;
    request(2, 57, CH_AIN0 + ch, 0, 16'd0);
    wait_clks(600);
    collect_and_transfer(57);
    ok = 1;
    for (int m = 0; m < N; m++)
      if (got[m] != ((m >= 9 && m < 54) ? aword(vin[m][20]) : aword(vin[m][6]))) ok = 0;
    check(ok, "HF group take, other modules keep their words");
    if (ok) mech[M_GROUP]++;

    // ---- delayed data take: sample 100 cycles (175 us) after the master pulse
    vin[20][3] = -321;
    issue(2, 20, CH_AIN0 + 3, 1, 16'd100);
    check(!sampling[20], "sync DTK waits for the master pulse");
    wait_clks(300);
    check(!sampling[20], "still waiting");
    @(negedge clk) master_pulse = 1; t0 = $time;
    @(negedge clk) master_pulse = 0;
    wait_clks(350);                      // 50 cycles later the signal changes
    vin[20][3] = 777;
    while (!sampling[20]) @(negedge clk);
    t = ($time - t0) / 250;
    check(t >= 700 && t < 760, $sformatf("sample %0d clocks after the master pulse", t));
    while (req_busy) @(negedge clk);
    wait_clks(600);
    collect_and_transfer(20);
    check(got[20] == aword(777), $sformatf("delayed sample value %h", got[20]));
    if (t >= 700 && t < 760 && got[20] == aword(777)) mech[M_DTK_SYNC]++;

    // ---- binary status scan of every module (document: 250 us)
    t0 = $time;
    request(2, 63, CH_BIN0 + 4, 0, 16'd0);
    collect_and_transfer(63);
    t = ($time - t0) / 250;
    ok = 1;
    for (int m = 0; m < N; m++) if (got[m] != {6'b100000, bin_in[m][4]}) ok = 0;
    check(ok, "binary words of all modules");
    check(t < 1000, $sformatf("binary scan %0d clocks", t));
    if (ok && t < 1000) mech[M_BIN_SCAN]++;

    // ---- binary CMD: hold until the device matches, then release
    request(1, 7, CH_BOUT0 + 1, 0, 16'h02A5);
    wait_clks(20);
    check(cmd_busy[7] && bout_active[7][1] && bout_drive[7][1] == 10'h2A5, "binary command held");
    check(!cmd_irq, "no completion yet");
    while (!cmd_irq) @(negedge clk);
    check(cmd_done[7] && !cmd_busy[7] && !bout_active[7][1] && bout_fb[7][1] == 10'h2A5,
          "released when feedback matches, completion interrupt");
    if (cmd_done[7] && !bout_active[7][1]) mech[M_BIN_CMD]++;
    @(negedge clk) cmd_irq_ack = 1; @(negedge clk) cmd_irq_ack = 0;
    check(!cmd_irq, "interrupt acknowledged");
    // read the output's state back
    request(2, 7, CH_BOUT0 + 1, 0, 16'd0);
    collect_and_transfer(7);
    check(got[7] == {6'b100000, 10'h2A5}, "binary output readback");
    if (got[7] == {6'b100000, 10'h2A5}) mech[M_BOUT_READ]++;

    // ---- pulse CMD: 3 clockwise, then 2 counter-clockwise steps
    request(1, 30, CH_PULSE0 + 4, 0, {4'b0, 2'b01, 10'd3});
    while (!cmd_irq) @(negedge clk);
    check(cmd_done[30] && ncw[30][4] == 3 && nccw[30][4] == 0, $sformatf("%0d cw pulses", ncw[30][4]));
    if (ncw[30][4] == 3) mech[M_PULSE_CW]++;
    @(negedge clk) cmd_irq_ack = 1; @(negedge clk) cmd_irq_ack = 0;
    request(1, 30, CH_PULSE0 + 4, 0, {4'b0, 2'b00, 10'd2});
    while (!cmd_irq) @(negedge clk);
    check(nccw[30][4] == 2 && ncw[30][4] == 3, $sformatf("%0d ccw pulses", nccw[30][4]));
    if (nccw[30][4] == 2) mech[M_PULSE_CCW]++;
    @(negedge clk) cmd_irq_ack = 1; @(negedge clk) cmd_irq_ack = 0;

    // ---- VDO: HF signal 5 onto the lower cable of module 40
    request(3, 40, 5, 0, {4'b0, 2'b01, 10'd0});
    wait_clks(100);
    check(relay_lower[40] == '0, "break before make");
    wait_clks(4100);
    check(relay_lower[40] == NV'(1) << 4 && relay_upper[40] == '0, "signal 5 on the lower cable");
    if (relay_lower[40] == NV'(1) << 4) mech[M_VDO]++;

    // ---- watchdog: executive stops reloading
    @(negedge clk) wdt_load = 1; wdt_value = 16'd5;
    @(negedge clk) wdt_load = 0;
    wait_clks(4 * 200);
    check(!wdt_irq, "watchdog still counting");
    wait_clks(2 * 200);
    check(wdt_irq, "watchdog interrupt");
    if (wdt_irq) mech[M_WDT]++;
    @(negedge clk) wdt_ack = 1; @(negedge clk) wdt_ack = 0;

    // ---- fast shutdown from module 50
    @(negedge clk) fault[50] = 1;
    #1 check(inj_inhibit, "injector inhibited at once");
    @(negedge clk) fault[50] = 0;
    wait_clks(3);
    check(inj_inhibit && fs_tripped[50] && fs_irq, "inhibit latched, fault recorded");
    if (inj_inhibit && fs_tripped[50]) mech[M_FAST_SD]++;
    @(negedge clk) fs_ack = 1; fs_reset = 1;
    @(negedge clk) fs_ack = 0; fs_reset = 0;
    wait_clks(2);
    check(!inj_inhibit && !fs_irq, "re-enabled");

    // ---- console: one press, then a held Up button
    tw[0] = 24'h12_34_56;
    tw[1] = 24'h07_44_10;
    @(negedge clk) btn[3] = 1;
    wait_clks(3);
    check(con_irq && con_buf0 == 16'h0312 && con_buf1 == 16'h3456, "console request words");
    if (con_irq && con_buf0 == 16'h0312) mech[M_CONSOLE]++;
    @(negedge clk) btn[3] = 0; con_read = 1;
    @(negedge clk) con_read = 0;
    begin
      int nreq = 0;
      @(negedge clk) btn[8] = 1;
      repeat (3 * 400_000 + 1000) begin
        @(negedge clk);
        if (con_irq) begin
          nreq++;
          check(con_buf0 == 16'h0807, "Up button words");
          con_read = 1; @(negedge clk) con_read = 0;
        end
      end
      btn[8] = 0;
      check(nreq == 4, $sformatf("held Up button: %0d requests in 300 ms", nreq));
      if (nreq >= 3) mech[M_REPEAT]++;
    end

    // ---- display: picture written once, refreshed by the scope itself
    begin
      logic [23:0] items [5];
      items[0] = {3'd1, 1'b0, 10'd100, 10'd200};
      items[1] = {3'd2, 1'b1, 1'b0, 1'b0, 12'd0, 6'h21};
      items[2] = {3'd3, 1'b1, 1'b0, 1'b1, 9'sd40, -9'sd20};
      items[3] = {3'd2, 1'b0, 1'b1, 1'b0, 12'd0, 6'h11};
      items[4] = 24'h0;
      for (int i = 0; i < 5; i++) begin
        @(negedge clk) dsp_we = 1; dsp_addr = 9'(i); dsp_wdata = items[i];
      end
      @(negedge clk) dsp_we = 0;
    end
    frames_lit = 0;
    wait_clks(3 * 66_667 + 100);
    check(frames_lit >= 2, $sformatf("%0d refreshed frames", frames_lit));
    if (frames_lit >= 2) mech[M_REFRESH]++;
    check(pen_irq && pen_addr == 2, $sformatf("light pen item %0d", pen_addr));
    if (pen_irq && pen_addr == 2) mech[M_PEN]++;
    @(negedge clk) pen_ack = 1; @(negedge clk) pen_ack = 0;

    check(rice_perr == '0, "no parity errors");
    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-14s %0d", mech_e'(i), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s happened", mech_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
