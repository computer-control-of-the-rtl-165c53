// tb_rice: drives one RICE through its serial lines like the CIU (1.75 us bit,
// timing high for 3 of 7 clocks) with a behavioural RICE I/O around it, and
// checks every function: binary CMD held until the device feedback matches
// and then released, pulse CMD (count, line, direction, command busy), a
// priority CMD replacing a running one, DTK + convert on analog, binary-in
// and binary-out channels with collect of the data register, VDO, and a
// frame with bad parity being refused and reported.
module tb_rice;
  import lampf_pkg::*;
  localparam int BC = 7, PP = 20, PWID = 5, ADC_CLKS = 30, RELAY_CLKS = 40;
  logic clk = 0, rst_n = 0, sd = 0, sc = 0;
  logic rd, cbusy, adc_start, adc_busy = 0, adc_done = 0, adc_sign = 0, perr;
  logic [4:0] adc_chan;
  logic [MAG_W-1:0] adc_mag = '0;
  logic [N_BIN-1:0][ARG_W-1:0] bin_data;
  logic bout_load, pulse_on, pulse_cw_sel, vdo_load, vdo_cable;
  logic [1:0] bout_idx;
  logic [ARG_W-1:0] bout_value;
  logic [N_BOUT-1:0] bout_hold;
  logic [N_BOUT-1:0][ARG_W-1:0] bout_state = '0;
  logic [3:0] pulse_idx;
  logic [CH_W-1:0] vdo_chan;
  int checks = 0, failures = 0;
  int npulse = 0, last_vdo_chan = -1, last_vdo_cable = -1;
  int ain [N_AIN];

  rice #(.PULSE_PERIOD(PP), .PULSE_WIDTH(PWID)) dut (.clk, .rst_n, .sd, .sc, .rd, .cbusy,
    .adc_start, .adc_chan, .adc_busy, .adc_done, .adc_sign, .adc_mag, .bin_data,
    .bout_load, .bout_idx, .bout_value, .bout_hold, .bout_state, .pulse_on,
    .pulse_idx, .pulse_cw_sel, .vdo_load, .vdo_cable, .vdo_chan, .perr);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- behavioural RICE I/O and module equipment
  always @(posedge clk) begin : adc_model
    if (adc_start) begin
      adc_busy <= 1;
      fork begin
        int v;
        v = ain[adc_chan];
        repeat (ADC_CLKS) @(posedge clk);
        adc_sign <= v < 0; adc_mag <= 10'(v < 0 ? -v : v);
        adc_done <= 1; adc_busy <= 0;
        @(posedge clk) adc_done <= 0;
      end join_none
    end
  end
  always @(posedge clk) if (bout_load) begin
    fork begin
      int i; logic [9:0] v;
      i = bout_idx; v = bout_value;
      repeat (RELAY_CLKS) @(posedge clk);
      bout_state[i] <= v;     // relays follow the command
    end join_none
  end
  logic pulse_q = 0;
  int pulse_line = -1;
  always @(posedge clk) begin
    pulse_q <= pulse_on;
    if (pulse_on && !pulse_q) begin
      npulse++;
      pulse_line = pulse_idx * 2 + pulse_cw_sel;
    end
    if (vdo_load) begin last_vdo_chan = vdo_chan; last_vdo_cable = vdo_cable; end
  end

  // ---- CIU-side serial driver
  task automatic send_bit(input bit b);
    @(negedge clk) sd = b; sc = 1;
    repeat (3) @(negedge clk);
    sc = 0;
    repeat (3) @(negedge clk);
  endtask
  task automatic send_instr(input int fn, int ch, int fl, int arg, bit bad_parity = 0);
    logic [19:0] p;
    p = {2'(fn), 6'(ch), 2'(fl), 10'(arg)};
    send_bit(0); send_bit(1);
    for (int i = 19; i >= 0; i--) send_bit(p[i]);
    send_bit(~(^p) ^ bad_parity);
  endtask
  task automatic send_convert(); send_bit(1); send_bit(0); endtask
  task automatic collect(output logic [RET_W-1:0] w);
    send_bit(1); send_bit(1);
    w = '0;
    for (int i = 0; i < RET_W; i++) begin
      @(negedge clk) sd = 0; sc = 1;
      repeat (3) @(negedge clk);
      sc = 0;
      repeat (3) @(negedge clk);
      w = {w[RET_W-2:0], rd};   // sampled at the end of the bit
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [RET_W-1:0] w;
    int t;
    for (int i = 0; i < N_AIN; i++) ain[i] = (i * 97 % 2047) - 1023;
    for (int i = 0; i < N_BIN; i++) bin_data[i] = 10'(i * 77 + 5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!cbusy, "idle");

    // binary command to binary output channel 2 (address 46)
    send_instr(FN_CMD, CH_BOUT0 + 2, 0, 10'h155);
    repeat (8) @(negedge clk);
    check(cbusy && bout_hold == 3'b100, "binary command held");
    t = 0;
    while (cbusy && t < 500) begin @(negedge clk); t++; end
    check(bout_state[2] == 10'h155 && bout_hold == 0, "released on match");
    check(t >= RELAY_CLKS - 12 && t < RELAY_CLKS + 10, $sformatf("release after %0d clocks", t));

    // pulse command: 7 pulses clockwise on pulse output 4
    npulse = 0;
    send_instr(FN_CMD, CH_PULSE0 + 4, 1, 7);
    repeat (4) @(negedge clk);
    check(cbusy, "busy while pulsing");
    while (cbusy) @(negedge clk);
    check(npulse == 7 && pulse_line == 4 * 2 + 1, $sformatf("%0d pulses line %0d", npulse, pulse_line));
    // counter-clockwise, replaced after a few pulses by a priority command
    npulse = 0;
    send_instr(FN_CMD, CH_PULSE0 + 14, 0, 100);
    repeat (3 * PP) @(negedge clk);
    send_instr(FN_CMD, CH_PULSE0 + 1, 0, 2);
    while (cbusy) @(negedge clk);
    check(pulse_line == 1 * 2 + 0, "priority command took over");
    check(npulse < 100 && npulse >= 2, $sformatf("aborted count %0d", npulse));

    // data take, analog channels
    for (int k = 0; k < 4; k++) begin
      int ch;
      ch = (k * 11 + 3) % N_AIN;
      send_instr(FN_DTK, CH_AIN0 + ch, 0, 0);
      collect(w);
      check(w[12] == 0, "not valid before convert");
      send_convert();
      repeat (ADC_CLKS + 10) @(negedge clk);
      collect(w);
      check(w[12] == 1 && w[11] == 0 && w[10] == (ain[ch] < 0) &&
            int'(w[9:0]) == (ain[ch] < 0 ? -ain[ch] : ain[ch]),
            $sformatf("analog ch %0d = %h", ch, w));
    end
    // binary input channel
    send_instr(FN_DTK, CH_BIN0 + 6, 0, 0);
    send_convert();
    collect(w);
    check(w == {1'b1, 1'b0, 1'b0, bin_data[6]}, "binary input channel");
    // binary output channel read back
    send_instr(FN_DTK, CH_BOUT0 + 2, 0, 0);
    send_convert();
    collect(w);
    check(w == {3'b100, 10'h155}, "binary output state");

    // video select
    send_instr(FN_VDO, 6, 1, 0);
    repeat (6) @(negedge clk);
    check(last_vdo_chan == 6 && last_vdo_cable == 1, "VDO");

    // bad parity: refused and reported
    send_instr(FN_CMD, CH_BOUT0, 0, 10'h3FF, 1);
    repeat (6) @(negedge clk);
    check(perr && !cbusy && bout_hold == 0, "parity error refused");
    collect(w);
    check(w[11] == 1, "parity error reported in return word");
    send_instr(FN_VDO, 2, 0, 0);
    repeat (6) @(negedge clk);
    check(!perr && last_vdo_chan == 2 && last_vdo_cable == 0, "good frame clears error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
