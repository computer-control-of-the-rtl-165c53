// tb_rice_io: checks the RICE I/O chassis: analog input selection and
// conversion through the behavioural multiplexer/comparator (value and
// 130 us conversion time), two-clock resynchronised binary inputs and
// feedback, binary output latches and the command-active line, and pulse routing
// to the clockwise or counter-clockwise line of the addressed output.
module tb_rice_io;
  import lampf_pkg::*;
  logic clk = 0, rst_n = 0, adc_start = 0, bout_load = 0, pulse_on = 0, pulse_cw_sel = 0;
  logic [4:0] adc_chan = '0, amux_sel;
  logic adc_busy, adc_done, adc_sign, sampling, dac_sign, cmp;
  logic [MAG_W-1:0] adc_mag, dac_mag;
  logic [N_BIN-1:0][ARG_W-1:0] bin_data, bin_in = '0;
  logic [1:0] bout_idx = '0;
  logic [ARG_W-1:0] bout_value = '0;
  logic [N_BOUT-1:0] bout_hold = '0, bout_active;
  logic [N_BOUT-1:0][ARG_W-1:0] bout_latch, bout_state, bout_drive, bout_fb = '0;
  logic [3:0] pulse_idx = '0;
  logic [N_PULSE-1:0] pulse_cw, pulse_ccw;
  int vin [32];
  int checks = 0, failures = 0;

  rice_io dut (.clk, .rst_n, .adc_start, .adc_chan, .adc_busy, .adc_done, .adc_sign,
    .adc_mag, .bin_data, .bout_load, .bout_idx, .bout_value, .bout_hold, .bout_latch,
    .bout_state, .pulse_on, .pulse_idx, .pulse_cw_sel, .amux_sel, .sampling,
    .dac_sign, .dac_mag, .cmp, .bin_in, .bout_drive, .bout_active, .bout_fb, .pulse_cw, .pulse_ccw);
  adc_frontend_model fe (.clk, .vin, .amux_sel, .sampling, .dac_sign, .dac_mag, .cmp);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    for (int i = 0; i < 32; i++) vin[i] = (i * 131 % 2047) - 1023;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      int ch;
      ch = (k * 7 + 2) % 32;
      @(negedge clk) adc_start = 1; adc_chan = 5'(ch);
      @(negedge clk) adc_start = 0; adc_chan = 5'(ch + 1);
      check(amux_sel == 5'(ch), "multiplexer select latched");
      t = 1;
      while (!adc_done) begin @(negedge clk); t++; end
      check(adc_sign == (vin[ch] < 0) && int'(adc_mag) == (vin[ch] < 0 ? -vin[ch] : vin[ch]),
            $sformatf("analog %0d: %0d", ch, vin[ch]));
      check(t == 521, $sformatf("conversion %0d clocks", t));
    end
    // binary inputs and feedback: two-clock delay
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      for (int i = 0; i < N_BIN; i++) bin_in[i] = 10'($urandom);
      for (int i = 0; i < N_BOUT; i++) bout_fb[i] = 10'($urandom);
      @(negedge clk);
      check(bin_data != bin_in || k == 99, "not yet through synchroniser");
      @(negedge clk);
      check(bin_data == bin_in && bout_state == bout_fb, "binary inputs after two clocks");
    end
    // binary output latches
    for (int i = 0; i < N_BOUT; i++) begin
      @(negedge clk) bout_load = 1; bout_idx = 2'(i); bout_value = 10'(100 + i * 201);
      @(negedge clk) bout_load = 0;
      check(bout_latch[i] == 10'(100 + i * 201), "latch loaded");
      check(bout_drive[i] == 10'(100 + i * 201) && bout_active == 0, "latched, not active");
      bout_hold = 3'(1 << i);
      #1 check(bout_active == 3'(1 << i), "active while held");
      @(negedge clk) bout_hold = 0;
      #1 check(bout_active == 0 && bout_drive[i] == 10'(100 + i * 201), "released, latch keeps state");
    end
    // pulse routing
    for (int i = 0; i < N_PULSE; i++) begin
      @(negedge clk) pulse_idx = 4'(i); pulse_cw_sel = i[0]; pulse_on = 1;
      #1 check(i[0] ? (pulse_cw == N_PULSE'(1) << i && pulse_ccw == 0)
                    : (pulse_ccw == N_PULSE'(1) << i && pulse_cw == 0), $sformatf("pulse %0d", i));
      @(negedge clk) pulse_on = 0;
      #1 check(pulse_cw == 0 && pulse_ccw == 0, "pulse off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
