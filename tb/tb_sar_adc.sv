// tb_sar_adc: converts a set of input levels through the behavioural analog
// front end and checks sign, magnitude (ideal rounding-down SAR result) and
// the conversion time: 20 us sample + 11 decisions of 10 us = 130 us
// (520 clocks of 4 MHz).
module tb_sar_adc;
  logic clk = 0, rst_n = 0, start = 0, cmp, sampling, dac_sign, busy, done, rs;
  logic [9:0] dac_mag, rm;
  int vin [32];
  int checks = 0, failures = 0;

  sar_adc dut (.clk, .rst_n, .start, .cmp, .sampling, .dac_sign, .dac_mag,
               .busy, .done, .result_sign(rs), .result_mag(rm));
  adc_frontend_model fe (.clk, .vin, .amux_sel(5'd3), .sampling, .dac_sign,
                         .dac_mag, .cmp);
  always #125 clk = ~clk;   // 4 MHz: 250 ns

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int vals [12] = '{0, 1, -1, 512, -512, 1023, -1023, 777, -300, 5, 1000, -999};
    int cyc;
    for (int i = 0; i < 32; i++) vin[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (vals[i]) begin
      vin[3] = vals[i];
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(rs == (vals[i] < 0), $sformatf("sign of %0d", vals[i]));
      check(int'(rm) == (vals[i] < 0 ? -vals[i] : vals[i]),
            $sformatf("mag of %0d got %0d", vals[i], rm));
      check(cyc == 1 + 80 + 11 * 40, $sformatf("conversion took %0d clocks", cyc));
      @(negedge clk);
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
