// tb_cycle_clock: checks the Cycle Clock against a reference count: it counts
// computer-cycle ticks, clears on the master pulse, is read without being
// disturbed, and holds at all ones.
module tb_cycle_clock;
  logic clk = 0, rst_n = 0, master_pulse = 0, cyc_tick = 0;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_count;

  cycle_clock dut (.clk, .rst_n, .master_pulse, .cyc_tick, .count);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ref_count = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1.75 us cycle = every 7th clock
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) master_pulse = 1; ref_count = 0;
      @(negedge clk) master_pulse = 0;
      for (int c = 0; c < 7 * (100 + 37 * k); c++) begin
        @(negedge clk);
        cyc_tick = (c % 7 == 6);
        if (cyc_tick) ref_count++;
        @(posedge clk); #1;
        check(count == 16'(ref_count), $sformatf("count %0d exp %0d", count, ref_count));
      end
      cyc_tick = 0;
    end
    // pulse period 8.33 ms = 4760 cycles fits 16 bits
    check(ref_count < 65536, "range");
    // saturation
    @(negedge clk) master_pulse = 1; @(negedge clk) master_pulse = 0;
    cyc_tick = 1;
    repeat (65540) @(negedge clk);
    check(count == 16'hFFFF, "holds at all ones");
    cyc_tick = 0;
    @(negedge clk) master_pulse = 1; @(negedge clk) master_pulse = 0;
    check(count == 0, "cleared by master pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
