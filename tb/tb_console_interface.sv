// tb_console_interface: presses buttons with thumbwheel settings and checks the
// two buffer words, the interrupt, read-clear, overrun, and the Up/Down
// auto-repeat: one request for a momentary press, one per repeat period while
// held (10 per second at the default, i.e. 1 %/s at 0.1 % per request).
module tb_console_interface;
  localparam int REP = 50;
  logic clk = 0, rst_n = 0, cpu_read = 0;
  logic [31:0] btn = '0;
  logic [3:0][23:0] tw;
  logic [15:0] buf0, buf1;
  logic irq, overrun;
  int checks = 0, failures = 0, nreq;

  console_interface #(.REPEAT_CLKS(REP)) dut (.clk, .rst_n, .btn, .tw, .cpu_read,
    .buf0, .buf1, .irq, .overrun);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic read();
    @(negedge clk) cpu_read = 1;
    @(negedge clk) cpu_read = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tw[0] = 24'h01_06_00;   // module 1, channel 6
    tw[1] = 24'h24_13_00;
    tw[2] = 24'h05_61_45;
    tw[3] = 24'h12_33_07;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 32; b += 5) begin
      @(negedge clk) btn[b] = 1;
      @(negedge clk) btn[b] = 0;
      check(irq, "interrupt");
      check(buf0 == {8'(b), tw[b / 8][23:16]} && buf1 == tw[b / 8][15:0],
            $sformatf("buffers for button %0d", b));
      read();
      check(!irq, "read clears");
    end
    // overrun
    @(negedge clk) btn[3] = 1; @(negedge clk) btn[3] = 0;
    @(negedge clk) btn[4] = 1; @(negedge clk) btn[4] = 0;
    check(irq && overrun && buf0[15:8] == 8'd3, "overrun keeps first request");
    read();
    check(!overrun, "overrun cleared");
    // momentary Up press: exactly one request
    nreq = 0;
    @(negedge clk) btn[8] = 1;
    @(negedge clk) btn[8] = 0;
    for (int i = 0; i < 3 * REP; i++) begin
      @(negedge clk);
      if (irq) begin nreq++; check(buf0[15:8] == 8'd8, "up code"); read(); end
    end
    check(nreq == 1, $sformatf("momentary press -> %0d requests", nreq));
    // held Down: one at press, then one per REP clocks
    nreq = 0;
    @(negedge clk) btn[9] = 1;
    for (int i = 0; i < 10 * REP; i++) begin
      @(negedge clk);
      if (irq) begin nreq++; cpu_read = 1; @(negedge clk); cpu_read = 0; i++; end
    end
    btn[9] = 0;
    check(nreq == 10 || nreq == 11, $sformatf("held button -> %0d requests in 10 periods", nreq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
