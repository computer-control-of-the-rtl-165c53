// tb_watchdog_timer: loads the watchdog, lets it run down at a fast tick and
// checks the count, the interrupt exactly at zero, reload before zero (no
// interrupt), and acknowledge.
module tb_watchdog_timer;
  logic clk = 0, rst_n = 0, tick = 0, load = 0, ack = 0;
  logic [15:0] value, count;
  logic irq;
  int checks = 0, failures = 0;

  watchdog_timer dut (.clk, .rst_n, .tick_20k(tick), .load, .load_value(value),
                      .irq_ack(ack), .count, .irq);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_load(input int v);
    @(negedge clk) value = 16'(v); load = 1;
    @(negedge clk) load = 0;
  endtask

  task automatic ticks(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_load(20000);
    check(count == 20000 && !irq, "loaded 20000 (one second at 20 kc)");
    ticks(19999);
    check(count == 1 && !irq, "one count left");
    ticks(1);
    check(count == 0 && irq, "interrupt at zero");
    ticks(5);
    check(count == 0 && irq, "stays at zero");
    @(negedge clk) ack = 1; @(negedge clk) ack = 0;
    check(!irq, "ack clears");
    // executive reloads in time: no interrupt
    for (int k = 0; k < 4; k++) begin
      do_load(300);
      ticks(250);
      check(!irq && count == 50, "reload in time");
    end
    ticks(50);
    check(irq, "late reload -> interrupt");
    do_load(10);
    check(!irq && count == 10, "reload clears interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
