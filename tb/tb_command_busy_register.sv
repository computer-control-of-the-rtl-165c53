// tb_command_busy_register: issues commands to sets of units, drives their
// remote busy lines like a RICE would (rise some clocks later, fall when the
// command completes) and checks the flags, the done word, the interrupt and
// the acknowledge against a reference model.
module tb_command_busy_register;
  localparam int N = 55;
  logic clk = 0, rst_n = 0, issue = 0, irq_ack = 0;
  logic [N-1:0] issue_mask = '0, busy_line = '0, busy, done;
  logic irq;
  int checks = 0, failures = 0;

  command_busy_register #(.N(N)) dut (.clk, .rst_n, .issue, .issue_mask,
    .busy_line, .irq_ack, .busy, .done, .irq);
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
    logic [N-1:0] m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      m = {$urandom, $urandom} & {N{1'b1}};
      if (m == '0) m[k] = 1'b1;
      @(negedge clk) issue = 1; issue_mask = m;
      @(negedge clk) issue = 0;
      check(busy == m && done == '0 && !irq, "set on issue");
      // line still low for a while: flag must stay set
      repeat (5) @(negedge clk);
      check(busy == m, "held before remote rises");
      busy_line = m;
      repeat (10) @(negedge clk);
      check(busy == m, "held while remote busy");
      // half the units finish
      busy_line = m & {N{1'b1}} << (N / 2);
      repeat (4) @(negedge clk);
      check(busy == (m & busy_line) && done == (m & ~busy_line) && irq == |(m & ~busy_line),
            "partial completion");
      @(negedge clk) irq_ack = 1;
      @(negedge clk) irq_ack = 0;
      check(done == '0 && !irq, "ack clears done");
      busy_line = '0;
      repeat (4) @(negedge clk);
      check(busy == '0 && done == (m & {N{1'b1}} << (N / 2)), "all complete");
      @(negedge clk) irq_ack = 1;
      @(negedge clk) irq_ack = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
