// tb_fast_shutdown: a fault must reach the injector inhibit with no clock edge
// in between, stay latched after the fault clears, record the module, raise
// one interrupt, and release only on reset with no fault present.
module tb_fast_shutdown;
  localparam int N = 55;
  logic clk = 0, rst_n = 0, reset_req = 0, irq_ack = 0;
  logic [N-1:0] fault = '0, tripped;
  logic inj_inhibit, irq;
  int checks = 0, failures = 0;

  fast_shutdown #(.N(N)) dut (.clk, .rst_n, .fault, .reset_req, .irq_ack,
                              .inj_inhibit, .tripped, .irq);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!inj_inhibit && !irq, "idle");
    for (int m = 0; m < 3; m++) begin
      int mod;
      mod = (m * 23 + 7) % N;
      // fault between clock edges: inhibit must follow within 1 time unit
      @(posedge clk) #10 fault[mod] = 1;
      #1 check(inj_inhibit, "combinational inhibit");
      @(posedge clk) #10 fault[mod] = 0;
      #1 check(inj_inhibit, "inhibit latched");
      @(posedge clk) #1;
      check(irq && tripped[mod] && $countones(tripped) == 1, "irq and trip record");
      @(negedge clk) irq_ack = 1; @(negedge clk) irq_ack = 0;
      check(!irq, "ack");
      // reset refused while a fault is present
      @(negedge clk) fault[(mod + 1) % N] = 1; reset_req = 1;
      @(negedge clk) reset_req = 0;
      check(inj_inhibit && tripped[(mod + 1) % N], "reset refused during fault");
      @(negedge clk) fault = '0;
      @(negedge clk) reset_req = 1;
      @(negedge clk) reset_req = 0;
      #1 check(!inj_inhibit && tripped == '0, "released by reset");
      @(negedge clk) irq_ack = 1; @(negedge clk) irq_ack = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
