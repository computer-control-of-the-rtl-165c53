// tb_vcu: switches both cables between video inputs and checks break before
// make (all of the cable's relays open for BBM_CLKS), the one-hot make, the
// other cable left alone, and disconnect for signal 0.
module tb_vcu;
  import lampf_pkg::*;
  localparam int NV = 16, BBM = 20;
  logic clk = 0, rst_n = 0, vdo_load = 0, vdo_cable = 0;
  logic [CH_W-1:0] vdo_chan = '0;
  logic [NV-1:0] up, lo;
  logic [1:0] sw;
  int checks = 0, failures = 0;

  vcu #(.N_VIDEO(NV), .BBM_CLKS(BBM)) dut (.clk, .rst_n, .vdo_load, .vdo_cable,
    .vdo_chan, .relay_upper(up), .relay_lower(lo), .switching(sw));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic select(input bit cable, input int ch);
    logic [NV-1:0] other;
    other = cable ? up : lo;
    @(negedge clk) vdo_load = 1; vdo_cable = cable; vdo_chan = CH_W'(ch);
    @(negedge clk) vdo_load = 0;
    for (int i = 0; i < BBM; i++) begin
      check((cable ? lo : up) == '0, "break: cable open");
      check((cable ? up : lo) == other, "other cable untouched");
      @(negedge clk);
    end
    @(negedge clk);
    if (ch >= 1 && ch <= NV)
      check((cable ? lo : up) == NV'(1) << (ch - 1), $sformatf("make ch %0d", ch));
    else
      check((cable ? lo : up) == '0, "disconnected");
    check(sw == 2'b00, "switching done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(up == '0 && lo == '0, "reset open");
    select(0, 6);
    select(1, 6);
    select(0, 16);
    select(1, 1);
    select(0, 0);
    select(1, 40);
    select(0, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
