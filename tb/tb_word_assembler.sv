// tb_word_assembler: writes request words as the computer would and decodes
// what appears on every module's data/timing pair (one bit per rising timing
// edge). Checks frame contents and odd parity against an independent model,
// module selection (single, group, all), the command-issue strobe, the DTK
// convert delayed to the cycle-clock value after the next master pulse, the
// collect timing pulses with their sample strobes, and the 1.75 us bit time.
module tb_word_assembler;
  import lampf_pkg::*;
  localparam int N = 55, BC = 7;
  logic clk = 0, rst_n = 0, we0 = 0, we1 = 0, master_pulse = 0;
  logic [15:0] wdata = '0, cycle_count = '0;
  logic busy, req_done, cmd_issue, sample_bit, collect_last;
  logic [N-1:0] sd, sc, sel_mask, sc_q = '0;
  int checks = 0, failures = 0;
  int nissue = 0, nsample = 0, nlast = 0;
  bit rx [N][$];
  longint cyc = 0;

  word_assembler #(.N(N), .BIT_CLKS(BC)) dut (.clk, .rst_n, .cpu_wdata(wdata),
    .cpu_we0(we0), .cpu_we1(we1), .busy, .req_done, .master_pulse, .cycle_count,
    .sd, .sc, .cmd_issue, .sel_mask, .sample_bit, .collect_last);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // line monitor
  always @(posedge clk) begin
    cyc++;
    sc_q <= sc;
    for (int m = 0; m < N; m++)
      if (sc[m] && !sc_q[m]) begin
        rx[m].push_back(sd[m]);
      end
    if (cmd_issue && rst_n) nissue++;
    if (sample_bit) nsample++;
    if (collect_last) nlast++;
  end

  function automatic logic [N-1:0] ref_mask(input int f);
    logic [N-1:0] r = '0;
    for (int i = 0; i < N; i++)
      r[i] = (f < 55) ? (i == f) : (f == 55) ? (i < 4) : (f == 56) ? (i >= 5 && i < 9) :
             (f == 57) ? (i >= 9 && i < 54) : (f == 63);
    return r;
  endfunction

  function automatic void instr_bits(ref bit q[$], input int fn, int ch, int fl, int arg);
    logic [19:0] p;
    p = {2'(fn), 6'(ch), 2'(fl), 10'(arg)};
    q.push_back(0); q.push_back(1);
    for (int i = 19; i >= 0; i--) q.push_back(p[i]);
    q.push_back(~(^p));
  endfunction

  task automatic request(input int op, int modf, int ch, bit sync, input logic [15:0] w1);
    for (int m = 0; m < N; m++) rx[m].delete();
    @(negedge clk) we0 = 1; wdata = {3'(op), 6'(modf), 6'(ch), sync};
    @(negedge clk) we0 = 0; we1 = 1; wdata = w1;
    @(negedge clk) we1 = 0;
  endtask

  task automatic wait_done(output int clocks);
    clocks = 1;
    while (!req_done) begin @(negedge clk); clocks++; end
  endtask

  task automatic check_lines(input logic [N-1:0] mask, ref bit exp[$], input string what);
    for (int m = 0; m < N; m++) begin
      if (mask[m]) check(rx[m] == exp, $sformatf("%s: module %0d got %0d bits", what, m, rx[m].size()));
      else         check(rx[m].size() == 0, $sformatf("%s: module %0d not selected", what, m));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit exp[$];
    int clocks;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // CMD to one module
    request(1, 7, 45, 0, {4'b0, 2'b01, 10'h2A5});
    wait_done(clocks);
    exp.delete(); instr_bits(exp, 1, 45, 1, 'h2A5);
    check_lines(ref_mask(7), exp, "CMD");
    check(nissue == 1, $sformatf("command issue strobe %0d", nissue));
    check(clocks >= 23 * BC && clocks <= 23 * BC + 3, $sformatf("23-bit frame took %0d clocks", clocks));
    // VDO to the HF group; a write while busy is ignored
    request(3, 57, 12, 0, {4'b0, 2'b10, 10'h000});
    @(negedge clk) we0 = 1; wdata = 16'hFFFF; @(negedge clk) we0 = 0; we1 = 1; @(negedge clk) we1 = 0;
    wait_done(clocks);
    exp.delete(); instr_bits(exp, 3, 12, 2, 0);
    check_lines(ref_mask(57), exp, "VDO group");
    check(nissue == 1, $sformatf("no issue for VDO %0d", nissue));
    // DTK to all, convert at once
    request(2, 63, 33, 0, 16'h0000);
    wait_done(clocks);
    exp.delete(); instr_bits(exp, 2, 33, 0, 0); exp.push_back(1); exp.push_back(0);
    check_lines(ref_mask(63), exp, "DTK all");
    // DTK to injectors, convert 40 cycles after the next master pulse
    request(2, 55, 3, 1, 16'd40);
    repeat (400) @(negedge clk);
    check(busy, "waiting for pulse");
    master_pulse = 1; cycle_count = 0;
    @(negedge clk) master_pulse = 0;
    clocks = 0;
    while (!req_done) begin
      @(negedge clk);
      clocks++;
      if (clocks % BC == 0) cycle_count++;
    end
    exp.delete(); instr_bits(exp, 2, 3, 0, 0); exp.push_back(1); exp.push_back(0);
    check_lines(ref_mask(55), exp, "DTK sync");
    // the convert frame starts when the cycle clock reaches 40
    begin
      check(clocks >= 40 * BC && clocks <= 40 * BC + 2 * BC + 4,
            $sformatf("convert %0d clocks after pulse", clocks));
    end
    // COLLECT from LF group
    nsample = 0; nlast = 0;
    request(4, 56, 0, 0, 16'h0000);
    wait_done(clocks);
    exp.delete(); exp.push_back(1); exp.push_back(1);
    for (int i = 0; i < RET_W; i++) exp.push_back(0);
    check_lines(ref_mask(56), exp, "COLLECT");
    @(negedge clk);
    check(nsample == RET_W && nlast == 1, $sformatf("%0d samples", nsample));
    check(sel_mask == ref_mask(56), "sel_mask");
    check(clocks >= (2 + RET_W) * BC && clocks <= (2 + RET_W) * BC + 3, "collect length");
    // NOP
    request(0, 1, 1, 0, 0);
    @(negedge clk);
    check(!busy, "nop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
