// tb_ciu: the Computer Interface Unit with 55 behavioural remote units on its
// lines. Each remote decodes frames on its data/timing pair and answers a
// collect by shifting its own 13-bit word back on the return line. Checks a
// data take from all modules collected in parallel and block-transferred to
// the computer (contents, order, and the whole sequence under the 250 us the
// document gives for 10 status bits from 55 modules), a group collect leaving
// other buffer words alone, the command busy flag from issue to completion
// interrupt, and the cycle clock.
module tb_ciu;
  import lampf_pkg::*;
  localparam int N = 55;
  logic clk = 0, rst_n = 0, we0 = 0, we1 = 0, master_pulse = 0, cmd_irq_ack = 0, btc_start = 0;
  logic [15:0] wdata = '0, cycle_count, btc_data;
  logic req_busy, req_done, cmd_irq, btc_valid, btc_done, collect_done, buf_busy, cyc_tick;
  logic [N-1:0] cmd_busy, cmd_done, sd, sc, rd = '0, cbusy = '0;
  logic [RET_W-1:0] resp [N];
  logic [15:0] got [N];
  int checks = 0, failures = 0;

  ciu #(.N(N)) dut (.clk, .rst_n, .cpu_wdata(wdata), .cpu_we0(we0), .cpu_we1(we1),
    .req_busy, .req_done, .cycle_count, .cmd_busy, .cmd_done, .cmd_irq, .cmd_irq_ack,
    .btc_start, .btc_data, .btc_valid, .btc_done, .collect_done, .buf_busy, .cyc_tick,
    .master_pulse, .sd, .sc, .rd, .cbusy);
  always #125 clk = ~clk;   // 4 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // behavioural remote units
  logic [N-1:0] sc_q = '0;
  int bitn [N], txn [N];
  logic hdr [N];
  logic [RET_W-1:0] sh [N];
  initial for (int m = 0; m < N; m++) begin bitn[m] = 0; txn[m] = 0; end
  always @(posedge clk) begin
    sc_q <= sc;
    for (int m = 0; m < N; m++) if (sc[m] && !sc_q[m]) begin
      if (txn[m] > 0) begin
        rd[m] <= sh[m][RET_W-1]; sh[m] <= sh[m] << 1; txn[m]--;
      end else if (bitn[m] == 0) begin
        hdr[m] = sd[m]; bitn[m] = 1;
      end else if (bitn[m] == 1) begin
        bitn[m] = 0;
        case ({hdr[m], sd[m]})
          2'b01: bitn[m] = 2;              // instruction: skip 21 more bits
          2'b11: begin txn[m] = RET_W; sh[m] = resp[m]; end
          default: ;
        endcase
      end else if (bitn[m] == 22) bitn[m] = 0;
      else bitn[m]++;
    end
  end

  task automatic request(input int op, int modf, int ch, input logic [15:0] w1);
    @(negedge clk) we0 = 1; wdata = {3'(op), 6'(modf), 6'(ch), 1'b0};
    @(negedge clk) we0 = 0; we1 = 1; wdata = w1;
    @(negedge clk) we1 = 0;
    while (!req_done) @(negedge clk);
  endtask

  task automatic block_transfer();
    int i;
    @(negedge clk) btc_start = 1;
    @(negedge clk) btc_start = 0;
    i = 0;
    while (!btc_done) begin
      @(posedge clk); #1;
      if (btc_valid) begin got[i] = btc_data; i++; end
    end
    check(i == N, "55 words");
  endtask

  function automatic logic [15:0] fmt(input logic [RET_W-1:0] r);
    return {r[12], r[11], 3'b000, r[10], r[9:0]};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 10 binary status bits from every module: DTK + convert, collect, block transfer
    for (int m = 0; m < N; m++) resp[m] = {1'b1, 2'b00, 10'($urandom)};
    t0 = $time;
    request(2, 63, CH_BIN0, 16'd0);
    request(4, 63, 0, 16'd0);
    while (buf_busy) @(negedge clk);
    block_transfer();
    t = ($time - t0) / 250;
    for (int m = 0; m < N; m++) check(got[m] == fmt(resp[m]), $sformatf("module %0d word", m));
    check(t * 250 < 250_000, $sformatf("55-module binary scan took %0d ns", t * 250));
    // group collect: LF modules only change
    for (int m = 0; m < N; m++) resp[m] = RET_W'($urandom);
    request(4, 56, 0, 16'd0);
    while (buf_busy) @(negedge clk);
    begin
      logic [15:0] prev_words [N];
      prev_words = got;
      block_transfer();
      for (int m = 0; m < N; m++)
        check(got[m] == ((m >= 5 && m < 9) ? fmt(resp[m]) : prev_words[m]), $sformatf("group word %0d", m));
    end
    // command busy
    request(1, 12, CH_BOUT0, 16'h0123);
    check(cmd_busy == N'(1) << 12 && !cmd_irq, "busy flag set");
    repeat (10) @(negedge clk); cbusy[12] = 1;
    repeat (100) @(negedge clk);
    check(cmd_busy[12] && !cmd_irq, "busy while remote executes");
    cbusy[12] = 0;
    repeat (5) @(negedge clk);
    check(!cmd_busy[12] && cmd_irq && cmd_done == N'(1) << 12, "completion interrupt");
    @(negedge clk) cmd_irq_ack = 1; @(negedge clk) cmd_irq_ack = 0;
    check(!cmd_irq, "ack");
    // cycle clock
    @(negedge clk) master_pulse = 1; @(negedge clk) master_pulse = 0;
    repeat (7 * 100) @(negedge clk);
    check(cycle_count >= 99 && cycle_count <= 101, $sformatf("cycle clock %0d after 175 us", cycle_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
