// tb_ciu_data_buffer: shifts 13-bit return words in on all 55 return lines at
// once, then checks the buffer through a block transfer: word order, word
// layout, locations of unselected modules left alone, the one-word-per-
// computer-cycle rate (7 clocks = 1.75 us) and the done strobes.
module tb_ciu_data_buffer;
  import lampf_pkg::*;
  localparam int N = 55;
  logic clk = 0, rst_n = 0, sample_bit = 0, collect_last = 0, cyc_tick = 0, btc_start = 0;
  logic [N-1:0] rd = '0, sel_mask = '0;
  logic collect_done, btc_valid, btc_done, xfer_busy;
  logic [15:0] btc_data;
  logic [RET_W-1:0] word [N];
  logic [15:0] expect_mem [N];
  int checks = 0, failures = 0;

  ciu_data_buffer #(.N(N)) dut (.clk, .rst_n, .rd, .sel_mask, .sample_bit,
    .collect_last, .collect_done, .cyc_tick, .btc_start, .btc_data, .btc_valid,
    .btc_done, .xfer_busy);
  always #5 clk = ~clk;

  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph == 6) ? 0 : ph + 1;
    cyc_tick <= (ph == 6);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic collect(input logic [N-1:0] mask);
    int t;
    for (int m = 0; m < N; m++) begin
      word[m] = RET_W'({$urandom});
      if (mask[m])
        expect_mem[m] = {word[m][12], word[m][11], 3'b000, word[m][10], word[m][9:0]};
    end
    @(negedge clk) sel_mask = mask;
    for (int b = RET_W - 1; b >= 0; b--) begin
      for (int m = 0; m < N; m++) rd[m] = word[m][b];
      repeat (3) @(negedge clk);
      sample_bit = 1; collect_last = (b == 0);
      @(negedge clk) sample_bit = 0; collect_last = 0;
      for (int m = 0; m < N; m++) rd[m] = $urandom;   // line changes between samples
    end
    t = 0;
    while (!collect_done) begin @(negedge clk); t++; end
    check(t <= N + 2, $sformatf("buffer fill took %0d clocks", t));
  endtask

  task automatic unload();
    int idx, last_t, t, gaps_ok;
    @(negedge clk) btc_start = 1;
    @(negedge clk) btc_start = 0;
    idx = 0; t = 0; last_t = -1; gaps_ok = 1;
    while (!btc_done && t < 2000) begin
      @(posedge clk); #1; t++;
      if (btc_valid) begin
        check(btc_data == expect_mem[idx], $sformatf("word %0d = %h exp %h", idx, btc_data, expect_mem[idx]));
        if (last_t >= 0 && t - last_t != 7) gaps_ok = 0;
        last_t = t;
        idx++;
      end
    end
    check(idx == N, $sformatf("%0d words transferred", idx));
    check(gaps_ok == 1, "one word per computer cycle");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    collect({N{1'b1}});
    unload();
    collect({N{1'b1}} << 9 & ~({N{1'b1}} << 54));  // HF modules only
    unload();
    collect(N'(1) << 5);
    unload();
    check(!xfer_busy, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
