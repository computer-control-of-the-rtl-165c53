// tb_display_controller: loads a short display list (position, two characters
// of different size, a vector, end) and checks over several refresh frames:
// the dots drawn for each character against an independently written 5x7
// pattern, big characters at double pitch, the character advance, the vector
// start point and displacement, 28 us (112 clocks) per item, one scan per
// frame tick, and the light pen reporting the address of a pen-visible item
// and ignoring an invisible one.
module tb_display_controller;
  localparam int FR = 2000;
  logic clk = 0, rst_n = 0, cpu_we = 0, pen_hit = 0, irq_ack = 0;
  logic [8:0] cpu_addr = '0, pen_addr;
  logic [23:0] cpu_wdata = '0;
  logic [9:0] beam_x, beam_y;
  logic unblank, bright, vec_start, pen_irq, frame_start, scanning;
  logic signed [8:0] vec_dx, vec_dy;
  int checks = 0, failures = 0;

  display_controller #(.FRAME_CLKS(FR)) dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata,
    .beam_x, .beam_y, .unblank, .bright, .vec_start, .vec_dx, .vec_dy, .pen_hit,
    .irq_ack, .pen_addr, .pen_irq, .frame_start, .scanning);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [23:0] d);
    @(negedge clk) cpu_we = 1; cpu_addr = 9'(a); cpu_wdata = d;
    @(negedge clk) cpu_we = 0;
  endtask

  // expected dot sets: "A" and "1", columns left to right, bit 0 = top row
  logic [6:0] glyph_a [5] = '{7'h7E, 7'h11, 7'h11, 7'h11, 7'h7E};
  logic [6:0] glyph_1 [5] = '{7'h00, 7'h42, 7'h7F, 7'h40, 7'h00};

  // drawn dots per frame, indexed by screen position relative to the origin
  bit drawn_a [16][16], drawn_1 [16][16];
  int nscan = 0, nvec = 0, vec_x = -1, vec_y = -1, vdx = 0, vdy = 0;
  int t_item_start [$];
  always @(posedge clk) begin
    if (dut.st == 2'd1) t_item_start.push_back($time / 10);
    if (frame_start && !scanning) nscan++;
    if (unblank && dut.op == 3'd2) begin
      if (dut.word[5:0] == 6'h21) drawn_a[beam_x - 100][beam_y - 200] = 1;
      if (dut.word[5:0] == 6'h11) drawn_1[beam_x - 106][beam_y - 200] = 1;
    end
    if (vec_start && rst_n) begin nvec++; vec_x = beam_x; vec_y = beam_y; vdx = vec_dx; vdy = vec_dy; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(0, {3'd1, 1'b0, 10'd100, 10'd200});                 // POS 100,200
    wr(1, {3'd2, 1'b1, 1'b0, 1'b0, 12'd0, 6'h21});        // 'A' bright, small, not pen-visible
    wr(2, {3'd2, 1'b0, 1'b1, 1'b1, 12'd0, 6'h11});        // '1' big, pen-visible
    wr(3, {3'd3, 1'b1, 1'b0, 1'b1, 9'sd10, -9'sd5});       // vector, pen-visible
    wr(4, 24'h0);                                          // END
    while (!frame_start) @(negedge clk);
    t_item_start.delete();
    // pen held during the whole of 'A': not visible -> no interrupt
    while (!(dut.st == 2'd2 && dut.addr == 1)) @(negedge clk);
    pen_hit = 1;
    while (dut.addr == 1) @(negedge clk);
    pen_hit = 0;
    check(!pen_irq, "invisible item ignored by light pen");
    // pen on the vector
    while (!(dut.st == 2'd2 && dut.addr == 3)) @(negedge clk);
    repeat (20) @(negedge clk);
    pen_hit = 1; @(negedge clk) pen_hit = 0;
    @(negedge clk);
    check(pen_irq && pen_addr == 3, $sformatf("light pen address %0d", pen_addr));
    while (scanning) @(negedge clk);
    check(t_item_start.size() == 5, $sformatf("%0d items fetched", t_item_start.size()));
    check(t_item_start[2] - t_item_start[1] == 112, $sformatf("char item %0d clocks", t_item_start[2] - t_item_start[1]));
    check(t_item_start[4] - t_item_start[3] == 112, "vector item 112 clocks");
    for (int c = 0; c < 5; c++)
      for (int r = 0; r < 7; r++) begin
        check(drawn_a[c][6 - r] == glyph_a[c][r], $sformatf("A dot c%0d r%0d", c, r));
        check(drawn_1[2 * c][2 * (6 - r)] == glyph_1[c][r], $sformatf("1 dot c%0d r%0d", c, r));
      end
    check(nvec == 1 && vec_x == 106 + 12 && vec_y == 200 && vdx == 10 && vdy == -5,
          $sformatf("vector from %0d,%0d by %0d,%0d", vec_x, vec_y, vdx, vdy));
    @(negedge clk) irq_ack = 1; @(negedge clk) irq_ack = 0;
    check(!pen_irq, "ack");
    // more frames: one scan each
    nscan = 0;
    repeat (3 * FR) @(negedge clk);
    check(nscan == 3, $sformatf("%0d scans in 3 frames", nscan));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
