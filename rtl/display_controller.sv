// display_controller: control unit of the Display Scope (digital CRT).
//
// The scope keeps its own 512-word x 24-bit display list, written by the
// computer, and refreshes the picture from it by itself 60 times a second,
// so the computer only writes the words that change. On every frame tick the
// list is scanned from word 0 until an END word (or the last word); each
// character or vector takes ITEM_CLKS clocks including its fetch (28 us at
// 4 MHz), so a full list
// of 512 items (14.3 ms) fits in a 16.7 ms frame.
//
// Display word (this design's layout):
//   [23:21] op  0 END, 1 POS, 2 CHAR, 3 VEC
//   POS : [19:10] x, [9:0] y            beam to an absolute point (2 clocks)
//   CHAR: [20] bright, [19] big, [18] pen-visible, [5:0] code (ASCII-0x20)
//   VEC : [20] bright, [18] pen-visible, [17:9] dx, [8:0] dy (signed)
// Character generator: the 35 dots of the 5x7 matrix are visited column by
// column, DOT_CLKS clocks each, with beam_x/beam_y at the dot and unblank set
// where the glyph has a dot; big characters use a dot pitch of 2. The beam
// then advances 6 (or 12) to the right.
// Vector generator: the analog generator is outside this module; at the start
// of a vector it gets vec_start with the start point (beam_x, beam_y) and the
// displacement (vec_dx, vec_dy), and the beam stays unblanked for the item.
// Light pen: when pen_hit comes while an unblanked, pen-visible item is drawn,
// the item's address is latched in pen_addr and an interrupt raised (held
// until irq_ack; later hits are ignored until then).
// Document: 512 x 24-bit memory, 60/s automatic refresh, vector and 5x7
// character generators, 28 us per item, two intensities, two character sizes,
// light pen reporting the address of the item. Design choice: word layout,
// POS words, END word, dot order and timing, the character advance.
module display_controller #(
  parameter int unsigned WORDS      = 512,
  parameter int unsigned ITEM_CLKS  = 112,     // 28 us at 4 MHz
  parameter int unsigned DOT_CLKS   = 3,       // 35 dots x 3 = 105 <= 112
  parameter int unsigned FRAME_CLKS = 66_667   // 60 frames/s at 4 MHz
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // computer writes the display list
  input  logic                       cpu_we,
  input  logic [$clog2(WORDS)-1:0]   cpu_addr,
  input  logic [23:0]                cpu_wdata,
  // to the CRT deflection and the analog vector generator
  output logic [9:0]                 beam_x,
  output logic [9:0]                 beam_y,
  output logic                       unblank,
  output logic                       bright,
  output logic                       vec_start,
  output logic signed [8:0]          vec_dx,
  output logic signed [8:0]          vec_dy,
  // light pen
  input  logic                       pen_hit,
  input  logic                       irq_ack,
  output logic [$clog2(WORDS)-1:0]   pen_addr,
  output logic                       pen_irq,
  // status
  output logic                       frame_start,  // strobe per refresh
  output logic                       scanning
);
  localparam int AW = $clog2(WORDS);
  localparam int IW = $clog2(ITEM_CLKS + 1);
  localparam int DW = $clog2(DOT_CLKS + 1);

  typedef enum logic [2:0] { OP_END, OP_POS, OP_CHAR, OP_VEC } dop_e;
  typedef enum logic [1:0] { D_IDLE, D_FETCH, D_EXEC } dstate_e;

  logic [23:0]   mem [WORDS];
  logic [23:0]   word;
  logic [AW-1:0] addr;
  dstate_e       st;
  logic [IW-1:0] itmr;
  logic [DW-1:0] dtmr;
  logic [5:0]    dot;      // 0..34
  logic [9:0]    x0, y0;
  logic [2:0]    col, row;
  logic [6:0]    coldots;
  dop_e          op;
  logic          big, pen_vis, in_char, in_vec;

  always_ff @(posedge clk) begin
    if (cpu_we) mem[cpu_addr] <= cpu_wdata;
    if (st == D_FETCH) word <= mem[addr];
  end

  tick_divider #(.DIV(FRAME_CLKS)) u_frame (.clk, .rst_n, .tick(frame_start));

  assign op      = dop_e'(word[23:21]);
  assign big   = word[19];
  assign pen_vis = word[18];
  assign in_char = (st == D_EXEC) && (op == OP_CHAR);
  assign in_vec  = (st == D_EXEC) && (op == OP_VEC);

  // dot position inside the 5x7 matrix: column-major, top row first
  always_comb begin
    col = 3'(dot / 7);
    row = 3'(dot % 7);
  end

  char_rom u_font (.code(word[5:0]), .col, .dots(coldots));

  always_comb begin
    beam_x  = x0;
    beam_y  = y0;
    unblank = 1'b0;
    if (in_char && dot < 6'd35) begin
      beam_x  = x0 + (big ? 10'(col) << 1 : 10'(col));
      beam_y  = y0 + (big ? 10'(6 - row) << 1 : 10'(6 - row));
      unblank = coldots[row];
    end else if (in_vec) begin
      unblank = 1'b1;
    end
  end
  assign bright   = (in_char || in_vec) && word[20];
  assign vec_dx   = word[17:9];
  assign vec_dy   = word[8:0];
  assign scanning = (st != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= D_IDLE;
      addr      <= '0;
      itmr      <= '0;
      dtmr      <= '0;
      dot       <= '0;
      x0        <= '0;
      y0        <= '0;
      vec_start <= 1'b0;
      pen_addr  <= '0;
      pen_irq   <= 1'b0;
    end else begin
      vec_start <= 1'b0;
      if (irq_ack) pen_irq <= 1'b0;
      if (pen_hit && unblank && pen_vis && !pen_irq) begin
        pen_irq  <= 1'b1;
        pen_addr <= addr;
      end
      unique case (st)
        D_IDLE: if (frame_start) begin
          addr <= '0;
          st   <= D_FETCH;
        end
        D_FETCH: begin
          st   <= D_EXEC;
          itmr <= '0;
          dtmr <= '0;
          dot  <= '0;
        end
        D_EXEC: begin
          itmr <= itmr + 1'b1;
          unique case (op)
            OP_POS: begin
              x0 <= word[19:10];
              y0 <= word[9:0];
            end
            OP_VEC: if (itmr == '0) vec_start <= 1'b1;
            OP_CHAR: begin
              if (dtmr == DW'(DOT_CLKS - 1)) begin
                dtmr <= '0;
                if (dot < 6'd35) dot <= dot + 1'b1;
              end else dtmr <= dtmr + 1'b1;
            end
            default: ;
          endcase
          if (op == OP_END || op > OP_VEC) st <= D_IDLE;
          else if ((op == OP_POS) || itmr == IW'(ITEM_CLKS - 2)) begin
            if (op == OP_CHAR) x0 <= x0 + (big ? 10'd12 : 10'd6);
            if (op == OP_VEC) begin
              x0 <= x0 + 10'(signed'(vec_dx));
              y0 <= y0 + 10'(signed'(vec_dy));
            end
            if (addr == AW'(WORDS - 1)) st <= D_IDLE;
            else begin
              addr <= addr + 1'b1;
              st   <= D_FETCH;
            end
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
