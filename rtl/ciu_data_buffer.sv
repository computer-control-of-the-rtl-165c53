// ciu_data_buffer: CIU Memory and Block Transfer Logic.
//
// During a collect, every module's return line is shifted into a
// serial-to-parallel register of its own, all modules at once, on each
// sample_bit strobe from the word assembler. After the last bit the words of
// the selected modules are written, one per clock, into a 55-word buffer
// memory at the address of their module number; collect_done then pulses.
// When the computer activates its block transfer channel (btc_start) the
// buffer is unloaded in order, word 0 first, one word per computer cycle
// (cyc_tick, 1.75 us), each word marked by btc_valid; btc_done pulses after
// the last one. A btc_start that comes while the buffer is still being
// filled is remembered and served when the fill ends.
//
// Buffer word: [15] valid, [14] parity error, [13:11] zero, [10] sign,
// [9:0] magnitude or binary bits.
// Document: serial-to-parallel conversion while storing, one unique location
// per module, 55 words, unload at the computer cycle rate. Design choice: the
// word layout, the one-write-per-clock fill and the btc_start handshake.
module ciu_data_buffer
  import lampf_pkg::*;
#(
  parameter int unsigned N = N_MODULES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] rd,            // return lines from the modules
  input  logic [N-1:0] sel_mask,
  input  logic         sample_bit,
  input  logic         collect_last,
  output logic         collect_done,  // strobe: buffer holds the new data
  input  logic         cyc_tick,
  input  logic         btc_start,
  output logic [15:0]  btc_data,
  output logic         btc_valid,
  output logic         btc_done,
  output logic         xfer_busy      // filling or unloading
);
  localparam int AW = $clog2(N);

  logic [RET_W-1:0] shreg [N];
  logic [15:0]      mem   [N];
  logic             filling, unloading, btc_pend;
  logic [AW-1:0]    wr_idx, rd_idx;
  logic [N-1:0]     wmask;
  rice_ret_t        r;

  assign r = rice_ret_t'(shreg[wr_idx]);

  always_ff @(posedge clk) begin
    if (sample_bit)
      for (int i = 0; i < N; i++) shreg[i] <= {shreg[i][RET_W-2:0], rd[i]};
    if (filling && wmask[wr_idx])
      mem[wr_idx] <= {r.valid, r.perr, 3'b000, r.sign, r.mag};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filling      <= 1'b0;
      unloading    <= 1'b0;
      wr_idx       <= '0;
      rd_idx       <= '0;
      wmask        <= '0;
      collect_done <= 1'b0;
      btc_valid    <= 1'b0;
      btc_done     <= 1'b0;
      btc_data     <= '0;
      btc_pend     <= 1'b0;
    end else begin
      collect_done <= 1'b0;
      btc_valid    <= 1'b0;
      btc_done     <= 1'b0;
      if (collect_last) begin
        filling <= 1'b1;
        wr_idx  <= '0;
        wmask   <= sel_mask;
      end else if (filling) begin
        if (wr_idx == AW'(N - 1)) begin
          filling      <= 1'b0;
          collect_done <= 1'b1;
        end else wr_idx <= wr_idx + 1'b1;
      end
      if (btc_start && !unloading) btc_pend <= 1'b1;
      if ((btc_start || btc_pend) && !filling && !collect_last && !unloading) begin
        unloading <= 1'b1;
        btc_pend  <= 1'b0;
        rd_idx    <= '0;
      end else if (unloading && cyc_tick) begin
        btc_data  <= mem[rd_idx];
        btc_valid <= 1'b1;
        if (rd_idx == AW'(N - 1)) begin
          unloading <= 1'b0;
          btc_done  <= 1'b1;
        end else rd_idx <= rd_idx + 1'b1;
      end
    end
  end

  assign xfer_busy = filling | unloading | btc_pend;
endmodule
