// word_assembler: CIU Word Assembler.
//
// The computer hands the CIU a request as two 16-bit words (word 0 first; the
// write of word 1 starts the request). The word assembler decodes them, builds
// the serial frame the RICEs expect, appends a parity bit and gates the frame,
// with a timing pulse per bit, onto the two outgoing lines of every selected
// module. Modules are selected singly, by group (injectors, low-frequency or
// high-frequency section) or all at once, so one request can reach many RICEs
// in parallel.
//
// Requests (see lampf_pkg for the word layout):
//   CMD     one instruction frame; the selected units' busy flags are set
//   VDO     one instruction frame
//   DTK     one instruction frame, then a convert frame: at once, or (sync=1)
//           when the cycle clock reaches word 1 after the next master pulse
//   COLLECT a collect frame, then RET_W timing pulses during which every
//           selected RICE shifts its data word back; sample_bit marks the end
//           of each bit period, where the return lines are sampled
//
// Timing: one bit per BIT_CLKS clocks (default 7 clocks of 4 MHz = 1.75 us,
// one computer cycle). The timing line is high for the first BIT_CLKS/2
// clocks of each bit; data is stable for the whole bit. An instruction frame
// is 23 bits (40 us), a convert frame 2 bits, a collect 2+13 bits.
// Document: two words, serial function + channel + parity on two lines with
// concurrent timing pulses to selected modules, delayed sampling relative to
// the pulse, broadcast to all modules or a group. Design choice: frame format,
// bit rate, group codes, the sync flag and the separate collect request.
module word_assembler
  import lampf_pkg::*;
#(
  parameter int unsigned N        = N_MODULES,
  parameter int unsigned BIT_CLKS = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  // computer I/O bus
  input  logic [15:0]  cpu_wdata,
  input  logic         cpu_we0,
  input  logic         cpu_we1,
  output logic         busy,         // a request is in progress; writes ignored
  output logic         req_done,     // one-clock strobe at the end of a request
  // timing
  input  logic         master_pulse,
  input  logic [15:0]  cycle_count,
  // serial lines to the modules
  output logic [N-1:0] sd,           // data
  output logic [N-1:0] sc,           // timing pulses
  // to the command busy register
  output logic         cmd_issue,
  // to the memory and block transfer logic
  output logic [N-1:0] sel_mask,     // modules of the current request
  output logic         sample_bit,   // sample the return lines now
  output logic         collect_last  // with the last sample_bit of a collect
);
  localparam int FRAME_W = 2 + INSTR_W + 1;   // 23
  localparam int CNT_W   = $clog2(FRAME_W + 1);
  localparam int PH_W    = (BIT_CLKS > 1) ? $clog2(BIT_CLKS) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_SEND, S_WAIT_PULSE, S_WAIT_TIME, S_RECV
  } state_e;

  typedef enum logic [1:0] { AFTER_DONE, AFTER_CONVERT, AFTER_RECV } after_e;

  state_e               state;
  after_e               after;
  ciu_word0_t           w0;
  logic [15:0]          w1;
  logic [FRAME_W-1:0]   sh;
  logic [CNT_W-1:0]     nbits;
  logic [PH_W-1:0]      phase;
  logic                 bit_end;
  rice_instr_t          payload;

  assign bit_end = (phase == PH_W'(BIT_CLKS - 1));

  // function code of the request, and the instruction frame payload built
  // from word 0 and the word 1 being written
  rice_fn_e fn;
  always_comb begin
    unique case (w0.op)
      OP_CMD:  fn = FN_CMD;
      OP_DTK:  fn = FN_DTK;
      OP_VDO:  fn = FN_VDO;
      default: fn = FN_NONE;
    endcase
    // DTK's word 1 is the sampling delay, not part of the frame
    payload = '{fn: fn, chan: w0.chan,
                flags: (w0.op == OP_DTK) ? 2'b00 : cpu_wdata[11:10],
                arg:   (w0.op == OP_DTK) ? '0 : cpu_wdata[9:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      after        <= AFTER_DONE;
      w0           <= '0;
      w1           <= '0;
      sh           <= '0;
      nbits        <= '0;
      phase        <= '0;
      sel_mask     <= '0;
      cmd_issue    <= 1'b0;
      req_done     <= 1'b0;
      sample_bit   <= 1'b0;
      collect_last <= 1'b0;
    end else begin
      cmd_issue    <= 1'b0;
      req_done     <= 1'b0;
      sample_bit   <= 1'b0;
      collect_last <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cpu_we0) w0 <= ciu_word0_t'(cpu_wdata);
          if (cpu_we1) begin
            w1       <= cpu_wdata;
            sel_mask <= N'(module_mask(w0.module_f));
            phase    <= '0;
            unique case (w0.op)
              OP_CMD, OP_VDO, OP_DTK: begin
                state <= S_SEND;
                nbits <= CNT_W'(FRAME_W);
                after <= (w0.op == OP_DTK) ? AFTER_CONVERT : AFTER_DONE;
                sh    <= {FR_INSTR, payload, odd_parity(payload)};
                cmd_issue <= (w0.op == OP_CMD);
              end
              OP_COLLECT: begin
                state <= S_SEND;
                nbits <= CNT_W'(2);
                after <= AFTER_RECV;
                sh    <= {FR_COLLECT, {(FRAME_W-2){1'b0}}};
              end
              default: req_done <= 1'b1;   // no-op request
            endcase
          end
        end

        S_SEND: begin
          phase <= bit_end ? '0 : phase + 1'b1;
          if (bit_end) begin
            sh    <= sh << 1;
            nbits <= nbits - 1'b1;
            if (nbits == CNT_W'(1)) begin
              unique case (after)
                AFTER_CONVERT: begin
                  after <= AFTER_DONE;
                  if (w0.sync) state <= S_WAIT_PULSE;
                  else begin
                    state <= S_SEND;
                    nbits <= CNT_W'(2);
                    sh    <= {FR_CONVERT, {(FRAME_W-2){1'b0}}};
                  end
                end
                AFTER_RECV: begin
                  state <= S_RECV;
                  nbits <= CNT_W'(RET_W);
                end
                default: begin
                  state    <= S_IDLE;
                  req_done <= 1'b1;
                end
              endcase
            end
          end
        end

        S_WAIT_PULSE: if (master_pulse) state <= S_WAIT_TIME;

        S_WAIT_TIME: if (cycle_count >= w1) begin
          state <= S_SEND;
          phase <= '0;
          nbits <= CNT_W'(2);
          sh    <= {FR_CONVERT, {(FRAME_W-2){1'b0}}};
        end

        S_RECV: begin
          phase <= bit_end ? '0 : phase + 1'b1;
          if (bit_end) begin
            sample_bit <= 1'b1;
            nbits      <= nbits - 1'b1;
            if (nbits == CNT_W'(1)) begin
              collect_last <= 1'b1;
              state        <= S_IDLE;
              req_done     <= 1'b1;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  logic sd_int, sc_int;
  assign sd_int = (state == S_SEND) && sh[FRAME_W-1];
  assign sc_int = ((state == S_SEND) || (state == S_RECV)) &&
                  (phase < PH_W'(BIT_CLKS / 2));
  assign sd     = sel_mask & {N{sd_int}};
  assign sc     = sel_mask & {N{sc_int}};
  assign busy   = (state != S_IDLE);

  // the timing line never pulses outside a frame
  a_sc_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
    sc_int |-> (state == S_SEND || state == S_RECV));
endmodule
