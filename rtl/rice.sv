// rice: Remote Information and Control Equipment, the digital controller at
// each module control point.
//
// The RICE is a synchronous machine run entirely by the serial frames from the
// CIU. Its parts, as named in its description:
//  * link receiver / function detector: the data (sd) and timing (sc) lines
//    are resynchronised; each rising edge of sc shifts one sd bit in. The
//    first two bits of a frame give its type (instruction, convert, collect);
//    an instruction frame carries function, channel address, two flag bits
//    and a ten-bit argument, then an odd parity bit. A frame with bad parity
//    is dropped and the parity-error flag set (cleared by the next good one).
//    If sc stays idle for RESYNC_CLKS clocks the receiver restarts at a frame
//    header.
//  * address register and decoder: DTK stores the channel address; the
//    channel map (lampf_pkg) decodes it into analog, binary-in, binary-out or
//    pulse channel and an index.
//  * instruction register, binary comparator: a CMD to a binary output channel
//    loads the ten bits into the output latch and holds the drive until the
//    device feedback equals the requested bits, then releases it.
//  * pulse generator and counter: a CMD to a pulse channel loads the count;
//    one pulse of PULSE_WIDTH clocks every PULSE_PERIOD clocks is routed to
//    the channel's clockwise or counter-clockwise line until the count is out.
//  * data register: a convert frame samples the addressed channel (starts the
//    A/D converter for analog channels, copies ten bits for binary ones);
//    a collect frame shifts the register out, MSB first, on the return line,
//    one bit per sc pulse.
//  * VDO: passes the channel and cable number to the video control unit.
// cbusy (command busy) is high while a command executes. The RICE holds one
// command: a new CMD (a priority command, since the computer does not
// readdress a busy unit otherwise) replaces the one in progress.
// Document: the parts, the three functions, binary comparator hold-and-release,
// pulse count routing cw/ccw, 10 bits plus sign, parity, command busy.
// Design choice: frame format, channel map, pulse rate and width, the settle
// delay before the comparator looks, the resync timeout and the return word.
module rice
  import lampf_pkg::*;
#(
  parameter int unsigned PULSE_PERIOD = 4000,  // clocks per motor pulse (1 kHz)
  parameter int unsigned PULSE_WIDTH  = 400,   // clocks the pulse is high
  parameter int unsigned SETTLE_CLKS  = 4,     // before the comparator looks
  parameter int unsigned RESYNC_CLKS  = 64
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // CIU lines
  input  logic                           sd,
  input  logic                           sc,
  output logic                           rd,
  output logic                           cbusy,
  // RICE I/O
  output logic                           adc_start,
  output logic [4:0]                     adc_chan,
  input  logic                           adc_busy,
  input  logic                           adc_done,
  input  logic                           adc_sign,
  input  logic [MAG_W-1:0]               adc_mag,
  input  logic [N_BIN-1:0][ARG_W-1:0]    bin_data,
  output logic                           bout_load,
  output logic [1:0]                     bout_idx,
  output logic [ARG_W-1:0]               bout_value,
  output logic [N_BOUT-1:0]              bout_hold,
  input  logic [N_BOUT-1:0][ARG_W-1:0]   bout_state,
  output logic                           pulse_on,
  output logic [3:0]                     pulse_idx,
  output logic                           pulse_cw_sel,
  // video control unit
  output logic                           vdo_load,
  output logic                           vdo_cable,
  output logic [CH_W-1:0]                vdo_chan,
  // status
  output logic                           perr
);
  localparam int PW = $clog2(PULSE_PERIOD + 1);
  localparam int SW = $clog2(SETTLE_CLKS + 2);
  localparam int RW = $clog2(RESYNC_CLKS + 1);
  localparam int PAY_W = INSTR_W + 1;

  // ---------------------------------------------------------------- receiver
  logic sc_s1, sc_s2, sc_s3, sd_s1, sd_s2, sc_rise;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {sc_s1, sc_s2, sc_s3, sd_s1, sd_s2} <= '0;
    else begin
      sc_s1 <= sc; sc_s2 <= sc_s1; sc_s3 <= sc_s2;
      sd_s1 <= sd; sd_s2 <= sd_s1;
    end
  end
  assign sc_rise = sc_s2 & ~sc_s3;

  typedef enum logic [1:0] { R_HDR, R_PAYLOAD, R_TX } rstate_e;
  rstate_e           rst_q;
  logic [4:0]        rx_cnt;
  logic              hdr0;
  logic [PAY_W-2:0]  rx_sh;
  logic [RET_W-1:0]  tx_sh;
  logic [RW-1:0]     idle;

  rice_instr_t       instr;       // instruction register
  logic              instr_go;    // strobe: good instruction frame received
  logic              conv_go;     // strobe: convert frame received
  logic              payload_last;

  assign payload_last = (rst_q == R_PAYLOAD) && sc_rise && (rx_cnt == 5'(PAY_W - 1));

  // ----------------------------------------------------------- data register
  rice_ret_t         dreg;
  logic [CH_W-1:0]   addr_reg;
  chan_kind_e        akind;
  logic [4:0]        aidx;
  assign akind = chan_kind(addr_reg);
  assign aidx  = chan_index(addr_reg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q    <= R_HDR;
      rx_cnt   <= '0;
      hdr0     <= 1'b0;
      rx_sh    <= '0;
      tx_sh    <= '0;
      rd       <= 1'b0;
      idle     <= '0;
      instr    <= '0;
      instr_go <= 1'b0;
      conv_go  <= 1'b0;
      perr     <= 1'b0;
    end else begin
      instr_go <= 1'b0;
      conv_go  <= 1'b0;
      if (sc_rise) idle <= '0;
      else if (idle != RW'(RESYNC_CLKS)) idle <= idle + 1'b1;

      if (!sc_rise && idle == RW'(RESYNC_CLKS - 1)) begin
        rst_q  <= R_HDR;       // line idle: next bit starts a frame
        rx_cnt <= '0;
      end else if (sc_rise) begin
        unique case (rst_q)
          R_HDR: begin
            if (rx_cnt == 5'd0) begin
              hdr0   <= sd_s2;
              rx_cnt <= 5'd1;
            end else begin
              rx_cnt <= '0;
              unique case (frame_e'({hdr0, sd_s2}))
                FR_INSTR:   rst_q <= R_PAYLOAD;
                FR_CONVERT: conv_go <= 1'b1;
                FR_COLLECT: begin
                  rst_q <= R_TX;
                  tx_sh <= dreg;
                end
                default: ;
              endcase
            end
          end
          R_PAYLOAD: begin
            rx_sh <= {rx_sh[PAY_W-3:0], sd_s2};
            if (payload_last) begin
              rx_cnt <= '0;
              rst_q  <= R_HDR;
              // odd parity over payload and parity bit
              if (^{rx_sh, sd_s2}) begin
                instr    <= rice_instr_t'(rx_sh);
                instr_go <= 1'b1;
                perr     <= 1'b0;
              end else perr <= 1'b1;
            end else rx_cnt <= rx_cnt + 1'b1;
          end
          R_TX: begin
            rd    <= tx_sh[RET_W-1];
            tx_sh <= tx_sh << 1;
            if (rx_cnt == 5'(RET_W - 1)) begin
              rx_cnt <= '0;
              rst_q  <= R_HDR;
            end else rx_cnt <= rx_cnt + 1'b1;
          end
          default: rst_q <= R_HDR;
        endcase
      end
    end
  end

  // ------------------------------------------------- function execution
  chan_kind_e ikind;
  logic [4:0] iidx;
  assign ikind = chan_kind(instr.chan);
  assign iidx  = chan_index(instr.chan);

  logic              bin_active, pulse_active;
  logic [1:0]        cmd_idx;
  logic [ARG_W-1:0]  cmd_value;
  logic [SW-1:0]     settle;
  logic [ARG_W-1:0]  pulse_cnt;
  logic [PW-1:0]     pulse_tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_reg     <= '0;
      dreg         <= '0;
      adc_start    <= 1'b0;
      adc_chan     <= '0;
      bout_load    <= 1'b0;
      bout_idx     <= '0;
      bout_value   <= '0;
      bin_active   <= 1'b0;
      pulse_active <= 1'b0;
      cmd_idx      <= '0;
      cmd_value    <= '0;
      settle       <= '0;
      pulse_cnt    <= '0;
      pulse_tmr    <= '0;
      pulse_idx    <= '0;
      pulse_cw_sel <= 1'b0;
      vdo_load     <= 1'b0;
      vdo_cable    <= 1'b0;
      vdo_chan     <= '0;
    end else begin
      adc_start <= 1'b0;
      bout_load <= 1'b0;
      vdo_load  <= 1'b0;
      dreg.perr <= perr;

      // binary comparator: release the hold once the device matches
      if (bin_active) begin
        if (settle != '0) settle <= settle - 1'b1;
        else if (bout_state[cmd_idx] == cmd_value) bin_active <= 1'b0;
      end

      // pulse generator and counter
      if (pulse_active) begin
        if (pulse_tmr == PW'(PULSE_PERIOD - 1)) begin
          pulse_tmr <= '0;
          pulse_cnt <= pulse_cnt - 1'b1;
          if (pulse_cnt == ARG_W'(1)) pulse_active <= 1'b0;
        end else pulse_tmr <= pulse_tmr + 1'b1;
      end

      // A/D result into the data register
      if (adc_done) begin
        dreg.valid <= 1'b1;
        dreg.sign  <= adc_sign;
        dreg.mag   <= adc_mag;
      end

      if (instr_go) begin
        unique case (instr.fn)
          FN_CMD: begin
            // one command buffer: a new command replaces the current one
            bin_active   <= 1'b0;
            pulse_active <= 1'b0;
            if (ikind == CK_BOUT) begin
              bin_active <= 1'b1;
              cmd_idx    <= iidx[1:0];
              cmd_value  <= instr.arg;
              settle     <= SW'(SETTLE_CLKS);
              bout_load  <= 1'b1;
              bout_idx   <= iidx[1:0];
              bout_value <= instr.arg;
            end else if (ikind == CK_PULSE && instr.arg != '0) begin
              pulse_active <= 1'b1;
              pulse_cnt    <= instr.arg;
              pulse_tmr    <= '0;
              pulse_idx    <= iidx[3:0];
              pulse_cw_sel <= instr.flags[0];
            end
          end
          FN_DTK: begin
            addr_reg   <= instr.chan;
            dreg.valid <= 1'b0;
          end
          FN_VDO: begin
            vdo_load  <= 1'b1;
            vdo_cable <= instr.flags[0];
            vdo_chan  <= instr.chan;
          end
          default: ;
        endcase
      end

      if (conv_go) begin
        unique case (akind)
          CK_AIN: if (!adc_busy) begin
            adc_start  <= 1'b1;
            adc_chan   <= aidx;
            dreg.valid <= 1'b0;
          end
          CK_BIN: begin
            dreg.valid <= 1'b1;
            dreg.sign  <= 1'b0;
            dreg.mag   <= bin_data[aidx];
          end
          CK_BOUT: begin
            dreg.valid <= 1'b1;
            dreg.sign  <= 1'b0;
            dreg.mag   <= bout_state[aidx[1:0]];
          end
          default: begin
            dreg.valid <= 1'b1;
            dreg.sign  <= 1'b0;
            dreg.mag   <= '0;
          end
        endcase
      end
    end
  end

  always_comb begin
    bout_hold = '0;
    if (bin_active) bout_hold[cmd_idx] = 1'b1;
  end
  assign pulse_on = pulse_active && (pulse_tmr < PW'(PULSE_WIDTH));
  assign cbusy    = bin_active | pulse_active;
endmodule
