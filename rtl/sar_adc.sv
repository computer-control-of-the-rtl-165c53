// sar_adc: control logic of the module A/D converter in the RICE I/O chassis.
//
// A successive-approximation converter giving 10 bits plus sign. On start the
// analog input is sampled for SAMPLE_CLKS clocks (the sample/hold is told by
// `sampling`). Then eleven decisions follow, BIT_CLKS clocks each: first the
// sign (DAC at zero), then the magnitude bits from the most significant down.
// For each decision the trial value is put on the DAC (dac_sign, dac_mag) and
// the comparator answer `cmp` is taken at the end of the bit time; it must be
// 1 when the held input is at or beyond the DAC value in the direction of
// dac_sign (v >= mag for positive, v <= -mag for negative; for the sign step
// the DAC is +0 and cmp = 1 means v >= 0). `done` pulses when result_sign and
// result_mag are final; `busy` is high from start to done.
// Timing at the defaults (4 MHz): 20 us sample + 11 x 10 us = 130 us, which is
// the document's 20 us sample, 10 us/bit, "about 125 us" converter.
// The comparator, DAC and sample/hold are analog and are outside this module.
// Design choice: sign-magnitude coding and the sign decided first.
module sar_adc #(
  parameter int unsigned MAG_BITS    = 10,
  parameter int unsigned SAMPLE_CLKS = 80,
  parameter int unsigned BIT_CLKS    = 40
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                cmp,
  output logic                sampling,
  output logic                dac_sign,
  output logic [MAG_BITS-1:0] dac_mag,
  output logic                busy,
  output logic                done,
  output logic                result_sign,
  output logic [MAG_BITS-1:0] result_mag
);
  localparam int TW = $clog2((SAMPLE_CLKS > BIT_CLKS ? SAMPLE_CLKS : BIT_CLKS) + 1);
  localparam int BW = $clog2(MAG_BITS + 1);

  typedef enum logic [1:0] { A_IDLE, A_SAMPLE, A_SIGN, A_BITS } astate_e;
  astate_e             st;
  logic [TW-1:0]       timer;
  logic [BW-1:0]       bitno;     // magnitude bit under test
  logic [MAG_BITS-1:0] trial;

  always_comb begin
    trial = result_mag;
    if (st == A_BITS) trial[bitno] = 1'b1;
  end

  assign sampling = (st == A_SAMPLE);
  assign dac_sign = (st == A_BITS) ? result_sign : 1'b0;
  assign dac_mag  = (st == A_BITS) ? trial : '0;
  assign busy     = (st != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= A_IDLE;
      timer       <= '0;
      bitno       <= '0;
      done        <= 1'b0;
      result_sign <= 1'b0;
      result_mag  <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        A_IDLE: if (start) begin
          st          <= A_SAMPLE;
          timer       <= TW'(SAMPLE_CLKS - 1);
          result_sign <= 1'b0;
          result_mag  <= '0;
        end
        A_SAMPLE: if (timer == '0) begin
          st    <= A_SIGN;
          timer <= TW'(BIT_CLKS - 1);
        end else timer <= timer - 1'b1;
        A_SIGN: if (timer == '0) begin
          result_sign <= ~cmp;
          st          <= A_BITS;
          bitno       <= BW'(MAG_BITS - 1);
          timer       <= TW'(BIT_CLKS - 1);
        end else timer <= timer - 1'b1;
        A_BITS: if (timer == '0) begin
          result_mag[bitno] <= cmp;
          timer             <= TW'(BIT_CLKS - 1);
          if (bitno == '0) begin
            st   <= A_IDLE;
            done <= 1'b1;
          end else bitno <= bitno - 1'b1;
        end else timer <= timer - 1'b1;
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
