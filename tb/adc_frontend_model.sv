// adc_frontend_model: behavioural model of the analog half of a module's A/D
// path (not synthesizable logic: multiplexer, sample/hold, DAC, comparator).
//
// The 32 analog inputs are given as integers in converter steps
// (-1023..+1023 is full scale). While `sampling` is high the selected input
// is tracked; when it falls the value is held. `cmp` answers the
// successive-approximation controller: with the DAC at sign s and magnitude m
// it is 1 when the held value is >= m (s = 0) or <= -m (s = 1).
module adc_frontend_model #(
  parameter int unsigned N_IN = 32
) (
  input  logic              clk,
  input  int                vin [N_IN],
  input  logic [4:0]        amux_sel,
  input  logic              sampling,
  input  logic              dac_sign,
  input  logic [9:0]        dac_mag,
  output logic              cmp
);
  int held = 0;
  always @(posedge clk) if (sampling) held <= vin[amux_sel];
  assign cmp = dac_sign ? (held <= -int'(dac_mag)) : (held >= int'(dac_mag));
endmodule
