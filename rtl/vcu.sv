// vcu: Video Control Unit, the coaxial relay multiplexer at each module.
//
// Two output cables run from every module back to the dual-beam video
// oscilloscope on the console (cable 0 = upper trace, cable 1 = lower trace).
// On a VDO request from the RICE the addressed cable is switched to the
// requested HF signal: all relays of that cable open first, and after
// BBM_CLKS clocks (break before make, so two signals are never tied together)
// the one relay of the new signal closes. Signal numbers 1..N_VIDEO select an
// input; 0 or a larger number leaves the cable disconnected. relay_* are the
// relay coil drives, one-hot per cable.
// Document: VCU switches remotely selected HF signals onto one of two cables,
// controlled through the RICE. Design choice: the number of video inputs
// (16), break-before-make and its time (1 ms at 4 MHz), the relay coding.
module vcu
  import lampf_pkg::*;
#(
  parameter int unsigned N_VIDEO  = 16,
  parameter int unsigned BBM_CLKS = 4000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vdo_load,
  input  logic                 vdo_cable,
  input  logic [CH_W-1:0]      vdo_chan,
  output logic [N_VIDEO-1:0]   relay_upper,
  output logic [N_VIDEO-1:0]   relay_lower,
  output logic [1:0]           switching      // per cable: break phase active
);
  localparam int TW = $clog2(BBM_CLKS + 1);

  logic [CH_W-1:0] want [2];
  logic [TW-1:0]   tmr  [2];
  logic [N_VIDEO-1:0] coil [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin
        want[c] <= '0;
        tmr[c]  <= '0;
        coil[c] <= '0;
      end
      switching <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (vdo_load && int'(vdo_cable) == c) begin
          want[c]      <= vdo_chan;
          coil[c]      <= '0;               // break
          tmr[c]       <= TW'(BBM_CLKS);
          switching[c] <= 1'b1;
        end else if (switching[c]) begin
          if (tmr[c] != '0) tmr[c] <= tmr[c] - 1'b1;
          else begin
            switching[c] <= 1'b0;           // make
            for (int v = 0; v < N_VIDEO; v++)
              coil[c][v] <= (int'(want[c]) == v + 1);
          end
        end
      end
    end
  end

  assign relay_upper = coil[0];
  assign relay_lower = coil[1];
endmodule
