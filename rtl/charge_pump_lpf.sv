// Behavioural model (analog) of the charge pump and loop filter.
// The pump sources ICP_UA while UP is high and sinks it while DN is high
// into a series resistor R_OHM and the external capacitor Cvg (CVG_PF); the
// control voltage VGN is taken across the series pair, so it is the
// capacitor voltage plus the resistor drop while a pulse lasts (the
// capacitor voltage is limited to 0..VDD, VGN itself is not). The
// resistor term gives the loop its damping. The model is event driven: the
// capacitor charge is brought up to date whenever UP, DN or rst changes,
// using the exact elapsed time. rst discharges Cvg to 0 V. The external capacitor and its
// 100 pF / 1000 pF values follow the original; pump current and resistor
// are own choices: a stable, damped loop from 2.5 MHz (x4) to 50 MHz.
`timescale 1ns/1fs
module charge_pump_lpf #(
  parameter real ICP_UA = 64.0,
  parameter real R_OHM  = 6250.0,
  parameter real CVG_PF = 100.0,
  parameter real VDD    = 3.3
) (
  input  logic up,
  input  logic dn,
  input  logic rst,
  output real  vgn
);
  real vcap;
  real i_a;       // pump current since the last event, amperes
  real t_last;    // time of the last event, ns

  function automatic real clamp(input real v);
    return (v < 0.0) ? 0.0 : ((v > VDD) ? VDD : v);
  endfunction

  initial begin
    vcap   = 0.0;
    i_a    = 0.0;
    t_last = 0.0;
    vgn    = 0.0;
  end

  always @(up or dn or rst) begin
    vcap   = clamp(vcap + i_a * ($realtime - t_last) * 1.0e-9 / (CVG_PF * 1.0e-12));
    t_last = $realtime;
    if (rst) begin
      vcap = 0.0;
      i_a  = 0.0;
    end else if (up && !dn) i_a = ICP_UA * 1.0e-6;
    else if (dn && !up)     i_a = -ICP_UA * 1.0e-6;
    else                    i_a = 0.0;
    vgn = vcap + i_a * R_OHM;
  end
endmodule
