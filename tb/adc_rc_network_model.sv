// adc_rc_network_model -- behavioural model of the ADC's external parts and
// pin buffers, for simulation only (not synthesizable).
//
// Models the node of the integrating capacitor Cint, fed by the analogue
// input through Rin and by the feedback output buffer through Rfb:
//   Cint dV/dt = (vin - V)/Rin + (vfb - V)/Rfb,   vfb = fb_out ? VDD : 0
// Between two rising edges of clk the node relaxes exactly (exponential step)
// towards the weighted mean of vin and vfb.  The input buffer is an ideal
// comparator against the switching threshold VTH.  1 ns after each edge the
// model takes the new feedback level, advances the node by one period and
// sets comp to what the input buffer will show at the next sampling edge.
// Component values are chosen for a swing of a few tens of millivolts on
// Cint per 4.096 MHz period, the operating point the converter relies on.
`timescale 1ns/1ps
module adc_rc_network_model #(
  parameter real RIN  = 10.0e3,     // ohm
  parameter real RFB  = 10.0e3,     // ohm
  parameter real CINT = 1.5e-9,     // farad
  parameter real VDD  = 3.3,        // output buffer high level, volt
  parameter real VTH  = 1.65,       // input buffer threshold, volt
  parameter real TCLK = 244.140625e-9 // sampling period, second
) (
  input  logic clk,
  input  real  vin,
  input  logic fb_out,
  output logic comp,
  output real  vnode
);
  real tau, r_par, decay;

  initial begin
    r_par = 1.0 / (1.0 / RIN + 1.0 / RFB);
    tau   = r_par * CINT;
    decay = $exp(-TCLK / tau);
    vnode = VTH;
    comp  = 1'b0;
  end

  always @(posedge clk) begin
    real vfb, vinf;
    #1;  // the flip-flop has taken its sample and updated the feedback pin
    vfb   = fb_out ? VDD : 0.0;
    vinf  = r_par * (vin / RIN + vfb / RFB);
    vnode = vinf + (vnode - vinf) * decay;
    comp  = (vnode > VTH);
  end
endmodule
