// adc_sampling_ff -- over-sampling flip-flop of the first-order delta-sigma ADC.
//
// The ADC is built from an FPGA pin pair and three external parts: the input
// resistor and the feedback resistor both feed the integrating capacitor, the
// FPGA input buffer acts as the comparator that reads the capacitor voltage
// against its switching threshold, and an FPGA output buffer acts as the 1-bit
// feedback DAC.  This module is the only logic of that loop: a flip-flop
// clocked by the over-sampling clock that samples the input buffer.  Its Q
// output is the ADC bitstream and its inverted output Q-bar drives the
// feedback output buffer, which closes the negative feedback loop (a high
// capacitor voltage makes Q-bar low and discharges the capacitor).
//
// The flip-flop with Q to the digital output and Q-bar to the feedback buffer
// follows the design; the synchronous active-low reset (Q = 0, so the feedback
// pin starts high) is this implementation's own.  The comparator input is an
// analogue level near the buffer threshold, so the flip-flop may go
// metastable; the design uses a single flip-flop inside the loop because any
// extra stage would add loop delay, and this implementation keeps it so.
//
// Timing: comp_in is sampled at each rising clk edge; q and q_n change right
// after that edge and hold for one over-sampling period.
module adc_sampling_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic comp_in,  // input buffer output: capacitor voltage above threshold
  output logic q,        // ADC bitstream (digital output)
  output logic q_n       // to the feedback output buffer (1-bit DAC)
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= comp_in;
  end

  assign q_n = ~q;

endmodule
