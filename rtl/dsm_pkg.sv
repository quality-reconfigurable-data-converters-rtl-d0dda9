// dsm_pkg -- shared constants of the reconfigurable delta-sigma converter block.
//
// Collects the default sizes of both converters so that the modules and the
// top level agree on them:
//   * second-order DAC modulator: 6-bit input, 7/9/10/10-bit adder and
//     integrator widths, feedback constants +/-16 (6-bit) and +/-32 (7-bit),
//     exactly as annotated on the DAC block diagram of the design;
//   * DDS tone source: 32-bit phase accumulator and 256-entry sine table
//     (own choice), tuning word for 7.99 MHz at a 192 MHz clock;
//   * first-order ADC: 512 over-sampling clocks per PCM sample (4.096 MHz to
//     8 kHz), decimated by a second-order CIC filter (own choice of filter).
package dsm_pkg;

  // ---------------- second-order delta-sigma DAC modulator ----------------
  localparam int DAC_IN_W = 6;   // input sample width
  localparam int DAC_S1_W = 7;   // first adder output
  localparam int DAC_I1_W = 9;   // first integrator
  localparam int DAC_S2_W = 10;  // second adder output
  localparam int DAC_I2_W = 10;  // second integrator
  localparam int DAC_K1   = 16;  // first feedback constant, 010000 / 110000
  localparam int DAC_K1_W = 6;
  localparam int DAC_K2   = 32;  // second feedback constant, 0100000 / 1100000
  localparam int DAC_K2_W = 7;

  typedef logic signed [DAC_IN_W-1:0] dac_sample_t;

  // ---------------- DDS tone source ----------------
  localparam int DDS_PHASE_W = 32;
  localparam int DDS_LUT_AW  = 8;
  // Peak amplitude of the tone in input LSBs.  The modulator stays stable for
  // peaks up to 12 LSB with +/-16 feedback, so that is the default.
  localparam int DDS_AMPLITUDE = 12;
  // round(7.99 MHz / 192 MHz * 2^32)
  localparam logic [DDS_PHASE_W-1:0] DDS_FTW_7M99_AT_192M = 32'd178733274;

  // ---------------- first-order delta-sigma ADC ----------------
  localparam int ADC_DECIM = 512;  // over-sampling ratio of the clocks, 4.096 MHz / 8 kHz
  localparam int ADC_CIC_N = 2;    // order of the decimating CIC filter
  // Signed PCM width: the filter gain is DECIM^N and the input is +/-1.
  localparam int ADC_PCM_W = ADC_CIC_N * $clog2(ADC_DECIM) + 2;

endpackage
