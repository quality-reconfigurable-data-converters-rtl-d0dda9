// reconfig_converter_top -- reconfigurable delta-sigma converter block.
//
// An ordinary FPGA becomes a pair of data converters with a handful of
// passive parts on its pins:
//
//   ADC path (first-order delta-sigma, over-sampling clock clk_adc):
//     analogue in --Rin--+--Cint-- GND        adc_comp_in : FPGA input buffer
//                        |                     reading the Cint node against
//     adc_fb_out --Rfb---+                     its switching threshold
//   adc_sampling_ff samples adc_comp_in; its Q is the bitstream, its Q-bar
//   drives adc_fb_out back through Rfb.  adc_decimator filters the bitstream
//   into PCM words, one per ADC_DECIM clocks (4.096 MHz -> 8 kHz).
//
//   DAC path (second-order delta-sigma, modulator clock clk_dac):
//   dds_tone makes a 6-bit sine (7.99 MHz at 192 MHz with the default tuning
//   word), dsm2_dac_modulator turns it into a 1-bit stream on dac_out, and an
//   AC-coupled RC low-pass on the pin reconstructs the analogue tone.
//
// The two paths share nothing but the package of sizes; each runs in its own
// clock domain with its own synchronous active-low reset.  The resistors,
// capacitors, I/O buffers and clock sources are outside this module.  How
// the paths are split into blocks and what each contains follows the design;
// exposing the DDS tuning word as a port (so the tone can be retuned without
// a new bitstream) and the PCM/bitstream observation ports are this
// implementation's own.
//
// Timing: adc_bitstream and adc_fb_out change once per clk_adc edge;
// adc_pcm_valid pulses every ADC_DECIM clk_adc cycles.  dac_sample is the DDS
// output, and dac_out follows it two clk_dac cycles later.
module reconfig_converter_top
  import dsm_pkg::*;
#(
  parameter int ADC_DECIM_P = ADC_DECIM,
  parameter int ADC_CIC_N_P = ADC_CIC_N,
  parameter int ADC_PCM_W_P = ADC_CIC_N_P * $clog2(ADC_DECIM_P) + 2,
  parameter int DDS_PHASE_W_P = DDS_PHASE_W,
  parameter int DDS_LUT_AW_P  = DDS_LUT_AW,
  parameter int DDS_AMPLITUDE_P = DDS_AMPLITUDE
) (
  // ADC side
  input  logic                          clk_adc,
  input  logic                          rst_adc_n,
  input  logic                          adc_comp_in,
  output logic                          adc_fb_out,
  output logic                          adc_bitstream,
  output logic signed [ADC_PCM_W_P-1:0] adc_pcm,
  output logic                          adc_pcm_valid,
  // DAC side
  input  logic                          clk_dac,
  input  logic                          rst_dac_n,
  input  logic [DDS_PHASE_W_P-1:0]      dac_ftw,
  output dac_sample_t                   dac_sample,
  output logic                          dac_phase_wrap,
  output logic                          dac_out
);

  // ---------------- ADC ----------------
  adc_sampling_ff u_adc_ff (
    .clk     (clk_adc),
    .rst_n   (rst_adc_n),
    .comp_in (adc_comp_in),
    .q       (adc_bitstream),
    .q_n     (adc_fb_out)
  );

  adc_decimator #(
    .DECIM (ADC_DECIM_P),
    .N     (ADC_CIC_N_P),
    .PCM_W (ADC_PCM_W_P)
  ) u_adc_decim (
    .clk       (clk_adc),
    .rst_n     (rst_adc_n),
    .bit_in    (adc_bitstream),
    .pcm       (adc_pcm),
    .pcm_valid (adc_pcm_valid)
  );

  // ---------------- DAC ----------------
  dds_tone #(
    .PHASE_W   (DDS_PHASE_W_P),
    .LUT_AW    (DDS_LUT_AW_P),
    .OUT_W     (DAC_IN_W),
    .AMPLITUDE (DDS_AMPLITUDE_P)
  ) u_dds (
    .clk        (clk_dac),
    .rst_n      (rst_dac_n),
    .ftw        (dac_ftw),
    .sample     (dac_sample),
    .phase_wrap (dac_phase_wrap)
  );

  dsm2_dac_modulator u_dac_mod (
    .clk   (clk_dac),
    .rst_n (rst_dac_n),
    .u     (dac_sample),
    .v     (dac_out)
  );

endmodule
