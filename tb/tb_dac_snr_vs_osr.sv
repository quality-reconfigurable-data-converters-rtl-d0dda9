// tb_dac_snr_vs_osr -- in-band SNR of the DAC path at three over-sampling
// ratios.
//
// The converter block is run with the DDS tuned to 7.99 MHz for modulator
// clocks of 32, 64 and 192 MHz, i.e. over-sampling ratios 2, 4 and 12 for an
// 8 MHz signal band (the configurations of the design's resolution table).
// For each, 4096 bits of the DAC output (as +/-1) are Hann-windowed and
// transformed; the in-band signal-to-noise ratio is the power of the tone
// bins over the power of every other in-band bin above DC.  The same is
// computed for the 6-bit DDS samples themselves, which bounds what the
// modulator can deliver.  Checks: the SNR must rise with the over-sampling
// ratio; from ratio 4 to 12 (log2(3) = 1.58 octaves) it must gain about
// 15 dB per octave, the second-order noise-shaping slope (accepted: 18 to
// 30 dB); and at ratio 12 it must exceed 30 dB (an independent model of the
// same difference equations gives 32 to 35 dB for this tone).  The
// calculated full-scale values of the design's resolution table (15, 30 and
// 52.5 dB) are printed alongside for comparison; they come from the linear
// noise formula for a full-scale input and are not met by this 1-bit loop
// with a tone on the band edge.
`timescale 1ns/1ps
module tb_dac_snr_vs_osr;
  import dsm_pkg::*;

  localparam int  NFFT = 4096;
  localparam real PI   = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic [DDS_PHASE_W-1:0] ftw = '0;
  dac_sample_t dac_sample;
  logic dac_phase_wrap, dac_out;
  logic adc_fb_out, adc_bitstream, adc_pcm_valid;
  logic signed [ADC_PCM_W-1:0] adc_pcm;

  int checks = 0, failures = 0;
  real costab[NFFT], sintab[NFFT];
  real xs[NFFT], xu[NFFT];

  reconfig_converter_top dut (
    .clk_adc(clk), .rst_adc_n(1'b0), .adc_comp_in(1'b0),
    .adc_fb_out(adc_fb_out), .adc_bitstream(adc_bitstream), .adc_pcm(adc_pcm),
    .adc_pcm_valid(adc_pcm_valid),
    .clk_dac(clk), .rst_dac_n(rst_n), .dac_ftw(ftw), .dac_sample(dac_sample),
    .dac_phase_wrap(dac_phase_wrap), .dac_out(dac_out)
  );

  always #5 clk = ~clk;  // the simulated period does not matter, only the ratio

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // In-band SNR in dB of x[0..NFFT-1] for a tone at bin ktone, band up to kband.
  function automatic real snr_db(input real x[NFFT], input int kband, input int ktone);
    real ps, pn;
    ps = 0.0; pn = 0.0;
    // the tone sits on the band edge: its bins count whole, noise only in band
    for (int k = 3; k <= ((kband > ktone + 3) ? kband : ktone + 3); k++) begin
      real re, im, p;
      re = 0.0; im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        int idx;
        idx = (k * n) % NFFT;
        re += x[n] * costab[idx];
        im -= x[n] * sintab[idx];
      end
      p = re * re + im * im;
      if (k >= ktone - 3 && k <= ktone + 3) ps += p;
      else if (k <= kband) pn += p;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  task automatic run(input real fs_mhz, input int osr, input real table_snr, output real snr_v,
                     output real snr_u);
    longint unsigned tw;
    int kband, ktone;
    tw = longint'(7.99 / fs_mhz * 4294967296.0 + 0.5);
    ftw = DDS_PHASE_W'(tw);
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (500) @(posedge clk);   // settle
    for (int n = 0; n < NFFT; n++) begin
      real w;
      @(posedge clk);
      #1;
      w = 0.5 - 0.5 * $cos(2.0 * PI * n / NFFT);
      xs[n] = w * (dac_out ? 1.0 : -1.0);
      xu[n] = w * real'(dac_sample) / real'(DAC_K1);
    end
    kband = NFFT / (2 * osr);
    ktone = int'(7.99 / fs_mhz * NFFT + 0.5);
    snr_v = snr_db(xs, kband, ktone);
    snr_u = snr_db(xu, kband, ktone);
    $display("fs=%0.0f MHz OSR=%0d: bitstream SNR %0.1f dB, 6-bit input SNR %0.1f dB (table, full scale: %0.1f dB)",
             fs_mhz, osr, snr_v, snr_u, table_snr);
  endtask

  initial begin
    real s2, s4, s12, u2, u4, u12;
    for (int i = 0; i < NFFT; i++) begin
      costab[i] = $cos(2.0 * PI * i / NFFT);
      sintab[i] = $sin(2.0 * PI * i / NFFT);
    end
    run(32.0, 2, 15.0, s2, u2);
    run(64.0, 4, 30.0, s4, u4);
    run(192.0, 12, 52.5, s12, u12);
    check(s4 > s2, "SNR rises from OSR 2 to 4");
    check(s12 > s4, "SNR rises from OSR 4 to 12");
    // second order: 15 dB per octave of OSR, log2(3) octaves from 4 to 12
    check(s12 - s4 > 18.0 && s12 - s4 < 30.0,
          $sformatf("noise-shaping slope: %0.1f dB from OSR 4 to 12", s12 - s4));
    check(s12 > 30.0, "OSR 12: bitstream SNR above 30 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
