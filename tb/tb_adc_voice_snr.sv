// tb_adc_voice_snr -- signal-to-noise ratio of the ADC path in its voice-codec
// configuration: 4.096 MHz over-sampling clock, 512 clocks per PCM word,
// 8 kHz PCM rate.
//
// The external Rin/Rfb/Cint network and the input buffer are modelled by
// adc_rc_network_model.  A sine of 1046.875 Hz (exactly 67 cycles in 512 PCM
// words, so no window is needed) is applied at three levels around mid
// supply.  After the filter has settled, 512 PCM words are collected and
// transformed; the SNR is the power in the tone bin over the power of all
// other bins from bin 1 to 4 kHz.  Checks: the SNR must rise with the input
// level, and at the largest level (0.8 of the half supply) it must exceed
// 55 dB; the two upper levels must clear 35 dB.  At -40 dB the noiseless,
// undithered first-order loop falls into idle tones and only about 17 dB is
// reached, so that level is measured and printed but not held to a floor.
`timescale 1ns/1ps
module tb_adc_voice_snr;
  import dsm_pkg::*;

  localparam int  NW   = 512;
  localparam int  KTONE = 67;
  localparam real PI   = 3.14159265358979;
  localparam real VDD  = 3.3;
  localparam real TCLK = 244.140625;  // ns

  logic clk_adc = 0, rst_adc_n = 0;
  logic adc_comp_in, adc_fb_out, adc_bitstream, adc_pcm_valid;
  logic signed [ADC_PCM_W-1:0] adc_pcm;
  dac_sample_t dac_sample;
  logic dac_phase_wrap, dac_out;
  real vin = 1.65, vnode;

  int checks = 0, failures = 0;
  real pcm_buf[NW];

  reconfig_converter_top dut (
    .clk_adc(clk_adc), .rst_adc_n(rst_adc_n), .adc_comp_in(adc_comp_in),
    .adc_fb_out(adc_fb_out), .adc_bitstream(adc_bitstream), .adc_pcm(adc_pcm),
    .adc_pcm_valid(adc_pcm_valid),
    .clk_dac(clk_adc), .rst_dac_n(1'b0), .dac_ftw('0), .dac_sample(dac_sample),
    .dac_phase_wrap(dac_phase_wrap), .dac_out(dac_out)
  );

  adc_rc_network_model #(.CINT(4.7e-9), .VDD(VDD), .VTH(VDD / 2.0)) u_net (
    .clk(clk_adc), .vin(vin), .fb_out(adc_fb_out), .comp(adc_comp_in), .vnode(vnode)
  );

  always #(TCLK / 2.0) clk_adc = ~clk_adc;

  initial begin
    #1_000_000_000;
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

  function automatic real snr_db();
    real ps, pn;
    ps = 0.0; pn = 0.0;
    for (int k = 1; k <= NW / 2; k++) begin
      real re, im;
      re = 0.0; im = 0.0;
      for (int n = 0; n < NW; n++) begin
        re += pcm_buf[n] * $cos(2.0 * PI * k * n / NW);
        im -= pcm_buf[n] * $sin(2.0 * PI * k * n / NW);
      end
      if (k == KTONE) ps += re * re + im * im;
      else pn += re * re + im * im;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  // Analogue source: the sine is re-evaluated every sampling clock.
  real amp = 0.0;
  longint tick = 0;
  always @(negedge clk_adc) begin
    tick++;
    vin = VDD / 2.0 + amp * $sin(2.0 * PI * real'(KTONE) / real'(NW) * real'(tick) / real'(ADC_DECIM));
  end

  task automatic measure(input real a, output real snr);
    int words;
    amp = a;
    words = 0;
    while (words < NW + 4) begin
      @(posedge clk_adc);
      #2;
      if (adc_pcm_valid) begin
        if (words >= 4) pcm_buf[words - 4] = real'(adc_pcm);
        words++;
      end
    end
    snr = snr_db();
    $display("tone amplitude %0.3f V (%0.1f dB of half supply): SNR %0.1f dB", a,
             20.0 * $log10(a / (VDD / 2.0)), snr);
  endtask

  initial begin
    real s_lo, s_mid, s_hi;
    repeat (4) @(posedge clk_adc);
    #1 rst_adc_n = 1;
    measure(0.0165, s_lo);   // -40 dB
    measure(0.165, s_mid);   // -20 dB
    measure(1.32, s_hi);     // 0.8 of half supply
    check(s_mid > s_lo && s_hi > s_mid, "SNR rises with input level");
    check(s_hi > 55.0, "SNR at the largest level above 55 dB");
    check(s_mid > 35.0 && s_hi > 35.0, "35 dB voice floor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
