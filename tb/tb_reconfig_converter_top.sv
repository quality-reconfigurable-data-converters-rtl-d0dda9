// tb_reconfig_converter_top -- end-to-end test of the converter block at its
// default sizes.
//
// ADC path: the external Rin/Rfb/Cint network and the input buffer are
// modelled by adc_rc_network_model and closed around the design's feedback
// pin, with a 4.096 MHz over-sampling clock.  For several DC input voltages
// the loop settles where the ones density of the bitstream is vin/VDD, so
// every settled PCM word must equal DECIM^N * (2*vin/VDD - 1) within 1.5 % of
// full scale (the RC network is a leaky integrator with a ripple of some
// millivolts on Cint, which leaves a gain error below 1 %); the 8 kHz word rate (one word per 512 clocks) is checked too.
//
// DAC path: the DDS runs at 192 MHz with the 7.99 MHz tuning word, then is
// retuned to 2 MHz.  The test follows the DDS phase itself and checks every
// DDS sample; it checks that the bitstream average follows the DDS samples
// (the running difference sum(u) - K1*sum(+/-1) stays bounded); and it takes
// the single-bin Fourier component of the +/-1 bitstream at the tone
// frequency, whose amplitude must be the tone peak over K1 (12/16): within
// 0.02 at 2 MHz, within 0.1 at 7.99 MHz on the edge of the signal band.
//
// Mechanisms counted, each of which must occur: PCM words produced, both
// feedback pin levels, both DAC feedback selections, DDS phase wraps and the
// retune of the DDS.
`timescale 1ns/1ps
module tb_reconfig_converter_top;
  import dsm_pkg::*;

  localparam real VDD = 3.3;
  localparam real PI  = 3.14159265358979;

  logic clk_adc = 0, rst_adc_n = 0, clk_dac = 0, rst_dac_n = 0;
  logic adc_comp_in, adc_fb_out, adc_bitstream, adc_pcm_valid;
  logic signed [ADC_PCM_W-1:0] adc_pcm;
  logic [DDS_PHASE_W-1:0] dac_ftw = DDS_FTW_7M99_AT_192M;
  dac_sample_t dac_sample;
  logic dac_phase_wrap, dac_out;
  real vin = 1.65, vnode;

  int checks = 0, failures = 0;
  int n_pcm = 0, n_fb_hi = 0, n_fb_lo = 0, n_dac_one = 0, n_dac_zero = 0, n_wrap = 0, n_retune = 0;
  bit adc_done = 0, dac_done = 0;

  reconfig_converter_top dut (
    .clk_adc(clk_adc), .rst_adc_n(rst_adc_n), .adc_comp_in(adc_comp_in),
    .adc_fb_out(adc_fb_out), .adc_bitstream(adc_bitstream), .adc_pcm(adc_pcm),
    .adc_pcm_valid(adc_pcm_valid),
    .clk_dac(clk_dac), .rst_dac_n(rst_dac_n), .dac_ftw(dac_ftw), .dac_sample(dac_sample),
    .dac_phase_wrap(dac_phase_wrap), .dac_out(dac_out)
  );

  adc_rc_network_model #(.CINT(4.7e-9), .VDD(VDD), .VTH(VDD / 2.0)) u_net (
    .clk(clk_adc), .vin(vin), .fb_out(adc_fb_out), .comp(adc_comp_in), .vnode(vnode)
  );

  always #122.0703125 clk_adc = ~clk_adc;  // 4.096 MHz
  always #2.6041667  clk_dac = ~clk_dac;   // 192 MHz

  initial begin
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- ADC ----------------
  initial begin : adc_test
    real levels[5];
    longint fullscale;
    real max_dev;
    levels = '{0.66, 1.2, 1.65, 2.2, 2.97};
    fullscale = longint'(ADC_DECIM) * ADC_DECIM;
    max_dev = 0.0;
    repeat (4) @(posedge clk_adc);
    #1 rst_adc_n = 1;
    foreach (levels[i]) begin
      int words, last_t;
      vin = levels[i];
      words = 0;
      last_t = 0;
      // let the loop and the filter settle for three words, then check four
      for (int t = 1; words < 7; t++) begin
        @(posedge clk_adc);
        #2;
        if (adc_fb_out) n_fb_hi++; else n_fb_lo++;
        if (adc_pcm_valid) begin
          words++;
          n_pcm++;
          if (last_t != 0) check(t - last_t == ADC_DECIM, "PCM word rate");
          last_t = t;
          if (words > 3) begin
            real expv, dev;
            expv = real'(fullscale) * (2.0 * vin / VDD - 1.0);
            dev = (real'(adc_pcm) - expv) / real'(fullscale);
            if (dev < 0) dev = -dev;
            if (dev > max_dev) max_dev = dev;
            check(dev < 0.015, $sformatf("ADC vin=%f pcm=%0d exp=%f", vin, adc_pcm, expv));
          end
        end
      end
    end
    $display("ADC: %0d PCM words, worst settled error %f of full scale", n_pcm, max_dev);
    adc_done = 1;
  end

  // ---------------- DAC ----------------
  function automatic int ref_sine(input longint unsigned ph);
    longint unsigned idx;
    idx = ph >> (DDS_PHASE_W - DDS_LUT_AW);
    return $rtoi($floor(real'(DDS_AMPLITUDE) *
                        $sin(2.0 * PI * real'(idx) / real'(2 ** DDS_LUT_AW)) + 0.5));
  endfunction

  longint unsigned ph_tb;   // phase register of the DDS as the test expects it
  longint run_err;          // sum(u) - K1 * sum(+/-1)
  longint max_run_err;
  int u_hist[2];            // DDS samples of the last two clocks (modulator delay)

  task automatic dac_segment(input longint unsigned tw, input int nclk, input real f_norm,
                             input real tol);
    real re, im, amp;
    longint unsigned ph_prev;
    re = 0.0; im = 0.0;
    for (int n = 0; n < nclk; n++) begin
      @(posedge clk_dac);
      #0.5;
      ph_prev = ph_tb;
      ph_tb = (ph_tb + tw) & 64'hFFFF_FFFF;
      check(dac_sample == DAC_IN_W'(ref_sine(ph_prev)), "DDS sample");
      if (dac_phase_wrap) n_wrap++;
      if (dac_out) n_dac_one++; else n_dac_zero++;
      // the bit now on dac_out answers the sample of the previous clock
      run_err += longint'(dac_sample) - (dac_out ? longint'(DAC_K1) : -longint'(DAC_K1));
      if (run_err > max_run_err) max_run_err = run_err;
      if (-run_err > max_run_err) max_run_err = -run_err;
      re += (dac_out ? 1.0 : -1.0) * $cos(2.0 * PI * f_norm * n);
      im += (dac_out ? 1.0 : -1.0) * $sin(2.0 * PI * f_norm * n);
    end
    amp = 2.0 * $sqrt(re * re + im * im) / real'(nclk);
    $display("DAC tone at %f of fs: bitstream amplitude %f (expected %f)",
             f_norm, amp, real'(DDS_AMPLITUDE) / real'(DAC_K1));
    check(amp > real'(DDS_AMPLITUDE) / real'(DAC_K1) - tol &&
          amp < real'(DDS_AMPLITUDE) / real'(DAC_K1) + tol, "DAC tone amplitude");
  endtask

  initial begin : dac_test
    ph_tb = 0; run_err = 0; max_run_err = 0;
    repeat (4) @(posedge clk_dac);
    #0.5 rst_dac_n = 1;
    // 7.99 MHz sits at the edge of the 8 MHz signal band, where the shaped
    // quantisation error still correlates with the tone: allow 0.1 there.
    dac_segment(64'(DDS_FTW_7M99_AT_192M), 24000, 7.99 / 192.0, 0.1);
    // retune: 2 MHz at 192 MHz
    @(negedge clk_dac);
    dac_ftw = 32'd44739243;
    n_retune++;
    // the phase register has already taken the old word on this clock's edge
    dac_segment(64'd44739243, 24000, 2.0 / 192.0, 0.02);
    check(max_run_err <= 256, $sformatf("bitstream tracks input, bound %0d", max_run_err));
    $display("DAC: max |sum(u) - K1*sum(v)| = %0d", max_run_err);
    dac_done = 1;
  end

  initial begin
    wait (adc_done && dac_done);
    check(n_pcm > 0,      "mechanism: PCM words produced");
    check(n_fb_hi > 0,    "mechanism: feedback pin high");
    check(n_fb_lo > 0,    "mechanism: feedback pin low");
    check(n_dac_one > 0,  "mechanism: DAC feedback -K");
    check(n_dac_zero > 0, "mechanism: DAC feedback +K");
    check(n_wrap > 0,     "mechanism: DDS phase wrap");
    check(n_retune > 0,   "mechanism: DDS retune");
    $display("counts: pcm=%0d fb_hi=%0d fb_lo=%0d dac_one=%0d dac_zero=%0d wraps=%0d retunes=%0d",
             n_pcm, n_fb_hi, n_fb_lo, n_dac_one, n_dac_zero, n_wrap, n_retune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
