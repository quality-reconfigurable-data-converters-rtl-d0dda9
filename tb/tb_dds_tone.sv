// tb_dds_tone -- self-checking test of the DDS tone source.
//
// Runs the DDS with its default sizes at the 7.99 MHz / 192 MHz tuning word,
// then with a second tuning word.  The test keeps its own 32-bit phase and
// compares every output sample with round(A * sin(2*pi*phase/2^32)) taken on
// the top table-address bits of the phase one clock earlier, evaluated here
// at run time.  It also counts phase wraps against the expected number of
// tone periods, which checks the output frequency f_clk * ftw / 2^32.
`timescale 1ns/1ps
module tb_dds_tone;
  import dsm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [DDS_PHASE_W-1:0] ftw = DDS_FTW_7M99_AT_192M;
  logic signed [DAC_IN_W-1:0] sample;
  logic phase_wrap;

  int checks = 0, failures = 0;

  dds_tone dut (.clk(clk), .rst_n(rst_n), .ftw(ftw), .sample(sample), .phase_wrap(phase_wrap));

  always #2.604 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ref_sine(input longint unsigned ph);
    longint unsigned idx;
    idx = ph >> (DDS_PHASE_W - DDS_LUT_AW);
    return $rtoi($floor(real'(DDS_AMPLITUDE) *
                        $sin(2.0 * 3.14159265358979 * real'(idx) / real'(2 ** DDS_LUT_AW)) + 0.5));
  endfunction

  task automatic run(input longint unsigned tw, input int n_clk);
    longint unsigned ph, ph_prev;
    longint unsigned total;
    int wraps;
    int exp_wraps;
    ftw = DDS_PHASE_W'(tw);
    rst_n = 0;
    @(posedge clk); @(posedge clk);
    #0.5 rst_n = 1;
    ph = 0; ph_prev = 0; wraps = 0; total = 0;
    check(sample == 0, "sample after reset");
    for (int n = 0; n < n_clk; n++) begin
      @(posedge clk);
      #0.5;
      // after this edge: phase = ph + tw, sample = LUT[ph]
      ph_prev = ph;
      ph = (ph + tw) & 64'hFFFF_FFFF;
      total = total + tw;
      check(sample == DAC_IN_W'(ref_sine(ph_prev)),
            $sformatf("sample %0d exp %0d", sample, ref_sine(ph_prev)));
      check(phase_wrap == (ph < ph_prev), "phase_wrap");
      if (phase_wrap) wraps++;
    end
    exp_wraps = int'(total >> DDS_PHASE_W);
    check(wraps == exp_wraps, $sformatf("wraps %0d exp %0d", wraps, exp_wraps));
    $display("ftw=%0d: %0d clocks, %0d tone periods", tw, n_clk, wraps);
  endtask

  initial begin
    run(64'(DDS_FTW_7M99_AT_192M), 4800);   // 7.99 MHz at 192 MHz: ~200 periods
    run(64'd536199823, 2000);          // 7.99 MHz at 64 MHz
    run(64'd22369621, 3000);           // 1 MHz at 192 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
