// tb_dsm2_dac_modulator -- self-checking test of the second-order DAC modulator.
//
// A reference model in plain integers (no width limits) runs the difference
// equations of the modulator next to the device:
//   v = (i2 >= 0);  i1 += u - (v ? K1 : -K1);  i2 += i1_old - (v ? K2 : -K2)
// and the output bit is compared on every clock.  The stimulus is a mix of DC
// levels, a 7.99 MHz-at-192 MHz sine of peak 12 and random values, all inside
// the stable input range.  Independently of the model, the test also checks
// the conservation law of the first integrator: the running sum of the input
// minus the running sum of the fed-back constant stays bounded, which is what
// makes the average of the bitstream equal u / K1.  It also checks the
// output of the reset state.
`timescale 1ns/1ps
module tb_dsm2_dac_modulator;
  import dsm_pkg::*;

  localparam int K1 = DAC_K1;
  localparam int K2 = DAC_K2;

  logic clk = 0, rst_n = 0;
  logic signed [DAC_IN_W-1:0] u = '0;
  logic v;

  int checks = 0, failures = 0;
  longint ri1, ri2;       // reference integrators
  longint sum_err;        // sum(u) - sum(feedback), must stay bounded
  longint max_abs_err = 0;
  int n_ones = 0, n_zeros = 0;

  dsm2_dac_modulator dut (.clk(clk), .rst_n(rst_n), .u(u), .v(v));

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    #2_000_000;
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

  // One clock: present u, compare v before the edge, advance the model.
  task automatic step(input int uval);
    int rv;
    u = DAC_IN_W'(uval);
    #1;
    rv = (ri2 >= 0) ? 1 : 0;
    check(v == rv[0], $sformatf("v=%0d exp=%0d u=%0d", v, rv, uval));
    if (v) n_ones++; else n_zeros++;
    @(posedge clk);
    begin
      longint f1, f2, i1_old;
      f1 = (rv != 0) ? -longint'(K1) : longint'(K1);
      f2 = (rv != 0) ? -longint'(K2) : longint'(K2);
      i1_old = ri1;
      ri1 = ri1 + longint'(uval) + f1;
      ri2 = ri2 + i1_old + f2;
      sum_err = sum_err + longint'(uval) + f1;
      if (sum_err > max_abs_err) max_abs_err = sum_err;
      if (-sum_err > max_abs_err) max_abs_err = -sum_err;
    end
    #1;
  endtask

  initial begin
    ri1 = 0; ri2 = 0; sum_err = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Reset state: both integrators cleared, so the sign output reads 1.
    u = 6'sd8; #1;
    check(v == 1'b1, "v after reset");

    // DC levels
    for (int lvl = -12; lvl <= 12; lvl += 3) begin
      int ones;
      ones = 0;
      for (int n = 0; n < 400; n++) begin
        step(lvl);
        if (v) ones++;
      end
      // average of the bitstream equals lvl / K1 within the integrator bound
      check((2 * ones - 400) * K1 - lvl * 400 <= 200 && (2 * ones - 400) * K1 - lvl * 400 >= -200,
            $sformatf("DC average lvl=%0d ones=%0d", lvl, ones));
    end

    // Sine tone, 7.99 MHz sampled at 192 MHz, peak 12.
    for (int n = 0; n < 4000; n++) begin
      real ph;
      ph = 2.0 * 3.14159265358979 * 7.99 / 192.0 * n;
      step($rtoi($floor(12.0 * $sin(ph) + 0.5)));
    end

    // Random inputs inside the stable range.
    for (int n = 0; n < 4000; n++) step(int'($urandom_range(0, 20)) - 10);

    check(max_abs_err <= 256, $sformatf("first-integrator bound %0d", max_abs_err));
    check(n_ones > 100 && n_zeros > 100, "both feedback selections used");
    $display("max |sum(u) - sum(fb)| = %0d, ones=%0d zeros=%0d", max_abs_err, n_ones, n_zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
