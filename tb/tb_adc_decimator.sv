// tb_adc_decimator -- self-checking test of the CIC decimation filter.
//
// The bits fed to the filter are recorded (as +1 / -1, zero before the first
// clock after reset).  The expected output of a sinc^N decimator is the
// convolution of that history with the N-fold convolution of a length-DECIM
// box window; the test builds those taps itself and compares every PCM word,
// including the first ones while the filter fills.  Inputs are random bits at
// several ones densities plus all-ones and all-zeros runs, which must give
// the full-scale values +DECIM^N and -DECIM^N.  It also checks that a PCM
// word appears exactly every DECIM clocks.
`timescale 1ns/1ps
module tb_adc_decimator;
  import dsm_pkg::*;

  localparam int R  = ADC_DECIM;
  localparam int N  = ADC_CIC_N;
  localparam int PW = ADC_PCM_W;
  localparam int HL = N * (R - 1) + 1;   // taps of the sinc^N response
  localparam int NOUT = 40;
  localparam int NBITS = NOUT * R + 8;

  logic clk = 0, rst_n = 0, bit_in = 0;
  logic signed [PW-1:0] pcm;
  logic pcm_valid;

  int checks = 0, failures = 0;
  longint h[HL];
  int     x[NBITS + 1];   // x[t]: bit sampled at clock edge t (1-based)

  adc_decimator dut (.clk(clk), .rst_n(rst_n), .bit_in(bit_in), .pcm(pcm), .pcm_valid(pcm_valid));

  always #122 clk = ~clk;

  initial begin
    #20_000_000;
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

  // h = box * box * ... (N times), box = R ones
  initial begin
    longint tmp[HL];
    int len;
    for (int i = 0; i < HL; i++) h[i] = 0;
    for (int i = 0; i < R; i++) h[i] = 1;
    len = R;
    for (int s = 1; s < N; s++) begin
      for (int i = 0; i < HL; i++) tmp[i] = 0;
      for (int i = 0; i < len; i++)
        for (int j = 0; j < R; j++) tmp[i + j] += h[i];
      len = len + R - 1;
      for (int i = 0; i < HL; i++) h[i] = tmp[i];
    end
  end

  function automatic longint expected(input int t);
    // the word produced at edge t covers bits up to edge t - N
    longint acc = 0;
    for (int k = 0; k < HL; k++) begin
      int idx;
      idx = t - N - k;
      if (idx >= 1) acc += h[k] * x[idx];
    end
    return acc;
  endfunction

  function automatic bit next_bit(input int t);
    int seg = t / (4 * R);
    case (seg % 5)
      0: return 1'b1;                                   // all ones
      1: return 1'($urandom_range(0, 99) < 75);         // density 0.75
      2: return 1'b0;                                   // all zeros
      3: return 1'($urandom_range(0, 99) < 20);         // density 0.2
      default: return 1'(t % 2);                        // 0.5
    endcase
  endfunction

  initial begin
    int last_valid, nvalid;
    longint fullscale;
    last_valid = 0;
    nvalid = 0;
    fullscale = 1;
    for (int i = 0; i < N; i++) fullscale *= R;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
    for (int t = 1; t <= NBITS; t++) begin
      bit b;
      b = next_bit(t);
      bit_in = b;
      x[t] = b ? 1 : -1;
      @(posedge clk);
      #1;
      if (pcm_valid) begin
        longint e;
        e = expected(t);  // word of the dump at edge t, seen right after it
        nvalid++;
        check(longint'(pcm) == e, $sformatf("pcm %0d exp %0d (t=%0d)", pcm, e, t));
        if (nvalid > 1) check(t - last_valid == R, "output spacing");
        if ((t % (20 * R)) > 2 * R && (t % (20 * R)) < 4 * R)
          check(longint'(pcm) == fullscale, "full scale +");
        last_valid = t;
      end
    end
    check(nvalid == NBITS / R, $sformatf("number of outputs %0d", nvalid));
    $display("%0d PCM words checked", nvalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
