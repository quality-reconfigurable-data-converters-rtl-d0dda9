// dds_tone -- direct digital synthesiser for the DAC test tone.
//
// A PHASE_W-bit phase accumulator advances by the tuning word ftw on every
// clock; its top LUT_AW bits address a sine table, whose entry is the signed
// OUT_W-bit output sample.  The output frequency is f_clk * ftw / 2^PHASE_W;
// the default tuning word of the package gives 7.99 MHz from a 192 MHz clock.
// The design calls for a 6-bit DDS tone at 7.99 MHz; the accumulator width,
// the table size and the peak amplitude are this implementation's own choices.
//
// The sine table is computed at elaboration time:
//   LUT[k] = round(AMPLITUDE * sin(2*pi*k / 2^LUT_AW)),  k = 0 .. 2^LUT_AW-1
// so it holds no stored numbers and follows the parameters.
//
// Interface and timing: rst_n (synchronous, active low) clears the phase and
// the output.  The phase register holds the sum of all tuning words accepted
// so far; the sample register shows the table entry of the phase as it was
// one clock earlier, so sample(n) = LUT[phase(n-1) >> (PHASE_W-LUT_AW)].
// phase_wrap pulses for one clock when the accumulator wraps (one period of
// the tone has completed).
module dds_tone
  import dsm_pkg::*;
#(
  parameter int PHASE_W   = DDS_PHASE_W,
  parameter int LUT_AW    = DDS_LUT_AW,
  parameter int OUT_W     = DAC_IN_W,
  parameter int AMPLITUDE = DDS_AMPLITUDE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      ftw,
  output logic signed [OUT_W-1:0] sample,
  output logic                    phase_wrap
);

  localparam int LUT_N = 2 ** LUT_AW;

  typedef logic signed [OUT_W-1:0] lut_t [LUT_N];

  function automatic lut_t make_sine_lut();
    lut_t t;
    real  pi;
    pi = 3.14159265358979323846;
    for (int k = 0; k < LUT_N; k++) begin
      t[k] = OUT_W'($rtoi($floor(real'(AMPLITUDE) * $sin(2.0 * pi * real'(k) / real'(LUT_N)) + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t SINE_LUT = make_sine_lut();

  logic [PHASE_W-1:0] phase_q;
  logic [PHASE_W:0]   phase_sum;

  assign phase_sum = {1'b0, phase_q} + {1'b0, ftw};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q    <= '0;
      sample     <= '0;
      phase_wrap <= 1'b0;
    end else begin
      phase_q    <= phase_sum[PHASE_W-1:0];
      phase_wrap <= phase_sum[PHASE_W];
      sample     <= SINE_LUT[phase_q[PHASE_W-1 -: LUT_AW]];
    end
  end

endmodule
