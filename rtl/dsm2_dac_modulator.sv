// dsm2_dac_modulator -- second-order, 1-bit delta-sigma modulator for the DAC.
//
// The modulator turns a slow, 6-bit digital signal u(n) into a fast 1-bit
// stream v(n) whose local average follows u; an external RC low-pass filter on
// the output pin recovers the analogue signal.  The quantisation error is
// pushed out of band with a (1 - z^-1)^2 shape, so with the 192 MHz clock and a
// signal band of 8 MHz (over-sampling ratio 12) the in-band noise is small.
//
// Structure (per the DAC block diagram):
//   s1 = u  + fb1            7 bits      fb1 = v ? -K1 : +K1   (6 bits)
//   i1 <= i1 + s1            9 bits
//   s2 = i1 + fb2           10 bits      fb2 = v ? -K2 : +K2   (7 bits)
//   i2 <= i2 + s2           10 bits
//   v  = sign(i2)            1 bit       1 when i2 >= 0
// Both integrators are delaying (output taken from the register), as in the
// z^-1/(1-z^-1) model, which with K2 = 2*K1 gives the noise transfer
// (1 - z^-1)^2 and a signal transfer of z^-2 scaled by 1/K1.  All widths and
// the feedback constants 010000/110000 and 0100000/1100000 are the design's;
// the choice that v = 1 selects the negative constant (negative feedback), the
// synchronous active-low reset to zero and wrap-around integrators are this
// implementation's own.
//
// Interface and timing: u is sampled on every rising clk edge; v is the sign
// of the second integrator register, so it changes only after a clock edge and
// is glitch-free for driving a pin.  A change of u first shows on v two clocks
// later.  Input full scale for stable operation is about +/-12 LSB (0.75 K1);
// larger inputs overload the loop and the integrators wrap, which an
// assertion reports as a warning in simulation.
module dsm2_dac_modulator
  import dsm_pkg::*;
#(
  parameter int IN_W = DAC_IN_W,
  parameter int S1_W = DAC_S1_W,
  parameter int I1_W = DAC_I1_W,
  parameter int S2_W = DAC_S2_W,
  parameter int I2_W = DAC_I2_W,
  parameter int K1   = DAC_K1,
  parameter int K1_W = DAC_K1_W,
  parameter int K2   = DAC_K2,
  parameter int K2_W = DAC_K2_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] u,
  output logic                   v
);

  logic signed [K1_W-1:0] fb1;
  logic signed [K2_W-1:0] fb2;
  logic signed [S1_W-1:0] s1;
  logic signed [S2_W-1:0] s2;
  logic signed [I1_W-1:0] i1_q, i1_d, s1_ext;
  logic signed [I2_W-1:0] i2_q, i2_d, s2_ext;

  // Sign quantiser: 1 for a non-negative second integrator.
  assign v = ~i2_q[I2_W-1];

  // Feedback multiplexers K1 and K2, selected by the output bit.
  assign fb1 = v ? K1_W'(-K1) : K1_W'(K1);
  assign fb2 = v ? K2_W'(-K2) : K2_W'(K2);

  // Adders, sign-extended to the widths of the diagram.
  assign s1 = S1_W'(u) + S1_W'(fb1);
  assign s2 = S2_W'(i1_q) + S2_W'(fb2);

  // Integrator inputs at the integrator widths, and the next states.
  assign s1_ext = I1_W'(s1);
  assign s2_ext = I2_W'(s2);
  assign i1_d   = i1_q + s1_ext;
  assign i2_d   = i2_q + s2_ext;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i1_q <= '0;
      i2_q <= '0;
    end else begin
      i1_q <= i1_d;
      i2_q <= i2_d;
    end
  end

  // Overload check for simulation: an integrator wraps when both addends
  // have the same sign and the sum has the other one.  This happens only for
  // inputs beyond the stable range.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(i1_q[I1_W-1] == s1_ext[I1_W-1] && i1_d[I1_W-1] != i1_q[I1_W-1]))
        else $warning("first integrator wrapped: input beyond the stable range");
      assert (!(i2_q[I2_W-1] == s2_ext[I2_W-1] && i2_d[I2_W-1] != i2_q[I2_W-1]))
        else $warning("second integrator wrapped: input beyond the stable range");
    end
  end

endmodule
