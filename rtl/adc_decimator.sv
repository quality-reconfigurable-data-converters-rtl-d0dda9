// adc_decimator -- CIC decimation filter for the first-order delta-sigma ADC.
//
// The ADC delivers one bit per over-sampling clock; PCM samples are wanted at
// the over-sampling clock divided by DECIM (4.096 MHz / 512 = 8 kHz for the
// voice codec the design targets).  This module maps each bit to +1 / -1,
// low-pass filters the stream with an N-th order cascaded integrator-comb
// (sinc^N) filter and keeps one output in DECIM.  The ratio 512 and the 8 kHz
// output rate come from the design; the choice of a CIC filter, its order
// (N = 2, one more than the modulator order, the usual rule for a sinc
// decimator) and the output scaling are this implementation's own.
//
// Filter: H(z) = ((1 - z^-DECIM) / (1 - z^-1))^N.  Its DC gain is DECIM^N, so
// a bitstream of ones density p gives pcm = DECIM^N * (2p - 1), a signed
// value of PCM_W = N*log2(DECIM) + 2 bits.  The integrators run at the full
// clock rate in wrap-around arithmetic; the combs run once per output.
//
// Interface and timing: bit_in is read on every rising clk edge.  pcm_valid
// is a one-clock pulse every DECIM clocks, with pcm valid in that cycle and
// held until the next pulse.  The first N outputs after reset are the filter
// filling up.  Reset (synchronous, active low) clears all state.
module adc_decimator
  import dsm_pkg::*;
#(
  parameter int DECIM = ADC_DECIM,
  parameter int N     = ADC_CIC_N,
  parameter int PCM_W = N * $clog2(DECIM) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bit_in,
  output logic signed [PCM_W-1:0] pcm,
  output logic                    pcm_valid
);

  localparam int CNT_W = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic signed [PCM_W-1:0] integ_q [N];  // integrator chain, full rate
  logic signed [PCM_W-1:0] dly_q   [N];  // comb delays, decimated rate
  logic signed [PCM_W-1:0] comb    [N+1];
  logic [CNT_W-1:0]        cnt_q;
  logic                    dump;

  assign dump = (cnt_q == CNT_W'(DECIM - 1));

  // Comb chain, evaluated on the integrator output present in the dump cycle.
  always_comb begin
    comb[0] = integ_q[N-1];
    for (int k = 0; k < N; k++) comb[k+1] = comb[k] - dly_q[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        integ_q[k] <= '0;
        dly_q[k]   <= '0;
      end
      cnt_q     <= '0;
      pcm       <= '0;
      pcm_valid <= 1'b0;
    end else begin
      integ_q[0] <= integ_q[0] + (bit_in ? PCM_W'(1) : PCM_W'(-1));
      for (int k = 1; k < N; k++) integ_q[k] <= integ_q[k] + integ_q[k-1];

      cnt_q     <= dump ? '0 : cnt_q + 1'b1;
      pcm_valid <= dump;
      if (dump) begin
        for (int k = 0; k < N; k++) dly_q[k] <= comb[k];
        pcm <= comb[N];
      end
    end
  end

endmodule
