// Root-raised-cosine pulse shaping and DAC output stage.
//
// A TAPS-tap FIR (TAPS = 2*SPAN+1, two samples per symbol) filters the I and
// Q sample streams of the assembled radio frame. Roll-off 0.22 is used when
// alpha_sel is 1 and 0.35 otherwise; both coefficient sets are computed at
// elaboration from the RRC impulse response, normalised so that the sum of
// |h| is 1 (the output cannot overflow for inputs within +/-16384), and
// quantised to Q1.15. On each in_step (one new sample every 2nd clock) the
// input sample, or zero when in_valid is low, enters the delay line and the
// filtered value, acc >>> 14 saturated to 16 bits, is registered; it is held
// until the next in_step, so every output sample is presented for 2 clocks.
// out_valid is in_valid of the sample that entered, registered alongside.
// The output is a 16-bit two's-complement value of which a 12-bit DAC uses
// the upper bits. The two roll-off values and the 2x repeat follow the
// description; span, normalisation and scaling are this design's choices.
module rrc_shaper
  import cbsr_pkg::*;
#(
  parameter int unsigned SPAN = 8,
  localparam int unsigned TAPS = 2 * SPAN + 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_step,
  input  logic               in_valid,
  input  iq16_t              in_sample,
  input  logic               alpha_sel,
  output logic signed [15:0] out_i,
  output logic signed [15:0] out_q,
  output logic               out_valid
);
  typedef logic signed [15:0] coef_t [TAPS];

  function automatic coef_t make_coefs(input real beta);
    coef_t r;
    real   h [TAPS];
    real   sum;
    sum = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      h[k] = rrc((real'(k) - real'(SPAN)) / 2.0, beta);
      sum  = sum + rabs(h[k]);
    end
    for (int k = 0; k < TAPS; k++)
      r[k] = 16'(int'($floor(h[k] / sum * 32767.0 + 0.5)));
    return r;
  endfunction

  localparam coef_t C022 = make_coefs(0.22);
  localparam coef_t C035 = make_coefs(0.35);

  logic signed [15:0] dl_i [TAPS-1];
  logic signed [15:0] dl_q [TAPS-1];
  logic signed [35:0] acc_i, acc_q;
  logic signed [15:0] x_i, x_q;

  assign x_i = in_valid ? in_sample.i : 16'sd0;
  assign x_q = in_valid ? in_sample.q : 16'sd0;

  // Newest sample in tap 0 (taken directly from the input).
  always_comb begin
    acc_i = 36'(alpha_sel ? C022[0] : C035[0]) * 36'(x_i);
    acc_q = 36'(alpha_sel ? C022[0] : C035[0]) * 36'(x_q);
    for (int k = 1; k < TAPS; k++) begin
      acc_i += 36'(alpha_sel ? C022[k] : C035[k]) * 36'(dl_i[k-1]);
      acc_q += 36'(alpha_sel ? C022[k] : C035[k]) * 36'(dl_q[k-1]);
    end
  end

  function automatic logic signed [15:0] sat(input logic signed [35:0] a);
    logic signed [35:0] s;
    s = a >>> 14;
    if (s > 36'sd32767)  return 16'sh7FFF;
    if (s < -36'sd32768) return 16'sh8000;
    return s[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dl_i      <= '{default: '0};
      dl_q      <= '{default: '0};
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else if (in_step) begin
      dl_i[0] <= x_i;
      dl_q[0] <= x_q;
      for (int k = 1; k < TAPS - 1; k++) begin
        dl_i[k] <= dl_i[k-1];
        dl_q[k] <= dl_q[k-1];
      end
      out_i     <= sat(acc_i);
      out_q     <= sat(acc_q);
      out_valid <= in_valid;
    end
  end
endmodule
