// sigma_delta_model: behavioural (not synthesizable) model of a 3rd-order,
// single-loop, 1-bit sigma-delta modulator that feeds the decimator in the
// testbenches.
//
// It is a discrete-time error-feedback loop with the noise transfer function
//   NTF(z) = (1 - z^-1)^3 / D(z),
// D(z) = 1 - 2.37409474 z^-1 + 1.92935567 z^-2 - 0.53207537 z^-3, the
// denominator of a 3rd-order Butterworth highpass with cutoff 0.1 (of the
// Nyquist frequency). Its peak NTF gain is about 1.37, below the usual 1.5
// limit for a stable 1-bit loop; the testbenches keep its input within
// +/-0.5 of full scale. Output bit 1 means +1, 0 means -1, and
// V = U + NTF * E. The loop is this testbench's own choice: the converter the
// decimator is meant for is only specified as 3rd order, single loop, 1 bit,
// oversampling ratio 128.
//
// Interface: on every rising clk edge with en high it samples the real input
// u and updates bit_out. Reset clears the loop state.
module sigma_delta_model (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  real  u,
  output logic bit_out
);
  // (N - D) and D coefficients for z^-1 .. z^-3
  localparam real ND1 = -3.0 + 2.37409474;
  localparam real ND2 =  3.0 - 1.92935567;
  localparam real ND3 = -1.0 + 0.53207537;
  localparam real D1  = -2.37409474;
  localparam real D2  =  1.92935567;
  localparam real D3  = -0.53207537;

  real e1, e2, e3, f1, f2, f3;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= 0.0; e2 <= 0.0; e3 <= 0.0;
      f1 <= 0.0; f2 <= 0.0; f3 <= 0.0;
      bit_out <= 1'b0;
    end else if (en) begin
      real f, w, v;
      f = ND1 * e1 + ND2 * e2 + ND3 * e3 - D1 * f1 - D2 * f2 - D3 * f3;
      w = u + f;
      v = (w >= 0.0) ? 1.0 : -1.0;
      bit_out <= (w >= 0.0);
      e3 <= e2; e2 <= e1; e1 <= v - w;
      f3 <= f2; f2 <= f1; f1 <= f;
    end
  end
endmodule
