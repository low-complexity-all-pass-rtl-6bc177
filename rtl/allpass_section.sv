// allpass_section: first-order all-pass section in z^D with a multiplier-free
// coefficient, A(z^D) = (alpha + z^-D) / (1 + alpha z^-D).
//
// It computes y[n] = x[n-D] + alpha * (x[n] - y[n-D]): one subtraction, the
// shift-and-add product and one addition. alpha = 2^-SH1 + SIGN2 * 2^-SH2 is
// hard-wired as arithmetic right shifts (SIGN2 = 0 keeps only the first term).
// The products are truncated toward minus infinity; the result wraps to W
// bits, so the caller keeps enough integer headroom (the peak gain of a
// first-order all-pass is 1 + 2*alpha); an assertion reports any wrap in
// simulation.
//
// Interface: out_data is combinational from in_data and the state, valid in
// the cycle in which in_valid is high; the D-deep input and output delay
// lines advance on in_valid only. D = 2 gives the A(z^2) section run at the
// input rate; D = 1 gives the same section run at half rate in a polyphase
// branch. Reset: asynchronous, active low, clears the delay lines.
//
// The transfer function and the power-of-two coefficients follow the
// published design; the direct-form arrangement, truncation and reset are
// this design's choices.
module allpass_section #(
  parameter int unsigned W     = ecg_dec_pkg::DATA_W,
  parameter int unsigned D     = 2,
  parameter int unsigned SH1   = ecg_dec_pkg::A1_SH1,
  parameter int unsigned SH2   = ecg_dec_pkg::A1_SH2,
  parameter int          SIGN2 = ecg_dec_pkg::A1_SIGN2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data
);

  logic signed [W-1:0] x_dl [D];   // x[n-1] .. x[n-D]
  logic signed [W-1:0] y_dl [D];   // y[n-1] .. y[n-D]
  logic signed [W:0]   diff;
  logic signed [W:0]   term1, term2, prod;
  logic signed [W+1:0] sum_full;

  always_comb begin
    diff  = (W+1)'(in_data) - (W+1)'(y_dl[D-1]);
    term1 = diff >>> SH1;
    term2 = diff >>> SH2;
    if (SIGN2 > 0)      prod = term1 + term2;
    else if (SIGN2 < 0) prod = term1 - term2;
    else                prod = term1;
    sum_full = (W+2)'(x_dl[D-1]) + (W+2)'(prod);
    out_data = W'(sum_full);
  end

  // the result must fit the word: a wrap would mean too little headroom
  always_ff @(posedge clk) begin
    if (rst_n && in_valid)
      assert (sum_full == (W+2)'(out_data))
        else $error("allpass_section: result overflows %0d bits", W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < D; k++) begin
        x_dl[k] <= '0;
        y_dl[k] <= '0;
      end
    end else if (in_valid) begin
      x_dl[0] <= in_data;
      y_dl[0] <= out_data;
      for (int k = 1; k < D; k++) begin
        x_dl[k] <= x_dl[k-1];
        y_dl[k] <= y_dl[k-1];
      end
    end
  end

endmodule
