// compensation_filter: first-order roll-up filter that undoes the passband
// droop of the slink stage at the output rate.
//
// y[n] = x[n] + alpha_c * (x[n] - y[n-1]), i.e.
//   C(z) = (1 + alpha_c) / (1 + alpha_c z^-1),
// unity gain at DC and rising towards the Nyquist frequency. alpha_c =
// 2^-SH1 + SIGN2 * 2^-SH2 is hard-wired as shifts, so no multiplier is used;
// the product is truncated toward minus infinity and the sum wraps to W bits.
//
// Interface: one output per input. out_valid follows in_valid by one cycle
// and out_data holds the new y[n] from then until the next output.
// Reset: asynchronous, active low, clears y[n-1].
//
// The structure (input minus delayed output, one coefficient, added back to
// the input) and the single coefficient follow the published design; the
// value of alpha_c (fitted to the droop of the 4th-order 32:1 slink), word
// lengths and truncation are this design's choices.
module compensation_filter #(
  parameter int unsigned W     = ecg_dec_pkg::DATA_W,
  parameter int unsigned SH1   = ecg_dec_pkg::AC_SH1,
  parameter int unsigned SH2   = ecg_dec_pkg::AC_SH2,
  parameter int          SIGN2 = ecg_dec_pkg::AC_SIGN2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  logic signed [W:0]   diff, term1, term2, prod;
  logic signed [W-1:0] y_next;

  // out_data doubles as the y[n-1] delay element
  always_comb begin
    diff  = (W+1)'(in_data) - (W+1)'(out_data);
    term1 = diff >>> SH1;
    term2 = diff >>> SH2;
    if (SIGN2 > 0)      prod = term1 + term2;
    else if (SIGN2 < 0) prod = term1 - term2;
    else                prod = term1;
    y_next = W'((W+1)'(in_data) + prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= y_next;
    end
  end

endmodule
