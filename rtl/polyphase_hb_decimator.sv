// polyphase_hb_decimator: 10th-order double polyphase all-pass halfband
// lowpass with 2:1 decimation.
//
// Two identical 5th-order two-path halfband sections are cascaded:
//   H(z) = [ 0.5 * (A1(z^2) + z^-1 A2(z^2)) ]^2,  A_i from allpass_section.
// The first section runs at the input rate: A1(z^2) and A2(z^2) each see
// every input sample, the A2 path gets an extra unit delay, and the path sum
// is halved by a one-bit arithmetic shift. The second section is followed by
// the 2:1 downsampler, so it is built in polyphase form at the output rate:
// the even samples of the first section's output feed A1(z), the odd samples
// feed A2(z), and every even sample produces one output
//   y[m] = 0.5 * (A1 applied to u[2m] + A2 applied to u[2m-1]).
// This is bit-for-bit the same as running the second section at full rate
// and dropping every other output, at half the additions.
//
// Interface: in_valid qualifies in_data (at most one sample per cycle).
// out_valid pulses one cycle after every second accepted input (the 1st,
// 3rd, 5th, ... after reset), carrying out_data. Both data ports use the
// DATA_W/DATA_FRAC fixed-point format of ecg_dec_pkg.
// Reset: asynchronous, active low; the phase restarts on the even branch.
//
// The cascade structure of two two-path sections, the two coefficients
// shared by both sections and the 2:1 ratio follow the published design; the
// coefficient values, word lengths, truncation and the phase convention are
// this design's choices (see ecg_dec_pkg).
module polyphase_hb_decimator #(
  parameter int unsigned W        = ecg_dec_pkg::DATA_W,
  parameter int unsigned A1_SH1   = ecg_dec_pkg::A1_SH1,
  parameter int unsigned A1_SH2   = ecg_dec_pkg::A1_SH2,
  parameter int          A1_SIGN2 = ecg_dec_pkg::A1_SIGN2,
  parameter int unsigned A2_SH1   = ecg_dec_pkg::A2_SH1,
  parameter int unsigned A2_SH2   = ecg_dec_pkg::A2_SH2,
  parameter int          A2_SIGN2 = ecg_dec_pkg::A2_SIGN2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  // ---- section 1, full rate ------------------------------------------------
  logic signed [W-1:0] s1_a1, s1_a2, s1_a2_dly;
  logic signed [W:0]   s1_sum;
  logic signed [W-1:0] u;

  allpass_section #(.W(W), .D(2), .SH1(A1_SH1), .SH2(A1_SH2), .SIGN2(A1_SIGN2))
    u_s1_a1 (.clk, .rst_n, .in_valid, .in_data, .out_data(s1_a1));
  allpass_section #(.W(W), .D(2), .SH1(A2_SH1), .SH2(A2_SH2), .SIGN2(A2_SIGN2))
    u_s1_a2 (.clk, .rst_n, .in_valid, .in_data, .out_data(s1_a2));

  assign s1_sum = (W+1)'(s1_a1) + (W+1)'(s1_a2_dly);
  assign u      = W'(s1_sum >>> 1);

  // ---- section 2, polyphase at half rate -------------------------------------
  logic                odd_q;      // 0: next input is even, 1: odd
  logic                ev_valid, od_valid;
  logic signed [W-1:0] s2_a1, s2_a2, s2_a2_hold;
  logic signed [W:0]   s2_sum;

  assign ev_valid = in_valid && !odd_q;
  assign od_valid = in_valid &&  odd_q;

  allpass_section #(.W(W), .D(1), .SH1(A1_SH1), .SH2(A1_SH2), .SIGN2(A1_SIGN2))
    u_s2_a1 (.clk, .rst_n, .in_valid(ev_valid), .in_data(u), .out_data(s2_a1));
  allpass_section #(.W(W), .D(1), .SH1(A2_SH1), .SH2(A2_SH2), .SIGN2(A2_SIGN2))
    u_s2_a2 (.clk, .rst_n, .in_valid(od_valid), .in_data(u), .out_data(s2_a2));

  assign s2_sum = (W+1)'(s2_a1) + (W+1)'(s2_a2_hold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_a2_dly  <= '0;
      s2_a2_hold <= '0;
      odd_q      <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      out_valid <= ev_valid;
      if (in_valid) begin
        s1_a2_dly <= s1_a2;
        odd_q     <= !odd_q;
      end
      if (od_valid) s2_a2_hold <= s2_a2;
      if (ev_valid) out_data   <= W'(s2_sum >>> 1);
    end
  end

endmodule
