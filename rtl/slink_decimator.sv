// slink_decimator: ORDER-th order slink (cascaded integrator-comb) decimator,
// decimation ratio R, for a 1-bit sigma-delta stream.
//
// H(z) = (1/R^ORDER) * ((1 - z^-R) / (1 - z^-1))^ORDER. The ORDER integrators
// run at the input rate; the downsampler sits between the integrators and the
// ORDER differentiators (combs), so the combs run at the output rate with a
// unit delay each. The input bit is taken as +1 (1) or -1 (0). All registers
// wrap modulo 2^OUT_W, which is exact because OUT_W covers the full gain
// R^ORDER plus sign (Hogenauer). The 1/R^ORDER scaling is not a multiplier:
// the output code is read with ORDER*log2(R) fraction bits.
//
// Interface: in_valid qualifies in_bit (one sample per cycle at most; it may be
// held high when the clock is the modulator clock). out_valid pulses one cycle
// after every R-th accepted input, with out_data = sum of the last
// (R-1)*ORDER+1 inputs weighted by the slink impulse response.
// Reset: asynchronous, active low, clears all state and the phase counter, so
// the first output follows input number R after reset.
//
// Order 4, ratio 32 and the integrator/downsampler/comb arrangement follow the
// published design; chained single-cycle integrators, the +/-1 mapping and
// the reset are this design's choices.
module slink_decimator #(
  parameter int unsigned ORDER = ecg_dec_pkg::SLINK_ORDER,
  parameter int unsigned R     = ecg_dec_pkg::SLINK_R,
  parameter int unsigned OUT_W = 2 + ORDER * $clog2(R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_bit,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic signed [OUT_W-1:0] integ_q [ORDER];
  logic signed [OUT_W-1:0] integ_d [ORDER];
  logic signed [OUT_W-1:0] comb_q  [ORDER];   // comb delay elements
  logic signed [OUT_W-1:0] comb_d  [ORDER+1]; // comb chain, [0] = downsampled value
  logic        [CW-1:0]    phase_q;
  logic                    dec_now;
  logic signed [OUT_W-1:0] x_in;

  assign x_in    = in_bit ? OUT_W'(1) : -OUT_W'(1);
  assign dec_now = in_valid && (phase_q == CW'(R - 1));

  // integrators, chained within the cycle
  always_comb begin
    integ_d[0] = integ_q[0] + x_in;
    for (int k = 1; k < ORDER; k++) integ_d[k] = integ_q[k] + integ_d[k-1];
  end

  // differentiators at the low rate
  always_comb begin
    comb_d[0] = integ_d[ORDER-1];
    for (int k = 0; k < ORDER; k++) comb_d[k+1] = comb_d[k] - comb_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        integ_q[k] <= '0;
        comb_q[k]  <= '0;
      end
      phase_q   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= dec_now;
      if (in_valid) begin
        for (int k = 0; k < ORDER; k++) integ_q[k] <= integ_d[k];
        phase_q <= dec_now ? '0 : phase_q + CW'(1);
      end
      if (dec_now) begin
        for (int k = 0; k < ORDER; k++) comb_q[k] <= comb_d[k];
        out_data <= comb_d[ORDER];
      end
    end
  end

endmodule
