// tb_ecg_workload: ten seconds of an ECG-like signal through the modulator
// and the full decimator at default parameters, scored by magnitude error.
//
// The input is a synthetic ECG at 72 beats per minute built from Gaussian P,
// Q, R, S and T waves (peak about 0.45 of full scale), evaluated directly at
// the 51.2 kHz modulator rate (an oversampling ratio of 128 over the 400 Hz
// output rate). The behavioural 3rd-order modulator turns it into bits and
// the decimator returns 4000 samples at 400 Hz. The filter chain delays the
// signal by a few milliseconds, so the test searches the delay (0 to 20 ms
// in 20 us steps) that best aligns output and input, and reports the
// magnitude error: the mean absolute difference between output and delayed
// input, in percent of the input's peak magnitude, over the last 9.5 s.
// Checked: 4000 outputs, and an error below 0.48 %, the figure published for
// the same chain on a recorded ECG.
module tb_ecg_workload;
  import ecg_dec_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam real FSIN  = 51200.0;
  localparam real LSB   = 1.0 / 4194304.0;
  localparam int  N_IN  = 512000;
  localparam int  N_OUT = N_IN / 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic mod_en = 1'b0;
  real  u = 0.0;
  logic mod_bit;
  logic in_valid = 1'b0;

  logic                      out_valid;
  logic signed [DATA_W-1:0]  out_data;
  logic                      slink_valid, hb1_valid, hb2_valid;
  logic signed [SLINK_W-1:0] slink_data;
  logic signed [DATA_W-1:0]  hb1_data, hb2_data;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  sigma_delta_model u_mod (.clk, .rst_n, .en(mod_en), .u, .bit_out(mod_bit));

  always_ff @(posedge clk) in_valid <= mod_en;

  ecg_decimator dut (
    .clk, .rst_n, .in_valid, .in_bit(mod_bit),
    .out_valid, .out_data, .slink_valid, .slink_data,
    .hb1_valid, .hb1_data, .hb2_valid, .hb2_data
  );

  function automatic real gauss(real t, real c, real a, real s);
    real d;
    d = (t - c) / s;
    return a * $exp(-0.5 * d * d);
  endfunction

  // one beat every 60/72 s, R peak 0.3 s into the beat
  function automatic real ecg(real t);
    real tb, v;
    if (t < 0.0) return 0.0;
    tb = t - 0.833333333 * $floor(t / 0.833333333);
    v = gauss(tb, 0.10, 0.15, 0.025) + gauss(tb, 0.26, -0.10, 0.008) +
        gauss(tb, 0.30, 1.00, 0.010) + gauss(tb, 0.34, -0.25, 0.010) +
        gauss(tb, 0.58, 0.30, 0.045);
    return 0.45 * v;
  endfunction

  real ybuf [N_OUT];
  int  n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out < N_OUT) ybuf[n_out] = real'(out_data) * LSB;
      n_out++;
    end
  end

  initial begin
    real best_err, best_tau, peak;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk);
      mod_en = 1'b1;
      u = ecg(real'(i) / FSIN);
    end
    @(negedge clk); mod_en = 1'b0;
    repeat (10) @(negedge clk);

    checks++;
    if (n_out != N_OUT) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", n_out, N_OUT);
    end

    peak = 0.0;
    for (int m = 0; m < N_OUT; m++) begin
      real x;
      x = ecg(real'(m) / 400.0);
      if (x > peak) peak = x;
      if (-x > peak) peak = -x;
    end
    best_err = 1.0e9;
    best_tau = 0.0;
    for (int k = 0; k <= 1000; k++) begin
      real tau, sum;
      tau = real'(k) * 20.0e-6;
      sum = 0.0;
      for (int m = 200; m < N_OUT; m++) begin
        real t, d;
        // time of the last modulator sample that formed output m
        t = real'((m + 1) * 128 - 1) / FSIN;
        d = ybuf[m] - ecg(t - tau);
        sum += (d < 0.0) ? -d : d;
      end
      sum = sum / real'(N_OUT - 200);
      if (sum < best_err) begin
        best_err = sum;
        best_tau = tau;
      end
    end
    $display("ECG workload: %0d outputs, delay %0.2f ms, magnitude error %0.4f %% of peak",
             n_out, best_tau * 1000.0, 100.0 * best_err / peak);
    checks++;
    if (100.0 * best_err / peak >= 0.48) begin
      failures++;
      $display("FAIL magnitude error above 0.48 %%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_IN + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
