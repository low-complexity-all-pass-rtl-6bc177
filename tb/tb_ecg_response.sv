// tb_ecg_response: magnitude response of the complete decimator, measured
// with tones through the behavioural sigma-delta modulator, at default
// parameters.
//
// Passband: tones of amplitude 0.5 at 10, 50, 100, 150 and 180 Hz. Each
// tone runs for 1 s; the output amplitude is measured over the last 0.5 s
// (a whole number of periods) by projecting the 400 Hz output onto a sine
// and a cosine at the tone frequency. The expected gain is the product of
// the four stage responses evaluated analytically:
//   |sinc^4 slink at 51.2 kHz| * |H_hb(f/1600)| * |H_hb(f/800)| * |C(f/400)|
// with H_hb = [0.5(A1(z^2) + z^-1 A2(z^2))]^2, alpha1 = 0.125,
// alpha2 = 0.5625 and C(z) = (1+ac)/(1+ac z^-1), ac = 2^-5 - 2^-8.
// The measured gain must match within 0.01 dB.
// Stopband: tones at 750 Hz and 350 Hz, which alias to 50 Hz in the first
// and second halfband stage respectively. The 50 Hz component at the output
// must be at least 100 dB below the input tone.
module tb_ecg_response;
  import ecg_dec_pkg::*;

  localparam real PI   = 3.14159265358979;
  localparam real FSIN = 51200.0;
  localparam real AMP  = 0.5;
  localparam real LSB  = 1.0 / 4194304.0;
  localparam real AL1  = 0.125;
  localparam real AL2  = 0.5625;
  localparam real ALC  = 1.0 / 32.0 - 1.0 / 256.0;

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

  // ---------------- analytic response ----------------
  // |A(e^{j th})|-style helpers on complex numbers held as (re, im)
  function automatic void allpass_c(real a, real th, output real re, output real im);
    // (a + e^{-j th}) / (1 + a e^{-j th})
    real nr, ni, dr, di, den;
    nr = a + $cos(th);  ni = -$sin(th);
    dr = 1.0 + a * $cos(th); di = -a * $sin(th);
    den = dr * dr + di * di;
    re = (nr * dr + ni * di) / den;
    im = (ni * dr - nr * di) / den;
  endfunction

  // |H_hb| of the 10th-order cascade at normalised frequency fn (cycles/sample)
  function automatic real hb_mag(real fn);
    real w, r1, i1, r2, i2, hr, hi;
    w = 2.0 * PI * fn;
    allpass_c(AL1, 2.0 * w, r1, i1);
    allpass_c(AL2, 2.0 * w, r2, i2);
    // z^-1 * A2
    hr = 0.5 * (r1 + r2 * $cos(w) + i2 * $sin(w));
    hi = 0.5 * (i1 + i2 * $cos(w) - r2 * $sin(w));
    return hr * hr + hi * hi;   // squared magnitude = magnitude of the cascade
  endfunction

  function automatic real slink_mag(real f);
    real r;
    r = $sin(PI * f * 32.0 / FSIN) / (32.0 * $sin(PI * f / FSIN));
    return r * r * r * r;
  endfunction

  function automatic real comp_mag(real fn);
    real w, dr, di;
    w = 2.0 * PI * fn;
    dr = 1.0 + ALC * $cos(w);
    di = -ALC * $sin(w);
    return (1.0 + ALC) / $sqrt(dr * dr + di * di);
  endfunction

  // ---------------- measurement ----------------
  real meas_f = 0.0;
  bit  meas_on = 1'b0;
  real acc_s = 0.0, acc_c = 0.0;
  int  acc_n = 0;
  int  n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real t, y;
      n_out++;
      if (meas_on) begin
        t = real'(n_out) / 400.0;
        y = real'(out_data) * LSB;
        acc_s += y * $sin(2.0 * PI * meas_f * t);
        acc_c += y * $cos(2.0 * PI * meas_f * t);
        acc_n++;
      end
    end
  end

  int n_fed = 0;

  // run a tone for 1 s and return the output amplitude at frequency f_meas
  task automatic run_tone(input real f_in, input real f_meas, output real amp);
    meas_f = f_meas;
    for (int i = 0; i < 51200; i++) begin
      @(negedge clk);
      mod_en = 1'b1;
      u = AMP * $sin(2.0 * PI * f_in * real'(n_fed) / FSIN);
      n_fed++;
      if (i == 25600) begin
        // start on an output boundary: the next 200 outputs span 0.5 s
        acc_s = 0.0; acc_c = 0.0; acc_n = 0;
        meas_on = 1'b1;
      end
    end
    @(negedge clk); mod_en = 1'b0;
    repeat (8) @(negedge clk);
    meas_on = 1'b0;
    amp = 2.0 * $sqrt(acc_s * acc_s + acc_c * acc_c) / real'(acc_n);
  endtask

  real pass_f [5] = '{10.0, 50.0, 100.0, 150.0, 180.0};

  initial begin
    real amp, want, got_db, want_db;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (pass_f[k]) begin
      run_tone(pass_f[k], pass_f[k], amp);
      want    = slink_mag(pass_f[k]) * hb_mag(pass_f[k] / 1600.0) *
                hb_mag(pass_f[k] / 800.0) * comp_mag(pass_f[k] / 400.0);
      got_db  = 20.0 * $log10(amp / AMP);
      want_db = 20.0 * $log10(want);
      $display("%6.1f Hz: gain %8.4f dB, expected %8.4f dB", pass_f[k], got_db, want_db);
      checks++;
      if (got_db - want_db > 0.01 || want_db - got_db > 0.01) begin
        failures++;
        $display("FAIL passband gain at %0.1f Hz", pass_f[k]);
      end
    end
    run_tone(750.0, 50.0, amp);
    got_db = 20.0 * $log10(amp / AMP + 1.0e-12);
    $display(" 750.0 Hz tone, alias at 50 Hz: %8.1f dB", got_db);
    checks++;
    if (got_db > -100.0) begin failures++; $display("FAIL 750 Hz alias rejection"); end
    run_tone(350.0, 50.0, amp);
    got_db = 20.0 * $log10(amp / AMP + 1.0e-12);
    $display(" 350.0 Hz tone, alias at 50 Hz: %8.1f dB", got_db);
    checks++;
    if (got_db > -100.0) begin failures++; $display("FAIL 350 Hz alias rejection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * 51200 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
