// tb_ecg_decimator: end-to-end test of the complete 128:1 decimator at its
// default parameters, fed by a behavioural 3rd-order sigma-delta modulator.
//
// A 50 Hz sine of amplitude 0.5 (full scale 1.0) is modulated at 51.2 kHz.
// The first 12800 bits arrive on consecutive cycles; the next 6400 arrive
// with random idle cycles between them (in_valid low), which the chain must
// ride through. A floating-point model of the whole chain, driven by the same
// bits, gives the expected output: the slink as four cascaded 32-sample
// moving sums, each halfband as two full-rate 5th-order two-path sections in
// real arithmetic followed by dropping every other sample, and the
// compensation filter in real arithmetic. Checked:
//   * every output against the model within 2^-15 of full scale (the
//     hardware's only departures are its truncations),
//   * out_valid exactly 4 cycles after every 128th accepted input bit and
//     never otherwise, and the total output count,
//   * the recovered 50 Hz tone has the input amplitude within 0.5 %,
//   * every mechanism happened: slink decimation, the even and odd polyphase
//     branches of both halfband stages, compensation outputs, idle input
//     cycles.
module tb_ecg_decimator;
  import ecg_dec_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam real FSIN  = 51200.0;
  localparam real F0    = 50.0;
  localparam real AMP   = 0.5;
  localparam real LSB   = 1.0 / 4194304.0;   // 2^-DATA_FRAC
  localparam real TOL   = 1.0 / 32768.0;
  localparam int  N_CONT = 12800;
  localparam int  N_GAP  = 6400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic mod_en = 1'b0;
  real  u = 0.0;
  logic mod_bit;
  logic in_valid = 1'b0;

  logic                      out_valid;
  logic signed [DATA_W-1:0]  out_data;
  logic                      slink_valid;
  logic signed [SLINK_W-1:0] slink_data;
  logic                      hb1_valid;
  logic signed [DATA_W-1:0]  hb1_data;
  logic                      hb2_valid;
  logic signed [DATA_W-1:0]  hb2_data;

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

  // ---------------- floating-point reference chain ----------------
  int  ms_buf [4][32];
  int  ms_sum [4];
  int  ms_ptr = 0;
  int  n_acc = 0;
  real hb_x [2][2], hb_a1 [2][2], hb_a2 [2][2], hb_u [2][2], hb_b1 [2][2], hb_b2 [2][2];
  int  hb_n [2] = '{0, 0};
  real comp_y = 0.0;
  real exp_q [$];
  longint cyc = 0;
  longint due_q [$];

  localparam real AL1 = 0.125;
  localparam real AL2 = 0.5625;
  localparam real ALC = 1.0 / 32.0 - 1.0 / 256.0;

  function automatic real ap(real x, real x2, real y2, real a);
    return x2 + a * (x - y2);
  endfunction

  // one sample into halfband stage s; returns 1 and the output on even samples
  function automatic bit hb_step(int s, real x, output real y);
    real a1, a2, uu, b1, b2, v;
    a1 = ap(x,  hb_x[s][1], hb_a1[s][1], AL1);
    a2 = ap(x,  hb_x[s][1], hb_a2[s][1], AL2);
    uu = 0.5 * (a1 + hb_a2[s][0]);
    b1 = ap(uu, hb_u[s][1], hb_b1[s][1], AL1);
    b2 = ap(uu, hb_u[s][1], hb_b2[s][1], AL2);
    v  = 0.5 * (b1 + hb_b2[s][0]);
    hb_x[s][1]  = hb_x[s][0];  hb_x[s][0]  = x;
    hb_a1[s][1] = hb_a1[s][0]; hb_a1[s][0] = a1;
    hb_a2[s][1] = hb_a2[s][0]; hb_a2[s][0] = a2;
    hb_u[s][1]  = hb_u[s][0];  hb_u[s][0]  = uu;
    hb_b1[s][1] = hb_b1[s][0]; hb_b1[s][0] = b1;
    hb_b2[s][1] = hb_b2[s][0]; hb_b2[s][0] = b2;
    y = v;
    hb_n[s]++;
    return (hb_n[s] % 2) == 1;
  endfunction

  function automatic void ref_bit(bit b);
    int v;
    real s1, s2, s3;
    v = b ? 1 : -1;
    for (int k = 0; k < 4; k++) begin
      ms_sum[k] += v - ms_buf[k][ms_ptr];
      ms_buf[k][ms_ptr] = v;
      v = ms_sum[k];
    end
    ms_ptr = (ms_ptr + 1) % 32;
    n_acc++;
    if (n_acc % 32 == 0) begin
      s1 = real'(v) / 1048576.0;
      if (hb_step(0, s1, s2)) begin
        if (hb_step(1, s2, s3)) begin
          comp_y = s3 + ALC * (s3 - comp_y);
          exp_q.push_back(comp_y);
          due_q.push_back(cyc + 4);
        end
      end
    end
  endfunction

  // ---------------- checking and mechanism counters ----------------
  int  n_out = 0, n_slink = 0, n_hb1_ev = 0, n_hb1_od = 0, n_hb2_ev = 0, n_hb2_od = 0;
  int  n_idle = 0;
  bit  started = 1'b0;
  bit  slink_q = 1'b0, hb1_q = 1'b0;
  real max_err = 0.0;
  real sum_sq = 0.0, sum_ref_sq = 0.0;
  int  n_sq = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (started && !in_valid) n_idle++;
      if (slink_valid) n_slink++;
      // a halfband input sample followed by an output next cycle went to the
      // even (A1) branch, one without went to the odd (A2) branch
      if (slink_q) begin if (hb1_valid) n_hb1_ev++; else n_hb1_od++; end
      if (hb1_q)   begin if (hb2_valid) n_hb2_ev++; else n_hb2_od++; end
      slink_q = slink_valid;
      hb1_q   = hb1_valid;
      if (out_valid) begin
        real got, want, err;
        longint due;
        n_out++;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %0d", n_out);
        end else begin
          want = exp_q.pop_front();
          due  = due_q.pop_front();
          got  = real'(out_data) * LSB;
          err  = (got > want) ? got - want : want - got;
          if (err > max_err) max_err = err;
          if (err > TOL) begin
            failures++;
            if (failures < 10) $display("FAIL output %0d: got %f expected %f", n_out, got, want);
          end
          if (due != cyc) begin
            failures++;
            if (failures < 10) $display("FAIL output %0d at cycle %0d, due %0d", n_out, cyc, due);
          end
          // amplitude of the recovered tone, after the filters settled
          if (n_out > 40) begin
            real t, r;
            // time of the last input sample that formed this output
            t = real'(n_out * 128 - 1) / FSIN;
            r = AMP * $sin(2.0 * PI * F0 * t);
            sum_sq += got * got;
            sum_ref_sq += r * r;
            n_sq++;
          end
        end
      end
      if (in_valid) ref_bit(mod_bit);
      if (in_valid) started = 1'b1;
    end
  end

  int n_fed = 0;

  task automatic feed(input int n, input bit gaps);
    for (int i = 0; i < n; i++) begin
      if (gaps) begin
        int idle;
        idle = $urandom_range(0, 2);
        for (int j = 0; j < idle; j++) begin
          @(negedge clk); mod_en = 1'b0;
        end
      end
      @(negedge clk);
      mod_en = 1'b1;
      u = AMP * $sin(2.0 * PI * F0 * real'(n_fed) / FSIN);
      n_fed++;
    end
    @(negedge clk); mod_en = 1'b0;
  endtask

  initial begin
    real g;
    foreach (ms_buf[k, i]) ms_buf[k][i] = 0;
    foreach (ms_sum[k]) ms_sum[k] = 0;
    foreach (hb_x[s, i]) begin
      hb_x[s][i] = 0.0; hb_a1[s][i] = 0.0; hb_a2[s][i] = 0.0;
      hb_u[s][i] = 0.0; hb_b1[s][i] = 0.0; hb_b2[s][i] = 0.0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    feed(N_CONT, 1'b0);
    feed(N_GAP, 1'b1);
    repeat (10) @(negedge clk);

    checks++;
    if (n_out != (N_CONT + N_GAP) / 128 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL output count %0d, %0d still expected", n_out, exp_q.size());
    end
    g = $sqrt(sum_sq / sum_ref_sq);
    checks++;
    if (g < 0.995 || g > 1.005) begin
      failures++;
      $display("FAIL 50 Hz gain %f", g);
    end
    $display("outputs %0d, max deviation from float model %e, 50 Hz gain %f", n_out, max_err, g);
    $display("mechanisms: slink %0d, hb1 even %0d odd %0d, hb2 even %0d odd %0d, idle input cycles %0d",
             n_slink, n_hb1_ev, n_hb1_od, n_hb2_ev, n_hb2_od, n_idle);
    checks += 6;
    if (n_slink == 0)  begin failures++; $display("FAIL no slink decimation"); end
    if (n_hb1_ev == 0) begin failures++; $display("FAIL no hb1 even branch"); end
    if (n_hb1_od == 0) begin failures++; $display("FAIL no hb1 odd branch"); end
    if (n_hb2_ev == 0) begin failures++; $display("FAIL no hb2 even branch"); end
    if (n_hb2_od == 0) begin failures++; $display("FAIL no hb2 odd branch"); end
    if (n_idle == 0)   begin failures++; $display("FAIL no idle input cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
