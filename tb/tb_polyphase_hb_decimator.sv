// tb_polyphase_hb_decimator: self-checking test of the 10th-order double
// polyphase all-pass halfband 2:1 decimator.
//
// Reference: an integer model of the same transfer function written in the
// plain full-rate form (both 5th-order sections run on every sample with
// z^-2 all-pass sections, then every other output is kept), so it checks the
// polyphase split of the second section and the phase bookkeeping. Outputs
// are compared bit for bit. out_valid must come exactly one cycle after the
// 1st, 3rd, 5th, ... accepted input. Then two tones measure the filter itself
// in real arithmetic: a passband tone at 0.05 fs must pass with RMS gain 1
// +/- 0.1 %, and a tone at 0.45 fs (aliasing to 0.05 of the output rate) must be
// attenuated by more than 100 dB.
module tb_polyphase_hb_decimator;
  localparam int W   = 26;
  localparam real FS = 4194304.0;   // 2^22, the value of 1.0

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_data;

  int checks = 0;
  int failures = 0;

  polyphase_hb_decimator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  // full-rate model; [0] = one sample ago, [1] = two samples ago
  longint x_h [2], a1_h [2], a2_h [2], u_h [2], b1_h [2], b2_h [2];
  longint n_in = 0;
  bit     expect_out = 1'b0;
  longint expect_val = 0;
  int     n_out = 0;
  bit     measure = 1'b0;
  real    peak = 0.0;
  real    sumsq = 0.0;
  int     nsq = 0;

  function automatic longint ap(longint x, longint x2, longint y2, int sh1, int sh2, int sg);
    longint d, p;
    d = x - y2;
    p = d >>> sh1;
    if (sg > 0) p += d >>> sh2;
    if (sg < 0) p -= d >>> sh2;
    return x2 + p;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("FAIL valid timing after input %0d", n_in);
      end else if (expect_out) begin
        n_out++;
        checks++;
        if (longint'(out_data) != expect_val) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d: got %0d expected %0d", n_out, out_data, expect_val);
        end
        if (measure && (out_data < 0 ? -real'(out_data) : real'(out_data)) > peak) peak = (out_data < 0) ? -real'(out_data) : real'(out_data);
        if (measure) begin
          sumsq += real'(out_data) * real'(out_data);
          nsq++;
        end
      end
      expect_out = 1'b0;
      if (in_valid) begin
        longint x, a1, a2, u, b1, b2, v;
        x  = longint'(in_data);
        a1 = ap(x, x_h[1], a1_h[1], 3, 1, 0);
        a2 = ap(x, x_h[1], a2_h[1], 1, 4, 1);
        u  = (a1 + a2_h[0]) >>> 1;
        b1 = ap(u, u_h[1], b1_h[1], 3, 1, 0);
        b2 = ap(u, u_h[1], b2_h[1], 1, 4, 1);
        v  = (b1 + b2_h[0]) >>> 1;
        x_h[1] = x_h[0];   x_h[0] = x;
        a1_h[1] = a1_h[0]; a1_h[0] = a1;
        a2_h[1] = a2_h[0]; a2_h[0] = a2;
        u_h[1] = u_h[0];   u_h[0] = u;
        b1_h[1] = b1_h[0]; b1_h[0] = b1;
        b2_h[1] = b2_h[0]; b2_h[0] = b2;
        if (n_in % 2 == 0) begin
          expect_out = 1'b1;
          expect_val = v;
        end
        n_in++;
      end
    end
  end

  task automatic tone(input real f, input int n, input bit gaps);
    for (int i = 0; i < n; i++) begin
      if (gaps) begin
        @(negedge clk); in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = W'($rtoi(0.5 * FS * $sin(2.0 * 3.14159265358979 * f * i)));
      measure  = (i >= n / 2);
    end
    @(negedge clk); in_valid = 1'b0; measure = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    real g;
    foreach (x_h[i]) begin
      x_h[i] = 0; a1_h[i] = 0; a2_h[i] = 0; u_h[i] = 0; b1_h[i] = 0; b2_h[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // random data with random gaps, +/-1.0
    for (int i = 0; i < 3001; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 2) != 0;
      in_data  = W'($signed($urandom_range(0, 2 ** 23)) - 2 ** 22);
    end
    @(negedge clk); in_valid = 1'b0;
    // passband tone
    peak = 0.0; sumsq = 0.0; nsq = 0;
    tone(0.05, 2000, 1'b0);
    g = $sqrt(2.0 * sumsq / nsq) / (0.5 * FS);
    checks++;
    if (g < 0.999 || g > 1.001) begin
      failures++;
      $display("FAIL passband gain %f", g);
    end
    // stopband tone
    peak = 0.0;
    tone(0.45, 2000, 1'b1);
    g = peak / (0.5 * FS);
    checks++;
    if (g > 1.0e-5) begin
      failures++;
      $display("FAIL stopband gain %e", g);
    end
    $display("stopband tone residue %e (%0.1f dB)", g, 20.0 * $log10(g + 1.0e-12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
