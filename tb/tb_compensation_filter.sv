// tb_compensation_filter: self-checking test of the first-order compensation
// (roll-up) filter.
//
// Random samples with random in_valid gaps are compared bit for bit against
// an integer model of y[n] = x[n] + floor-shifted alpha_c*(x[n] - y[n-1]).
// out_valid must follow in_valid by exactly one cycle. The response is then
// checked in real arithmetic against C(z) = (1+a)/(1+a z^-1) with
// a = 2^-5 - 2^-8: a constant input must settle to unity gain (within 4
// LSB), and an alternating +/-0.5 input (the Nyquist frequency) to a gain of
// (1+a)/(1-a) within 0.1 %.
module tb_compensation_filter;
  localparam int  W  = 26;
  localparam real FS = 4194304.0;
  localparam real A  = 1.0 / 32.0 - 1.0 / 256.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_data;

  int checks = 0;
  int failures = 0;

  compensation_filter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  longint y_m = 0;
  bit     expect_out = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("FAIL valid timing");
      end else if (expect_out) begin
        checks++;
        if (longint'(out_data) != y_m) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d expected %0d", out_data, y_m);
        end
      end
      expect_out = in_valid;
      if (in_valid) begin
        longint d;
        d   = longint'(in_data) - y_m;
        y_m = longint'(in_data) + (d >>> 5) - (d >>> 8);
      end
    end
  end

  initial begin
    real g, want;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 2) != 0;
      in_data  = W'($signed($urandom_range(0, 2 ** 23)) - 2 ** 22);
    end
    // DC
    for (int i = 0; i < 400; i++) begin
      @(negedge clk); in_valid = 1'b1; in_data = W'(1234567);
    end
    @(negedge clk); in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_data > 1234567 + 4 || out_data < 1234567 - 4) begin
      failures++;
      $display("FAIL DC output %0d", out_data);
    end
    // Nyquist
    for (int i = 0; i < 400; i++) begin
      @(negedge clk); in_valid = 1'b1;
      in_data = (i % 2 == 0) ? W'($rtoi(0.5 * FS)) : W'(-$rtoi(0.5 * FS));
    end
    @(negedge clk); in_valid = 1'b0;
    @(negedge clk);
    g    = (out_data < 0 ? -real'(out_data) : real'(out_data)) / (0.5 * FS);
    want = (1.0 + A) / (1.0 - A);
    checks++;
    if (g < want * 0.999 || g > want * 1.001) begin
      failures++;
      $display("FAIL Nyquist gain %f expected %f", g, want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
