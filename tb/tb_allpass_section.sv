// tb_allpass_section: self-checking test of the first-order all-pass section.
//
// Three instances cover the coefficient forms used in the chain: alpha1 =
// 2^-3 with D = 2, alpha2 = 2^-1 + 2^-4 with D = 1, and a subtracting pair
// 2^-5 - 2^-8 with D = 2. Random samples with random in_valid gaps are
// compared bit for bit against an integer model of
// y[n] = x[n-D] + floor-shifted alpha*(x[n] - y[n-D]). A second phase drives
// a sine and checks the all-pass property: output RMS equals input RMS
// within 1 %.
module tb_allpass_section;
  localparam int W = 26;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic signed [W-1:0] y0, y1, y2;

  int checks = 0;
  int failures = 0;

  allpass_section #(.W(W), .D(2), .SH1(3), .SH2(1), .SIGN2(0))  dut0 (.clk, .rst_n, .in_valid, .in_data, .out_data(y0));
  allpass_section #(.W(W), .D(1), .SH1(1), .SH2(4), .SIGN2(1))  dut1 (.clk, .rst_n, .in_valid, .in_data, .out_data(y1));
  allpass_section #(.W(W), .D(2), .SH1(5), .SH2(8), .SIGN2(-1)) dut2 (.clk, .rst_n, .in_valid, .in_data, .out_data(y2));

  always #5 clk = ~clk;

  // integer model state: index 0 = one sample ago, 1 = two samples ago
  longint xm [3][2];
  longint ym [3][2];
  int     dd [3]   = '{2, 1, 2};
  int     s1 [3]   = '{3, 1, 5};
  int     s2 [3]   = '{1, 4, 8};
  int     sg [3]   = '{0, 1, -1};
  real    sum_in2 = 0.0, sum_out2 [3] = '{0.0, 0.0, 0.0};
  bit     measure = 1'b0;

  function automatic longint model(int i, longint x);
    longint d, p;
    d = x - ym[i][dd[i]-1];
    p = d >>> s1[i];
    if (sg[i] > 0) p += d >>> s2[i];
    if (sg[i] < 0) p -= d >>> s2[i];
    return xm[i][dd[i]-1] + p;
  endfunction

  // compare in the middle of the low phase, update on the edge
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      longint y [3];
      for (int i = 0; i < 3; i++) begin
        y[i] = model(i, longint'(in_data));
        checks++;
        if ((i == 0 && longint'(y0) != y[i]) || (i == 1 && longint'(y1) != y[i]) ||
            (i == 2 && longint'(y2) != y[i])) begin
          failures++;
          if (failures < 10) $display("FAIL section %0d: x=%0d got %0d/%0d/%0d expected %0d",
                                      i, in_data, y0, y1, y2, y[i]);
        end
        xm[i][1] = xm[i][0]; xm[i][0] = longint'(in_data);
        ym[i][1] = ym[i][0]; ym[i][0] = y[i];
      end
      if (measure) begin
        sum_in2 += real'(in_data) * real'(in_data);
        sum_out2[0] += real'(y0) * real'(y0);
        sum_out2[1] += real'(y1) * real'(y1);
        sum_out2[2] += real'(y2) * real'(y2);
      end
    end
  end

  initial begin
    foreach (xm[i, j]) begin xm[i][j] = 0; ym[i][j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // random data, full +/-1.0 range of the 22-fraction-bit format
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 2) != 0;
      in_data  = W'($signed($urandom_range(0, 2 ** 23)) - 2 ** 22);
    end
    // sine, continuous valid, 64 samples per period
    for (int n = 0; n < 4096; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = W'($rtoi(0.5 * 4194304.0 * $sin(2.0 * 3.14159265358979 * n / 64.0)));
      measure  = (n >= 1024);
    end
    @(negedge clk); in_valid = 1'b0; measure = 1'b0;
    for (int i = 0; i < 3; i++) begin
      real g;
      g = $sqrt(sum_out2[i] / sum_in2);
      checks++;
      if (g < 0.99 || g > 1.01) begin
        failures++;
        $display("FAIL section %0d RMS gain %f", i, g);
      end
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
