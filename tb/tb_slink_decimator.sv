// tb_slink_decimator: self-checking test of the 4th-order 32:1 slink decimator.
//
// Drives random bit streams with random in_valid gaps, plus long runs of all
// ones and all zeros (the full-scale +1.0 / -1.0 extremes, where the output
// reaches +/-2^20 and needs every bit of the word). The reference is the
// direct FIR form of the slink: the impulse response is built by convolving
// four length-32 boxcars (125 taps) and applied to the input history, so it
// shares no structure with the integrator/comb hardware. Checked: every
// output value, that out_valid comes exactly one cycle after every 32nd
// accepted input and at no other time, and the output count.
module tb_slink_decimator;
  localparam int ORDER = 4;
  localparam int R     = 32;
  localparam int W     = 2 + ORDER * $clog2(R);
  localparam int TAPS  = (R - 1) * ORDER + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_bit = 1'b0;
  logic out_valid;
  logic signed [W-1:0] out_data;

  int checks = 0;
  int failures = 0;

  slink_decimator #(.ORDER(ORDER), .R(R)) dut (.*);

  always #5 clk = ~clk;

  longint h [TAPS];
  int     xh [TAPS];
  int     n_in = 0;
  int     n_out = 0;
  bit     expect_out = 1'b0;
  longint expect_val = 0;

  function automatic void build_h();
    longint tmp [TAPS];
    int len = 1;
    foreach (h[i]) h[i] = 0;
    h[0] = 1;
    for (int s = 0; s < ORDER; s++) begin
      foreach (tmp[i]) tmp[i] = 0;
      for (int i = 0; i < len; i++)
        for (int j = 0; j < R; j++) tmp[i+j] += h[i];
      len += R - 1;
      foreach (h[i]) h[i] = tmp[i];
    end
  endfunction

  // model + checker, sampled on the clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      // output check for the previous cycle's decision
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("FAIL valid timing at input %0d: got %0b expected %0b", n_in, out_valid, expect_out);
      end else if (expect_out) begin
        checks++;
        n_out++;
        if (longint'(out_data) != expect_val) begin
          failures++;
          $display("FAIL output %0d: got %0d expected %0d", n_out, out_data, expect_val);
        end
      end
      expect_out = 1'b0;
      if (in_valid) begin
        longint acc;
        acc = 0;
        for (int k = TAPS - 1; k > 0; k--) xh[k] = xh[k-1];
        xh[0] = in_bit ? 1 : -1;
        n_in++;
        for (int k = 0; k < TAPS; k++) acc += h[k] * xh[k];
        if (n_in % R == 0) begin
          expect_out = 1'b1;
          expect_val = acc;
        end
      end
    end
  end

  task automatic drive(input int n, input int mode);
    // mode 0: random bits, random gaps; 1: all ones; 2: all zeros; 3: dense random
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = (mode == 0) ? ($urandom_range(0, 3) != 0) : 1'b1;
      case (mode)
        1: in_bit = 1'b1;
        2: in_bit = 1'b0;
        default: in_bit = $urandom_range(0, 1) == 1;
      endcase
    end
  endtask

  initial begin
    longint maxpos;
    build_h();
    foreach (xh[i]) xh[i] = 0;
    maxpos = 1;
    for (int s = 0; s < ORDER; s++) maxpos *= R;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(3000, 0);
    drive(400, 1);
    drive(400, 2);
    drive(3000, 3);
    drive(500, 1);
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    // the slink impulse response sums to R^ORDER: check the full-scale path was hit
    checks++;
    if (n_out != n_in / R) begin
      failures++;
      $display("FAIL output count %0d for %0d inputs", n_out, n_in);
    end
    checks++;
    begin
      longint s;
      s = 0;
      foreach (h[i]) s += h[i];
      if (s != maxpos) begin failures++; $display("FAIL reference gain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
