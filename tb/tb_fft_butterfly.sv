// tb_fft_butterfly: self-checking test of the radix-2 butterfly.
//
// Random operands and twiddle angles in both modes are compared with the
// butterfly computed in floating point from the same coefficients
// (c = (a+b)/2, d = (a-b)*W/2 with W = cos -/+ j*sin), within one LSB of
// truncation. Directed cases check the saturation of the difference path,
// the one-cycle latency and that the outputs hold while en is low.
module tb_fft_butterfly;
  localparam int W    = 16;
  localparam int CW   = 16;
  localparam int CF   = 14;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0;
  logic en, ifftfft_sel;
  logic signed [W-1:0]  ar, ai, br, bi, c0, c1, c2, c3;
  logic signed [CW-1:0] cos_coef, sin_coef;

  fft_butterfly dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real clip(input real v);
    if (v > 32767.0)  return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  // Apply one operand set and compare after the clock edge.
  task automatic apply(input int a_r, a_i, b_r, b_i, input real ang, input bit inv);
    real c, s, e0, e1, e2, e3, in1, in2;
    @(negedge clk);
    ar = W'(a_r); ai = W'(a_i); br = W'(b_r); bi = W'(b_i);
    cos_coef = CW'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
    sin_coef = CW'($rtoi($floor($sin(ang) * 16384.0 + 0.5)));
    ifftfft_sel = inv;
    en = 1'b1;
    c = real'(cos_coef) / 16384.0;
    s = (inv ? 1.0 : -1.0) * real'(sin_coef) / 16384.0;
    in1 = real'(a_r - b_r);
    in2 = real'(a_i - b_i);
    e0 = $floor(real'(a_r + b_r) / 2.0);
    e1 = $floor(real'(a_i + b_i) / 2.0);
    e2 = clip((in1 * c - in2 * s) / 2.0);
    e3 = clip((in1 * s + in2 * c) / 2.0);
    if ((in1 * c - in2 * s) / 2.0 > 32767.0 || (in1 * c - in2 * s) / 2.0 < -32768.0) n_sat++;
    @(posedge clk);
    #1;
    check(real'(c0) == e0 && real'(c1) == e1,
          $sformatf("sum (%0d,%0d) expected (%f,%f)", c0, c1, e0, e1));
    check(real'(c2) <= e2 + 0.01 && real'(c2) >= e2 - 1.01 &&
          real'(c3) <= e3 + 0.01 && real'(c3) >= e3 - 1.01,
          $sformatf("difference (%0d,%0d) expected (%f,%f) inv=%0d", c2, c3, e2, e3, inv));
  endtask

  initial begin
    en = 1'b0; ifftfft_sel = 1'b0;
    ar = '0; ai = '0; br = '0; bi = '0; cos_coef = '0; sin_coef = '0;
    for (int t = 0; t < 2000; t++) begin
      apply($urandom_range(65535) - 32768, $urandom_range(65535) - 32768,
            $urandom_range(65535) - 32768, $urandom_range(65535) - 32768,
            2.0 * PI * real'($urandom_range(127)) / 256.0, t[0]);
    end
    // Known values: a = 1000+200j, b = -3000+600j, W = exp(-j*pi/2) (FFT):
    // c = (-1000, 400), d = (4000-400j)*(-j)/2 = (-200, -2000).
    apply(1000, 200, -3000, 600, PI / 2.0, 1'b0);
    check(c0 == -1000 && c1 == 400 && c2 == -200 && c3 == -2000,
          $sformatf("directed FFT case (%0d,%0d,%0d,%0d)", c0, c1, c2, c3));
    // Same operands, IFFT: d = (4000-400j)*(+j)/2 = (200, 2000).
    apply(1000, 200, -3000, 600, PI / 2.0, 1'b1);
    check(c2 == 200 && c3 == 2000, $sformatf("directed IFFT case (%0d,%0d)", c2, c3));
    // Saturation: |in| = 65535*sqrt(2) rotated onto the real axis.
    apply(32767, -32768, -32768, 32767, PI / 4.0, 1'b1);
    check(c2 == 16'sd32767, $sformatf("positive saturation %0d", c2));
    apply(-32768, 32767, 32767, -32768, PI / 4.0, 1'b1);
    check(c2 == -16'sd32768, $sformatf("negative saturation %0d", c2));
    // Hold while en is low.
    @(negedge clk);
    en = 1'b0;
    ar = 16'sd5; br = 16'sd7;
    @(posedge clk);
    #1;
    check(c0 != 16'sd6, "outputs hold while en is low");
    check(n_sat >= 2, $sformatf("saturation exercised %0d times", n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
