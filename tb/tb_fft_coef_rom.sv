// tb_fft_coef_rom: checks every entry of the default 256-point twiddle ROM
// against cos/sin(2*pi*k/256) scaled by 2^14 (within half an LSB), the
// one-cycle read latency, and that the outputs hold while en is low.
module tb_fft_coef_rom;
  localparam int  N  = 256;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic en;
  logic [6:0] addr;
  logic signed [15:0] cos_coef, sin_coef;

  fft_coef_rom dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real ec, es;
    en = 1'b0;
    addr = '0;
    for (int k = 0; k < N / 2; k++) begin
      @(negedge clk);
      en = 1'b1;
      addr = 7'(k);
      @(posedge clk);
      #1;
      ec = $cos(2.0 * PI * k / N) * 16384.0;
      es = $sin(2.0 * PI * k / N) * 16384.0;
      check(real'(cos_coef) - ec <= 0.5 && ec - real'(cos_coef) <= 0.5 &&
            real'(sin_coef) - es <= 0.5 && es - real'(sin_coef) <= 0.5,
            $sformatf("entry %0d: (%0d,%0d) expected (%f,%f)", k, cos_coef, sin_coef, ec, es));
    end
    @(negedge clk);
    addr = 7'd0;
    en = 1'b0;
    @(posedge clk);
    #1;
    // Still entry 127: cos = round(-16384*cos(pi/128)), sin = round(16384*sin(pi/128)).
    check(cos_coef == -16'sd16379 && sin_coef == 16'sd402,
          $sformatf("outputs hold while en is low (%0d,%0d)", cos_coef, sin_coef));
    @(negedge clk);
    en = 1'b1;
    @(posedge clk);
    #1;
    check(cos_coef == 16'sd16384 && sin_coef == 16'sd0, "entry 0 is (1.0, 0)");
    @(negedge clk);
    addr = 7'd64;
    @(posedge clk);
    #1;
    check(cos_coef == 16'sd0 && sin_coef == 16'sd16384, "entry 64 is (0, 1.0)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
