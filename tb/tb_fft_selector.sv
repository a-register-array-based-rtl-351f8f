// tb_fft_selector: checks the selector's operand multiplexers (pins when
// input_sel = 0, register-array data when 1), the hold while en is low,
// the reset value, and that the mode is taken from ifftfft_sel only in the
// cycle frame_start is high.
module tb_fft_selector;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic reset, frame_start, ifftfft_sel, input_sel, en;
  logic signed [15:0] xr, xi, yr, yi, sd0, sd1, sd2, sd3, ar, ai, br, bi;
  fft_mode_e mode;

  fft_selector dut (.*);

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
    logic signed [15:0] e [4];
    reset = 1'b1; frame_start = 1'b0; ifftfft_sel = 1'b1; input_sel = 1'b0; en = 1'b1;
    @(posedge clk);
    #1;
    check(ar == 0 && ai == 0 && br == 0 && bi == 0 && mode == MODE_FFT, "reset values");
    @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      {xr, xi, yr, yi} = {$urandom(), $urandom()};
      {sd0, sd1, sd2, sd3} = {$urandom(), $urandom()};
      input_sel = t[0] ^ t[3];
      en = (t % 5) != 4;
      e = '{ar, ai, br, bi};
      if (en) e = input_sel ? '{sd0, sd1, sd2, sd3} : '{xr, xi, yr, yi};
      @(posedge clk);
      #1;
      check(ar == e[0] && ai == e[1] && br == e[2] && bi == e[3],
            $sformatf("cycle %0d sel=%0d en=%0d", t, input_sel, en));
    end
    // Mode latch.
    @(negedge clk);
    ifftfft_sel = 1'b1;
    @(posedge clk);
    #1;
    check(mode == MODE_FFT, "mode ignores the pin without frame_start");
    @(negedge clk);
    frame_start = 1'b1;
    @(posedge clk);
    #1;
    check(mode == MODE_IFFT, "IFFT mode latched");
    @(negedge clk);
    frame_start = 1'b0;
    ifftfft_sel = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(mode == MODE_IFFT, "mode held during the frame");
    @(negedge clk);
    frame_start = 1'b1;
    @(posedge clk);
    #1;
    check(mode == MODE_FFT, "FFT mode latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
