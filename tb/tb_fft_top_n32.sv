// tb_fft_top_n32: end-to-end test of the FFT processor built for 32 points,
// the size whose register array and address pattern are worked out in
// detail for this architecture (4 + 4 banks of 16 words, 5 stages).
//
// Four frames are run back to back: a real-valued 240-sample frame padded
// with zeros to 256 (the speech use case), a complex random frame, a
// two-tone frame, and an IFFT of a complex random spectrum. Every output
// bin is compared with a double-precision DFT (divided by N, the
// processor's scaling) computed here; a bin passes within TOL LSB. The test
// also checks the cycle counts (first result 92 cycles after start,
// N/2 result cycles, finish on the last one), that a start while busy is
// ignored, and that each mechanism occurred: stalls, level-2 transfers,
// operand feedback from the register array, FFT and IFFT frames.
module tb_fft_top_n32;
  import fft_pkg::*;

  localparam int N       = 32;
  localparam int W       = 16;
  localparam int H       = N / 2;
  localparam int TOL     = 6;
  localparam int LATENCY = int'(exec_cycles(N)) + 2;
  localparam real PI     = 3.14159265358979323846;

  logic clock = 1'b0;
  logic reset, start, ifftfft_sel;
  logic signed [W-1:0] xr, xi, yr, yi, mr, mi, nr, ni;
  logic out_valid, finish, busy;

  fft_top #(.FFT_N(N)) dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_stall = 0, n_transfer = 0, n_feedback = 0, n_fft = 0, n_ifft = 0;
  int n_ignored_start = 0;
  int cycle = 0;
  real max_err = 0.0;

  real in_re [N];
  real in_im [N];
  real ex_re [N];
  real ex_im [N];
  int  q_re [N];
  int  q_im [N];

  always @(posedge clock) begin
    cycle++;
    if (!reset) begin
      if (dut.u_ctrl.stall)                n_stall++;
      if (dut.data_wr)                n_transfer++;
      if (dut.se_en && dut.input_sel) n_feedback++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic track_err(input real e);
    if (e < 0.0) e = -e;
    if (e > max_err) max_err = e;
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Reference transform of the quantised input, divided by N.
  task automatic reference(input bit inverse);
    real sgn, ang, sr, si;
    sgn = inverse ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0;
      si = 0.0;
      for (int m = 0; m < N; m++) begin
        ang = sgn * 2.0 * PI * real'((m * k) % N) / real'(N);
        sr += real'(q_re[m]) * $cos(ang) - real'(q_im[m]) * $sin(ang);
        si += real'(q_re[m]) * $sin(ang) + real'(q_im[m]) * $cos(ang);
      end
      ex_re[k] = sr / real'(N);
      ex_im[k] = si / real'(N);
    end
  endtask

  task automatic run_frame(input bit inverse, input string name);
    int start_cycle, first_valid, n_out, k, got_finish;
    bit ok;
    for (int m = 0; m < N; m++) begin
      q_re[m] = $rtoi(in_re[m]);
      q_im[m] = $rtoi(in_im[m]);
    end
    reference(inverse);
    @(negedge clock);
    start       = 1'b1;
    ifftfft_sel = inverse;
    start_cycle = cycle;
    for (int n = 0; n < H; n++) begin
      xr = W'(q_re[n]);
      xi = W'(q_im[n]);
      yr = W'(q_re[n + H]);
      yi = W'(q_im[n + H]);
      @(negedge clock);
      start       = 1'b0;
      ifftfft_sel = ~inverse;  // the pin may change; the mode is latched
      // A second start in mid-frame must be ignored.
      if (n == 10) begin
        start = 1'b1;
        n_ignored_start++;
      end
    end
    start = 1'b0;
    xr = '0; xi = '0; yr = '0; yi = '0;
    n_out = 0;
    first_valid = -1;
    got_finish = 0;
    while (n_out < H) begin
      @(posedge clock);
      #1;
      if (out_valid) begin
        if (first_valid < 0) first_valid = cycle - start_cycle;
        k = n_out;
        track_err(real'(mr) - ex_re[k]);
        track_err(real'(mi) - ex_im[k]);
        track_err(real'(nr) - ex_re[k + H]);
        track_err(real'(ni) - ex_im[k + H]);
        ok = iabs(int'(mr) - $rtoi(ex_re[k])) <= TOL &&
             iabs(int'(mi) - $rtoi(ex_im[k])) <= TOL &&
             iabs(int'(nr) - $rtoi(ex_re[k + H])) <= TOL &&
             iabs(int'(ni) - $rtoi(ex_im[k + H])) <= TOL;
        check(ok, $sformatf("%s bin %0d: got (%0d,%0d) (%0d,%0d) expected (%f,%f) (%f,%f)",
                            name, k, mr, mi, nr, ni, ex_re[k], ex_im[k],
                            ex_re[k + H], ex_im[k + H]));
        check(finish == (k == H - 1), $sformatf("%s finish at bin %0d", name, k));
        if (finish) got_finish = 1;
        n_out++;
      end
    end
    check(first_valid == LATENCY,
          $sformatf("%s first result after %0d cycles, expected %0d", name, first_valid, LATENCY));
    check(got_finish == 1, $sformatf("%s finish seen", name));
    @(posedge clock);
    #1;
    check(!out_valid && !busy, $sformatf("%s idle after the last result", name));
    if (inverse) n_ifft++; else n_fft++;
  endtask

  initial begin
    reset = 1'b1;
    start = 1'b0;
    ifftfft_sel = 1'b0;
    xr = '0; xi = '0; yr = '0; yi = '0;
    repeat (3) @(posedge clock);
    @(negedge clock);
    reset = 1'b0;

    // Speech frame: 15N/16 real samples (240 of 256), zero padded to N.
    for (int m = 0; m < N; m++) begin
      in_re[m] = (m < (N * 15) / 16) ? real'($urandom_range(16000)) - 8000.0 : 0.0;
      in_im[m] = 0.0;
    end
    run_frame(1'b0, "speech");

    // Complex random frame.
    for (int m = 0; m < N; m++) begin
      in_re[m] = real'($urandom_range(12000)) - 6000.0;
      in_im[m] = real'($urandom_range(12000)) - 6000.0;
    end
    run_frame(1'b0, "complex");

    // Two tones, bins 5 and 3N/10, large amplitude.
    for (int m = 0; m < N; m++) begin
      in_re[m] = 12000.0 * $cos(2.0 * PI * 5.0 * m / N) + 8000.0 * $sin(2.0 * PI * real'((N * 3) / 10) * m / N);
      in_im[m] = 0.0;
    end
    run_frame(1'b0, "tones");

    // Inverse transform of a random spectrum.
    for (int m = 0; m < N; m++) begin
      in_re[m] = real'($urandom_range(12000)) - 6000.0;
      in_im[m] = real'($urandom_range(12000)) - 6000.0;
    end
    run_frame(1'b1, "ifft");

    check(n_stall == 4 * 2 * $clog2(N), $sformatf("stall cycles %0d", n_stall));
    check(n_transfer == 4 * $clog2(N), $sformatf("level-2 transfers %0d", n_transfer));
    check(n_feedback == 4 * H * ($clog2(N) - 1), $sformatf("feedback issues %0d", n_feedback));
    check(n_fft > 0 && n_ifft > 0, "both modes used");
    check(n_ignored_start > 0, "start while busy exercised");
    $display("largest deviation from the exact transform: %f LSB", max_err);
    $display("mechanisms: stall=%0d transfer=%0d feedback=%0d fft=%0d ifft=%0d start_ignored=%0d",
             n_stall, n_transfer, n_feedback, n_fft, n_ifft, n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
