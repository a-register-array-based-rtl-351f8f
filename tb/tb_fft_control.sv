// tb_fft_control: checks the control unit's schedule for a default
// 256-point frame, cycle by cycle, against counters kept here.
//
// For each of the 8 stages it expects 128 issue cycles with num_buf
// counting up and the twiddle address (num_buf << stage) mod 128, then two
// stall cycles; input_sel low only in stage 0; regWr equal to the one-hot
// of the butterfly issued two cycles earlier and 0 otherwise; dataWr with
// the last write of every stage; then 128 output cycles (num_stage = 8),
// out_valid one cycle later and finish with the last one. The total of
// issue and stall cycles must be 1040.
module tb_fft_control;
  localparam int N = 256;
  localparam int H = N / 2;
  localparam int S = 8;

  logic clk = 1'b0;
  logic reset, start, busy, frame_start, input_sel, se_en, rom_en, bf_en;
  logic dataWr, stall, out_en, out_valid, finish;
  logic [6:0] rom_addr, num_buf;
  logic [3:0] num_stage;
  logic [H-1:0] regWr;

  fft_control dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected schedule, one entry per cycle after start.
  int  e_issue [$];
  int  e_buf [$];
  int  e_stage [$];

  initial begin
    int t, n_issue, n_stall_seen, n_out, n_dw;
    reset = 1'b1;
    start = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    check(!busy && !out_valid && regWr == '0, "idle after reset");
    // Build the expected schedule.
    for (int s = 0; s < S; s++) begin
      for (int b = 0; b < H; b++) begin
        e_issue.push_back(1); e_buf.push_back(b); e_stage.push_back(s);
      end
      repeat (2) begin
        e_issue.push_back(0); e_buf.push_back(-1); e_stage.push_back(s);
      end
    end
    check(e_issue.size() == 1040, "schedule length 1040");
    start = 1'b1;
    #1;
    check(frame_start, "start accepted");
    @(negedge clk);
    start = 1'b0;
    n_issue = 0; n_stall_seen = 0; n_dw = 0;
    for (t = 0; t < e_issue.size(); t++) begin
      #1;
      if (e_issue[t] == 1) begin
        check(se_en && rom_en && !stall && num_buf == 7'(e_buf[t]) &&
              num_stage == 4'(e_stage[t]) &&
              rom_addr == 7'((e_buf[t] << e_stage[t]) % H) &&
              input_sel == (e_stage[t] != 0),
              $sformatf("issue cycle %0d: buf %0d stage %0d addr %0d", t, num_buf, num_stage, rom_addr));
        n_issue++;
      end else begin
        check(!se_en && stall, $sformatf("stall cycle %0d", t));
        n_stall_seen++;
      end
      // Write of the butterfly issued two cycles earlier.
      if (t >= 2 && e_issue[t-2] == 1) begin
        check(regWr == (H'(1) << e_buf[t-2]) && bf_en == (e_issue[t-1] == 1),
              $sformatf("regWr cycle %0d", t));
        check(dataWr == (e_buf[t-2] == H - 1), $sformatf("dataWr cycle %0d", t));
      end else begin
        check(regWr == '0 && !dataWr, $sformatf("no write cycle %0d", t));
      end
      if (dataWr) n_dw++;
      @(negedge clk);
    end
    // Output mode.
    n_out = 0;
    for (int k = 0; k < H; k++) begin
      #1;
      check(out_en && num_stage == 4'(S) && num_buf == 7'(k) && busy,
            $sformatf("output cycle %0d", k));
      check(out_valid == (k != 0) && !finish, $sformatf("out_valid at output cycle %0d", k));
      @(negedge clk);
    end
    #1;
    check(out_valid && finish && !busy, "last result with finish, then idle");
    @(negedge clk);
    #1;
    check(!out_valid && !finish, "quiet after the frame");
    check(n_issue == S * H && n_stall_seen == 2 * S && n_dw == S,
          $sformatf("issues %0d stalls %0d transfers %0d", n_issue, n_stall_seen, n_dw));
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
