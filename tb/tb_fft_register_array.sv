// tb_fft_register_array: checks the two-level register array at its default
// size (4 + 4 banks of 128 words) against a plain array model.
//
// Each cycle a random word is written through a one-hot regWr (or nothing,
// as in a stall), next_stage_en copies level 1 to level 2 now and then, and
// the four read ports are compared with the model for random addresses.
// The test also checks that level-1 writes stay invisible to the readers
// until the copy, and that the copy includes the word written on the same
// edge.
module tb_fft_register_array;
  localparam int N = 256;
  localparam int H = N / 2;

  logic clk = 1'b0;
  logic signed [15:0] er, ei, fr, fi, sd0, sd1, sd2, sd3;
  logic [H-1:0] regWr;
  logic next_stage_en;
  logic [7:0] sw1, sw2;

  fft_register_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_copy = 0, n_fwd = 0;
  logic signed [15:0] m1 [4][H];
  logic signed [15:0] m2 [4][H];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic signed [15:0] rd(input int bank, input logic [7:0] a);
    return m2[a[7] ? bank + 2 : bank][a[6:0]];
  endfunction

  // One clock: optional write of word j, optional copy, then read check
  // (from the first copy on; level 2 holds nothing before it).
  task automatic step(input bit wr, input int j, input bit copy);
    logic signed [15:0] d [4];
    @(negedge clk);
    d = '{16'($urandom()), 16'($urandom()), 16'($urandom()), 16'($urandom())};
    {er, ei, fr, fi} = {d[0], d[1], d[2], d[3]};
    regWr = wr ? (H'(1) << j) : '0;
    next_stage_en = copy;
    @(posedge clk);
    if (wr) for (int b = 0; b < 4; b++) m1[b][j] = d[b];
    if (copy) begin
      m2 = m1;
      n_copy++;
      if (wr) n_fwd++;
    end
    @(negedge clk);
    regWr = '0;
    next_stage_en = 1'b0;
    sw1 = 8'($urandom());
    sw2 = 8'($urandom());
    #1;
    if (n_copy > 0)
      check(sd0 == rd(0, sw1) && sd1 == rd(1, sw1) && sd2 == rd(0, sw2) && sd3 == rd(1, sw2),
            $sformatf("read sw1=%0d sw2=%0d: %0d %0d %0d %0d", sw1, sw2, sd0, sd1, sd2, sd3));
  endtask

  initial begin
    regWr = '0; next_stage_en = 1'b0; sw1 = '0; sw2 = '0;
    er = '0; ei = '0; fr = '0; fi = '0;
    // Fill level 1 as one stage does, copying with its last write.
    for (int j = 0; j < H; j++) step(1'b1, j, j == H - 1);
    // Full sweep of both read addresses.
    for (int a = 0; a < N; a++) begin
      sw1 = 8'(a);
      sw2 = 8'(N - 1 - a);
      #1;
      check(sd0 == rd(0, sw1) && sd1 == rd(1, sw1) && sd2 == rd(0, sw2) && sd3 == rd(1, sw2),
            $sformatf("sweep address %0d", a));
    end
    // Random traffic.
    for (int t = 0; t < 3000; t++)
      step(($urandom_range(3) != 0), $urandom_range(H - 1), ($urandom_range(40) == 0));
    check(n_copy > 10 && n_fwd > 5, $sformatf("copies %0d, forwarded writes %0d", n_copy, n_fwd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
