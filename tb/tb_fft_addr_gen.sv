// tb_fft_addr_gen: checks the read address generator.
//
// A 32-point instance is compared with the published address pattern of a
// 32-point processor (stages 1..4, num_buf = 0..15, both addresses), and
// its output mode with the bit-reversed index. A default 256-point instance
// is checked for the structure of the rule: in stage beta bit (7-beta) of
// sw1 is 0 and of sw2 is 1, the two addresses differ only there, and over
// one stage the 128 butterflies read each of the 256 words exactly once.
module tb_fft_addr_gen;
  // Address pattern of the 32-point processor, [stage-1][num_buf].
  localparam logic [4:0] SW1_TAB [4][16] = '{
    '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100, 5'b00101, 5'b00110, 5'b00111,
      5'b10000, 5'b10001, 5'b10010, 5'b10011, 5'b10100, 5'b10101, 5'b10110, 5'b10111},
    '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b10000, 5'b10001, 5'b10010, 5'b10011,
      5'b01000, 5'b01001, 5'b01010, 5'b01011, 5'b11000, 5'b11001, 5'b11010, 5'b11011},
    '{5'b00000, 5'b00001, 5'b10000, 5'b10001, 5'b00100, 5'b00101, 5'b10100, 5'b10101,
      5'b01000, 5'b01001, 5'b11000, 5'b11001, 5'b01100, 5'b01101, 5'b11100, 5'b11101},
    '{5'b00000, 5'b10000, 5'b00010, 5'b10010, 5'b00100, 5'b10100, 5'b00110, 5'b10110,
      5'b01000, 5'b11000, 5'b01010, 5'b11010, 5'b01100, 5'b11100, 5'b01110, 5'b11110}};
  localparam logic [4:0] SW2_TAB [4][16] = '{
    '{5'b01000, 5'b01001, 5'b01010, 5'b01011, 5'b01100, 5'b01101, 5'b01110, 5'b01111,
      5'b11000, 5'b11001, 5'b11010, 5'b11011, 5'b11100, 5'b11101, 5'b11110, 5'b11111},
    '{5'b00100, 5'b00101, 5'b00110, 5'b00111, 5'b10100, 5'b10101, 5'b10110, 5'b10111,
      5'b01100, 5'b01101, 5'b01110, 5'b01111, 5'b11100, 5'b11101, 5'b11110, 5'b11111},
    '{5'b00010, 5'b00011, 5'b10010, 5'b10011, 5'b00110, 5'b00111, 5'b10110, 5'b10111,
      5'b01010, 5'b01011, 5'b11010, 5'b11011, 5'b01110, 5'b01111, 5'b11110, 5'b11111},
    '{5'b00001, 5'b10001, 5'b00011, 5'b10011, 5'b00101, 5'b10101, 5'b00111, 5'b10111,
      5'b01001, 5'b11001, 5'b01011, 5'b11011, 5'b01101, 5'b11101, 5'b01111, 5'b11111}};

  logic [2:0] st32;
  logic [3:0] nb32;
  logic [4:0] s1_32, s2_32;
  logic [3:0] st256;
  logic [6:0] nb256;
  logic [7:0] s1_256, s2_256;

  fft_addr_gen #(.FFT_N(32)) dut32 (.num_stage(st32), .num_buf(nb32), .sw1(s1_32), .sw2(s2_32));
  fft_addr_gen dut256 (.num_stage(st256), .num_buf(nb256), .sw1(s1_256), .sw2(s2_256));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit seen [256];
    logic [3:0] rev;
    for (int s = 1; s <= 4; s++) begin
      for (int b = 0; b < 16; b++) begin
        st32 = 3'(s);
        nb32 = 4'(b);
        #1;
        check(s1_32 == SW1_TAB[s-1][b] && s2_32 == SW2_TAB[s-1][b],
              $sformatf("32-point stage %0d num_buf %0d: %b %b, expected %b %b",
                        s, b, s1_32, s2_32, SW1_TAB[s-1][b], SW2_TAB[s-1][b]));
      end
    end
    // Worked example: stage 3, num_buf 0111 -> sw1[4:2] = 101, sw1[0] = 1.
    st32 = 3'd3; nb32 = 4'b0111;
    #1;
    check(s1_32[4:2] == 3'b101 && s1_32[0] == 1'b1 && s1_32[1] == 1'b0 && s2_32[1] == 1'b1,
          "worked example of the rotation rule");
    // Output mode of the 32-point instance.
    for (int b = 0; b < 16; b++) begin
      st32 = 3'd5;
      nb32 = 4'(b);
      rev = {nb32[0], nb32[1], nb32[2], nb32[3]};
      #1;
      check(s1_32 == {1'b0, rev} && s2_32 == {1'b1, rev},
            $sformatf("32-point output mode %0d: %b %b", b, s1_32, s2_32));
    end
    // 256-point structure.
    for (int s = 1; s < 8; s++) begin
      foreach (seen[i]) seen[i] = 1'b0;
      for (int b = 0; b < 128; b++) begin
        st256 = 4'(s);
        nb256 = 7'(b);
        #1;
        check(s1_256[7-s] == 1'b0 && s2_256[7-s] == 1'b1 &&
              (s1_256 ^ s2_256) == (8'd1 << (7 - s)) &&
              ((s1_256 ^ {1'b0, nb256}) & ((8'd1 << (7 - s)) - 8'd1)) == 8'd0,
              $sformatf("256-point stage %0d num_buf %0d: %b %b", s, b, s1_256, s2_256));
        check(!seen[s1_256] && !seen[s2_256],
              $sformatf("256-point stage %0d: word read twice", s));
        seen[s1_256] = 1'b1;
        seen[s2_256] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
