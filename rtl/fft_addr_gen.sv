// fft_addr_gen: register-array read address generator.
//
// A butterfly result is stored at address {d, num_buf}: d = 0 for the sum
// output (banks 4/5), d = 1 for the difference output (banks 6/7), num_buf
// being the index of the butterfly that produced it. With alpha = the width
// of num_buf and beta = num_stage, the two operands of butterfly num_buf in
// stage beta (1 .. alpha) are read from
//   sw1[alpha-beta] = 0,   sw2[alpha-beta] = 1,
//   sw1/sw2[alpha : alpha-beta+1] = num_buf[alpha-1 : alpha-beta] rotated
//                                   right by one bit,
//   sw1/sw2[alpha-beta-1 : 0]      = num_buf[alpha-beta-1 : 0].
// For num_stage = 0 the same rule gives {0,num_buf} and {1,num_buf} (the
// first stage reads the input pins, so these are unused). After the last
// stage, num_stage = log2(N) selects output mode (this design's encoding):
// sw1 = {0, bitrev(num_buf)} and sw2 = {1, bitrev(num_buf)} address X[k] and
// X[k+N/2] for k = num_buf, giving output in natural order.
//
// The storage order and the stage rule above are those of the original
// processor; the output-mode encoding is this design's own. Purely
// combinational.
module fft_addr_gen #(
  parameter int unsigned FFT_N = fft_pkg::FFT_N_DEF
) (
  input  logic [$clog2($clog2(FFT_N)+1)-1:0] num_stage,
  input  logic [$clog2(FFT_N)-2:0]           num_buf,
  output logic [$clog2(FFT_N)-1:0]           sw1,
  output logic [$clog2(FFT_N)-1:0]           sw2
);

  localparam int unsigned LOG2N = $clog2(FFT_N);
  localparam int unsigned ALPHA = LOG2N - 1;   // width of num_buf

  logic [LOG2N-1:0] cand1 [LOG2N+1];
  logic [LOG2N-1:0] cand2 [LOG2N+1];

  // Address pair for each stage, computed with the stage as a constant.
  for (genvar beta = 0; beta < LOG2N; beta++) begin : g_stage
    localparam int unsigned P = ALPHA - beta;  // position of the fixed bit
    always_comb begin
      cand1[beta] = '0;
      for (int i = 0; i < int'(P); i++) cand1[beta][i] = num_buf[i];
      for (int k = 0; k < beta; k++)
        cand1[beta][P + 1 + k] = num_buf[P + ((k + 1) % beta)];
      cand2[beta]    = cand1[beta];
      cand1[beta][P] = 1'b0;
      cand2[beta][P] = 1'b1;
    end
  end

  // Output mode: bit-reversed butterfly index.
  always_comb begin
    cand1[LOG2N] = '0;
    for (int i = 0; i < int'(ALPHA); i++) cand1[LOG2N][i] = num_buf[ALPHA - 1 - i];
    cand2[LOG2N]        = cand1[LOG2N];
    cand2[LOG2N][ALPHA] = 1'b1;
  end

  always_comb begin
    if (num_stage <= ($bits(num_stage))'(LOG2N)) begin
      sw1 = cand1[num_stage];
      sw2 = cand2[num_stage];
    end else begin
      sw1 = '0;
      sw2 = '0;
    end
  end

endmodule
