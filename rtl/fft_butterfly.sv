// fft_butterfly: radix-2 decimation-in-frequency butterfly, the second
// pipeline stage of the FFT processor.
//
// For the input pair a = x(n) and b = x(n+N/2) it forms
//   c = (a + b) / 2                  -> c0 (real), c1 (imaginary)
//   d = (a - b) * W / 2              -> c2 (real), c3 (imaginary)
// with the twiddle W = cos + j*s. The datapath is four multipliers, four
// adders and three subtractors: in1 = ar - br and in2 = ai - bi feed
//   dr = in1*cos - in2*s,   di = in1*s + in2*cos.
// The sine term s is the ROM's sine as stored when ifftfft_sel = 1 (IFFT)
// and its two's complement (~sin + 1) when ifftfft_sel = 0 (FFT), so the
// FFT uses W = exp(-j*2*pi*k/N) and the IFFT its conjugate.
//
// Both outputs are halved in every stage (this design's choice, to keep the
// 16-bit word from overflowing over log2(N) stages), so a full transform
// returns X[k]/N; for the IFFT that is the usual 1/N normalisation. The
// product is truncated (arithmetic shift) and the difference path saturates
// to DATA_W bits; the sum path cannot overflow.
//
// Timing: combinational butterfly followed by one register; the outputs
// change on the clock edge at which en is high (latency 1 cycle).
module fft_butterfly #(
  parameter int unsigned DATA_W    = fft_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W    = fft_pkg::COEF_W_DEF,
  parameter int unsigned COEF_FRAC = fft_pkg::COEF_FRAC_DEF
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic                       ifftfft_sel, // 0: FFT, 1: IFFT
  input  logic signed [DATA_W-1:0]   ar,
  input  logic signed [DATA_W-1:0]   ai,
  input  logic signed [DATA_W-1:0]   br,
  input  logic signed [DATA_W-1:0]   bi,
  input  logic signed [COEF_W-1:0]   cos_coef,
  input  logic signed [COEF_W-1:0]   sin_coef,
  output logic signed [DATA_W-1:0]   c0,   // cr
  output logic signed [DATA_W-1:0]   c1,   // ci
  output logic signed [DATA_W-1:0]   c2,   // dr
  output logic signed [DATA_W-1:0]   c3    // di
);

  localparam int unsigned PW = DATA_W + 1 + COEF_W;  // product width
  localparam int unsigned SW = PW + 1;               // sum of two products

  localparam logic signed [SW-1:0] MAXV = SW'((2 ** (DATA_W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(2 ** (DATA_W - 1));

  logic signed [DATA_W:0]   sum_r, sum_i, in1, in2;
  logic signed [COEF_W-1:0] s_coef;
  logic signed [PW-1:0]     p_rc, p_is, p_rs, p_ic;
  logic signed [SW-1:0]     dr_full, di_full, dr_sh, di_sh;

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [SW-1:0] v);
    if (v > MAXV)      return MAXV[DATA_W-1:0];
    else if (v < MINV) return MINV[DATA_W-1:0];
    else               return v[DATA_W-1:0];
  endfunction

  always_comb begin
    sum_r  = (DATA_W+1)'(ar) + (DATA_W+1)'(br);
    sum_i  = (DATA_W+1)'(ai) + (DATA_W+1)'(bi);
    in1    = (DATA_W+1)'(ar) - (DATA_W+1)'(br);
    in2    = (DATA_W+1)'(ai) - (DATA_W+1)'(bi);
    s_coef = ifftfft_sel ? sin_coef : (~sin_coef + COEF_W'(1));
    p_rc   = PW'(in1) * PW'(cos_coef);
    p_is   = PW'(in2) * PW'(s_coef);
    p_rs   = PW'(in1) * PW'(s_coef);
    p_ic   = PW'(in2) * PW'(cos_coef);
    dr_full = SW'(p_rc) - SW'(p_is);
    di_full = SW'(p_rs) + SW'(p_ic);
    dr_sh   = dr_full >>> (COEF_FRAC + 1);
    di_sh   = di_full >>> (COEF_FRAC + 1);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      c0 <= DATA_W'(sum_r >>> 1);
      c1 <= DATA_W'(sum_i >>> 1);
      c2 <= sat(dr_sh);
      c3 <= sat(di_sh);
    end
  end

endmodule
