// fft_coef_rom: twiddle coefficient ROM (a cosine table and a sine table).
//
// Entry k holds cos(2*pi*k/N) and sin(2*pi*k/N) for k = 0 .. N/2-1, as
// signed fixed-point numbers with COEF_FRAC fractional bits, rounded to the
// nearest step. The tables are computed at elaboration from that formula;
// the butterfly turns the sine's sign for the FFT. A read is synchronous:
// when en is high on a clock edge, cos_coef/sin_coef show entry addr from
// that edge on (latency 1 cycle); with en low the outputs hold.
// Separate cosine and sine tables, addressed by the control unit, are as in
// the original processor; the number format, the rounding and the
// synchronous read are this design's choices.
module fft_coef_rom #(
  parameter int unsigned FFT_N     = fft_pkg::FFT_N_DEF,
  parameter int unsigned COEF_W    = fft_pkg::COEF_W_DEF,
  parameter int unsigned COEF_FRAC = fft_pkg::COEF_FRAC_DEF
) (
  input  logic                           clk,
  input  logic                           en,
  input  logic [$clog2(FFT_N)-2:0]       addr,
  output logic signed [COEF_W-1:0]       cos_coef,
  output logic signed [COEF_W-1:0]       sin_coef
);

  localparam int unsigned DEPTH = FFT_N / 2;
  typedef logic signed [COEF_W-1:0] table_t [DEPTH];

  function automatic logic signed [COEF_W-1:0] to_fixed(input real v);
    real s;
    s = v * (2.0 ** COEF_FRAC);
    return COEF_W'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic table_t make_table(input bit is_sin);
    table_t t;
    real pi, ang;
    pi = 3.14159265358979323846;
    for (int k = 0; k < DEPTH; k++) begin
      ang  = 2.0 * pi * real'(k) / real'(FFT_N);
      t[k] = is_sin ? to_fixed($sin(ang)) : to_fixed($cos(ang));
    end
    return t;
  endfunction

  localparam table_t COS_TABLE = make_table(1'b0);
  localparam table_t SIN_TABLE = make_table(1'b1);

  always_ff @(posedge clk) begin
    if (en) begin
      cos_coef <= COS_TABLE[addr];
      sin_coef <= SIN_TABLE[addr];
    end
  end

endmodule
