// fft_top: register-array based radix-2 FFT/IFFT processor (default 256
// points, 16-bit fixed-point complex data), intended as the FFT step of an
// MFCC speech front end (8 kHz sampling, 30 ms frames of 240 samples
// zero-padded to 256).
//
// The datapath is a three-stage pipeline around one radix-2
// decimation-in-frequency butterfly:
//   SE  fft_selector        operands from the pins (stage 0) or from the
//                           register array (later stages), mode latch
//   BF  fft_butterfly       (a+b)/2 and (a-b)*W/2, registered
//   RA  fft_register_array  two-level register array instead of an SRAM
// plus the control unit, the address generator and the coefficient ROM.
// An input register precedes the selector and an output register follows
// the register array, as in the processor's block diagram.
//
// Operation: pulse start for one cycle with ifftfft_sel set (0 = FFT,
// 1 = IFFT) and drive the sample pairs x = x(n) on xr/xi and y = x(n+N/2)
// on yr/yi for n = 0 .. N/2-1 in that cycle and the N/2-1 cycles after it.
// The core then runs log2(N) stages of N/2 butterflies with two stall
// cycles after each: (N/2 + 2) * log2(N) = 1040 cycles for N = 256. It then
// streams the result in natural order, two bins per cycle while out_valid
// is high: mr/mi = X[k], nr/ni = X[k+N/2] for k = 0 .. N/2-1, the first pair
// 1042 cycles after start (N = 256), finish marking the last pair. Every
// stage halves its outputs, so X is the transform divided by N. A start
// while busy is ignored.
//
// The block structure, the signal names and the cycle budget follow the
// original processor. The start/out_valid/busy handshake, the per-stage
// scaling and the natural output order are this design's choices; the
// register array uses edge-triggered registers with write enables where
// the original used latches written without the global clock.
module fft_top #(
  parameter int unsigned FFT_N     = fft_pkg::FFT_N_DEF,
  parameter int unsigned DATA_W    = fft_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W    = fft_pkg::COEF_W_DEF,
  parameter int unsigned COEF_FRAC = fft_pkg::COEF_FRAC_DEF
) (
  input  logic                     clock,
  input  logic                     reset,        // synchronous, active high
  input  logic                     start,
  input  logic                     ifftfft_sel,  // 0: FFT, 1: IFFT
  input  logic signed [DATA_W-1:0] xr,
  input  logic signed [DATA_W-1:0] xi,
  input  logic signed [DATA_W-1:0] yr,
  input  logic signed [DATA_W-1:0] yi,
  output logic signed [DATA_W-1:0] mr,
  output logic signed [DATA_W-1:0] mi,
  output logic signed [DATA_W-1:0] nr,
  output logic signed [DATA_W-1:0] ni,
  output logic                     out_valid,
  output logic                     finish,
  output logic                     busy
);

  localparam int unsigned LOG2N = $clog2(FFT_N);

  // Input register.
  logic signed [DATA_W-1:0] xr_q, xi_q, yr_q, yi_q;
  // Selector outputs.
  logic signed [DATA_W-1:0] ar, ai, br, bi;
  fft_pkg::fft_mode_e       mode;
  // Butterfly outputs (er, ei, fr, fi at the register array).
  logic signed [DATA_W-1:0] c0, c1, c2, c3;
  // Register array read data.
  logic signed [DATA_W-1:0] sd0, sd1, sd2, sd3;
  // Coefficients.
  logic signed [COEF_W-1:0] cos_coef, sin_coef;
  // Control.
  logic                                frame_start, input_sel, se_en, rom_en;
  logic                                bf_en, data_wr, out_en;
  logic [LOG2N-2:0]                    rom_addr, num_buf;
  logic [$clog2(LOG2N+1)-1:0]          num_stage;
  logic [FFT_N/2-1:0]                  reg_wr;
  logic [LOG2N-1:0]                    sw1, sw2;

  always_ff @(posedge clock) begin
    xr_q <= xr;
    xi_q <= xi;
    yr_q <= yr;
    yi_q <= yi;
  end

  fft_control #(.FFT_N(FFT_N)) u_ctrl (
    .clk(clock), .reset, .start, .busy, .frame_start, .input_sel, .se_en,
    .rom_en, .rom_addr, .num_stage, .num_buf, .bf_en, .regWr(reg_wr),
    .dataWr(data_wr), .stall(), .out_en, .out_valid, .finish
  );

  fft_addr_gen #(.FFT_N(FFT_N)) u_addr (
    .num_stage, .num_buf, .sw1, .sw2
  );

  fft_coef_rom #(.FFT_N(FFT_N), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_rom (
    .clk(clock), .en(rom_en), .addr(rom_addr), .cos_coef, .sin_coef
  );

  fft_selector #(.DATA_W(DATA_W)) u_se (
    .clk(clock), .reset, .frame_start, .ifftfft_sel, .input_sel, .en(se_en),
    .xr(xr_q), .xi(xi_q), .yr(yr_q), .yi(yi_q),
    .sd0, .sd1, .sd2, .sd3, .mode, .ar, .ai, .br, .bi
  );

  fft_butterfly #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_bf (
    .clk(clock), .en(bf_en), .ifftfft_sel(mode == fft_pkg::MODE_IFFT),
    .ar, .ai, .br, .bi, .cos_coef, .sin_coef, .c0, .c1, .c2, .c3
  );

  fft_register_array #(.FFT_N(FFT_N), .DATA_W(DATA_W)) u_ra (
    .clk(clock), .er(c0), .ei(c1), .fr(c2), .fi(c3), .regWr(reg_wr),
    .next_stage_en(data_wr), .sw1, .sw2, .sd0, .sd1, .sd2, .sd3
  );

  // Output register.
  always_ff @(posedge clock) begin
    if (out_en) begin
      mr <= sd0;
      mi <= sd1;
      nr <= sd2;
      ni <= sd3;
    end
  end

endmodule
