// fft_selector: ifft-fft selector (SE), the first pipeline stage.
//
// It picks the butterfly operands and fixes the operating mode:
//  * input_sel = 0 takes the sample pair from the input pins (x = x(n),
//    y = x(n+N/2)); input_sel = 1 takes the pair read back from the
//    register array (sd0..sd3), as in every stage after the first. The
//    chosen pair is registered as ar/ai/br/bi when en is high; with en low
//    the register holds, so the butterfly sees no switching during stalls.
//  * ifftfft_sel (0 = FFT, 1 = IFFT) is sampled on the cycle frame_start is
//    high and held in mode for the whole frame, so the pin may change while
//    a transform is running.
// In the figure of the processor the four 2:1 operand multiplexers are drawn
// beside the selector box; here they are part of this module, which the
// text describes as selecting the input signal. Latency: 1 cycle.
module fft_selector #(
  parameter int unsigned DATA_W = fft_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     reset,       // synchronous, active high
  input  logic                     frame_start,
  input  logic                     ifftfft_sel,
  input  logic                     input_sel,   // 0: pins, 1: register array
  input  logic                     en,
  input  logic signed [DATA_W-1:0] xr,
  input  logic signed [DATA_W-1:0] xi,
  input  logic signed [DATA_W-1:0] yr,
  input  logic signed [DATA_W-1:0] yi,
  input  logic signed [DATA_W-1:0] sd0,
  input  logic signed [DATA_W-1:0] sd1,
  input  logic signed [DATA_W-1:0] sd2,
  input  logic signed [DATA_W-1:0] sd3,
  output fft_pkg::fft_mode_e       mode,
  output logic signed [DATA_W-1:0] ar,
  output logic signed [DATA_W-1:0] ai,
  output logic signed [DATA_W-1:0] br,
  output logic signed [DATA_W-1:0] bi
);

  always_ff @(posedge clk) begin
    if (reset)            mode <= fft_pkg::MODE_FFT;
    else if (frame_start) mode <= ifftfft_sel ? fft_pkg::MODE_IFFT : fft_pkg::MODE_FFT;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      ar <= '0;
      ai <= '0;
      br <= '0;
      bi <= '0;
    end else if (en) begin
      ar <= input_sel ? sd0 : xr;
      ai <= input_sel ? sd1 : xi;
      br <= input_sel ? sd2 : yr;
      bi <= input_sel ? sd3 : yi;
    end
  end

endmodule
