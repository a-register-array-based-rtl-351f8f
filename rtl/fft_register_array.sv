// fft_register_array: two-level register array (RA), the third pipeline
// stage, used instead of an SRAM to hold the intermediate results.
//
// Level 1 (banks 0..3) receives the four butterfly outputs er, ei, fr, fi:
// bank 0/1 the real/imaginary part of the sum output, bank 2/3 those of the
// difference output. Each bank has N/2 registers; the one-hot write bus
// regWr selects the single register per bank that loads on a clock edge
// (regWr = 0 during stalls), so only four words switch per cycle.
// Level 2 (banks 4..7) is a copy of level 1, taken on the edge at which
// next_stage_en is high; on that edge the word being written into level 1
// is forwarded into level 2 as well, so the copy holds the whole stage.
// The butterfly reads only level 2, through four multiplexers:
//   sd0/sd1 = real/imag at address sw1, sd2/sd3 = real/imag at address sw2,
// where address {d, j} means register j of banks 4/5 (d = 0) or 6/7 (d = 1).
// Reads are combinational.
//
// The design this follows builds the banks from latches clocked by the
// write strobes (no clock tree to the array); here they are edge-triggered
// registers with per-word enables, which an implementation can map to
// clock-gated or latch cells. There is no reset: every word is written
// before it is read.
module fft_register_array #(
  parameter int unsigned FFT_N  = fft_pkg::FFT_N_DEF,
  parameter int unsigned DATA_W = fft_pkg::DATA_W_DEF
) (
  input  logic                       clk,
  input  logic signed [DATA_W-1:0]   er,
  input  logic signed [DATA_W-1:0]   ei,
  input  logic signed [DATA_W-1:0]   fr,
  input  logic signed [DATA_W-1:0]   fi,
  input  logic [FFT_N/2-1:0]         regWr,
  input  logic                       next_stage_en,
  input  logic [$clog2(FFT_N)-1:0]   sw1,
  input  logic [$clog2(FFT_N)-1:0]   sw2,
  output logic signed [DATA_W-1:0]   sd0,
  output logic signed [DATA_W-1:0]   sd1,
  output logic signed [DATA_W-1:0]   sd2,
  output logic signed [DATA_W-1:0]   sd3
);

  localparam int unsigned DEPTH = FFT_N / 2;
  localparam int unsigned AW    = $clog2(FFT_N);

  // Banks 0..3 (level 1) and 4..7 (level 2), indexed by bank - 4.
  logic signed [DATA_W-1:0] lvl1 [4][DEPTH];
  logic signed [DATA_W-1:0] lvl2 [4][DEPTH];
  logic signed [DATA_W-1:0] wdata [4];

  assign wdata[0] = er;
  assign wdata[1] = ei;
  assign wdata[2] = fr;
  assign wdata[3] = fi;

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      for (int j = 0; j < int'(DEPTH); j++) begin
        if (regWr[j]) lvl1[b][j] <= wdata[b];
        if (next_stage_en) lvl2[b][j] <= regWr[j] ? wdata[b] : lvl1[b][j];
      end
    end
  end

  always_comb begin
    sd0 = lvl2[sw1[AW-1] ? 2 : 0][sw1[AW-2:0]];
    sd1 = lvl2[sw1[AW-1] ? 3 : 1][sw1[AW-2:0]];
    sd2 = lvl2[sw2[AW-1] ? 2 : 0][sw2[AW-2:0]];
    sd3 = lvl2[sw2[AW-1] ? 3 : 1][sw2[AW-2:0]];
  end

endmodule
