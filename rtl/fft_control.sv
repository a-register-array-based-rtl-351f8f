// fft_control: control unit of the register-array FFT processor.
//
// A frame begins with a one-cycle start pulse in the idle state. The unit
// then runs log2(N) stages; in each it issues N/2 butterflies on
// consecutive cycles (num_buf = 0 .. N/2-1) and then inserts STALLS idle
// cycles, so that the next stage does not read the register array before
// the last results of this stage have reached its second level. After the
// last stage it spends N/2 cycles in output mode, reading two results per
// cycle, and pulses finish with the last pair.
//
// Per issue cycle it drives num_stage/num_buf to the address generator,
// the twiddle address (num_buf << num_stage, modulo N/2) to the coefficient
// ROM, and the selector's input_sel (pins in stage 0, register array later).
// Two cycles later, when the butterfly result is at the register array, the
// one-hot shift register regWr selects the word to write: it starts at 1 for
// the first butterfly of a stage, shifts left once per butterfly and is 0
// during stalls. dataWr (the array's next_stage_en) is high with the last
// write of a stage.
//
// Timing with start high in cycle S (the input pair n must be on the pins in
// cycle S+n): butterflies issue from S+1, the last stage's results are all
// written at the end of cycle S + (N/2)*log2(N) + STALLS*log2(N)
// (S+1040 for N = 256), output mode follows at once, and out_valid is high
// from S + 1042 for N/2 cycles.
//
// The two stalls per stage, the regWr shift register (1, shifted once per
// butterfly, 0 in stalls) and the 1040-cycle total follow the original
// processor; the state machine, the start pulse and the output handshake
// (out_valid, busy) are this design's choices.
module fft_control #(
  parameter int unsigned FFT_N  = fft_pkg::FFT_N_DEF,
  parameter int unsigned STALLS = fft_pkg::STALLS_PER_STAGE
) (
  input  logic                                clk,
  input  logic                                reset,       // synchronous, active high
  input  logic                                start,
  output logic                                busy,
  output logic                                frame_start, // start accepted
  output logic                                input_sel,   // to selector muxes
  output logic                                se_en,       // selector register load
  output logic                                rom_en,
  output logic [$clog2(FFT_N)-2:0]            rom_addr,
  output logic [$clog2($clog2(FFT_N)+1)-1:0]  num_stage,
  output logic [$clog2(FFT_N)-2:0]            num_buf,
  output logic                                bf_en,       // butterfly register load
  output logic [FFT_N/2-1:0]                  regWr,
  output logic                                dataWr,      // next_stage_en
  output logic                                stall,
  output logic                                out_en,      // output register load
  output logic                                out_valid,
  output logic                                finish
);

  localparam int unsigned LOG2N = $clog2(FFT_N);
  localparam int unsigned BW    = LOG2N - 1;
  localparam int unsigned STW   = $clog2(LOG2N + 1);
  localparam int unsigned CW    = (STALLS > 1) ? $clog2(STALLS) : 1;
  localparam logic [BW-1:0] LAST_BUF = '1;

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_STALL, ST_OUT} state_e;

  state_e            state;
  logic [STW-1:0]    stage_q;
  logic [BW-1:0]     buf_q;
  logic [CW-1:0]     stall_cnt;
  logic              issue;
  logic              v1, first1, last1, v2, last2;

  assign issue       = (state == ST_RUN);
  assign busy        = (state != ST_IDLE);
  assign frame_start = (state == ST_IDLE) && start;
  assign stall       = (state == ST_STALL);
  assign input_sel   = (stage_q != '0);
  assign se_en       = issue;
  assign rom_en      = issue;
  assign rom_addr    = BW'({buf_q, {LOG2N{1'b0}}} >> (LOG2N - 32'(stage_q)));
  assign num_stage   = stage_q;
  assign num_buf     = buf_q;
  assign bf_en       = v1;
  assign dataWr      = v2 && last2;
  assign out_en      = (state == ST_OUT);

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= ST_IDLE;
      stage_q   <= '0;
      buf_q     <= '0;
      stall_cnt <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state   <= ST_RUN;
          stage_q <= '0;
          buf_q   <= '0;
        end
        ST_RUN: begin
          buf_q <= buf_q + 1'b1;
          if (buf_q == LAST_BUF) begin
            state     <= ST_STALL;
            stall_cnt <= CW'(STALLS - 1);
          end
        end
        ST_STALL: begin
          if (stall_cnt == '0) begin
            stage_q <= stage_q + 1'b1;
            state   <= (32'(stage_q) == LOG2N - 1) ? ST_OUT : ST_RUN;
          end else begin
            stall_cnt <= stall_cnt - 1'b1;
          end
        end
        ST_OUT: begin
          buf_q <= buf_q + 1'b1;
          if (buf_q == LAST_BUF) begin
            state   <= ST_IDLE;
            stage_q <= '0;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Pipeline of the issue: v1 = operands in the selector register (BF
  // stage), v2 = butterfly result at the register array (RA stage).
  always_ff @(posedge clk) begin
    if (reset) begin
      v1        <= 1'b0;
      first1    <= 1'b0;
      last1     <= 1'b0;
      v2        <= 1'b0;
      last2     <= 1'b0;
      regWr     <= '0;
      out_valid <= 1'b0;
      finish    <= 1'b0;
    end else begin
      v1        <= issue;
      first1    <= issue && (buf_q == '0);
      last1     <= issue && (buf_q == LAST_BUF);
      v2        <= v1;
      last2     <= last1;
      regWr     <= v1 ? (first1 ? (FFT_N/2)'(1) : (regWr << 1)) : '0;
      out_valid <= out_en;
      finish    <= out_en && (buf_q == LAST_BUF);
    end
  end

  // At most one register per bank is written on any edge.
  a_regwr_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(regWr))
    else $error("regWr has more than one bit set");

  a_stalls_between_stages: assert property (@(posedge clk) disable iff (reset)
    (dataWr |-> !issue))
    else $error("a butterfly was issued in the cycle its stage completes");

endmodule
