// bit_waveform_gen: upsampling FIR filter for a single bit stream, built
// as a waveform player. The last N input bits (an N-bit serial-in shift
// register, newest bit in A_H bit 0) select one of M = 2^N stored waveform
// patches, and a counter running 0..K-1 plays its K samples, one per clock:
//   w[nK+k] = sum_{i=0}^{N-1} c[iK+k] * b[n-i]
// There is no adder at run time: each output sample is one memory word.
// Timing: one output per clock, one input bit every K clocks. `bit_take` is
// high in the clock whose edge shifts in bit_in. w_out is registered:
// w_valid is high one clock after the memory read, every clock after reset.
// The first K outputs after reset belong to the all-zero register.
// It reuses the sequencer and the input register with B = 1. Shift register,
// counter and memory follow the document; the single clock with strobes
// (instead of separate shift and counter clocks), the output register and
// the reset are this design's choices.
module bit_waveform_gen #(
  parameter int unsigned TAPS     = upfir_pkg::TAPS_DEF,      // N
  parameter int unsigned UPSAMPLE = upfir_pkg::UPSAMPLE_DEF,  // K
  parameter int unsigned COEF_W   = upfir_pkg::COEF_W_DEF,
  parameter real         ROLL_OFF = 0.3,
  parameter logic signed [0:TAPS*UPSAMPLE-1][31:0] COEFS =
      (32*1*TAPS*UPSAMPLE)'(upfir_pkg::rc_flat(1, TAPS, UPSAMPLE, ROLL_OFF)),
  localparam int unsigned AL_W  = (UPSAMPLE > 1) ? $clog2(UPSAMPLE) : 1,
  localparam int unsigned LUT_W = COEF_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bit_in,
  output logic                    bit_take,
  output logic signed [LUT_W-1:0] w_out,
  output logic                    w_valid
);

  logic [AL_W-1:0] a_l;
  logic            first, last, rotate, load;
  logic [TAPS-1:0] a_h;
  logic signed [0:0][LUT_W-1:0] d_o;

  upfir_sequencer #(.UPSAMPLE(UPSAMPLE), .SAMPLE_W(1)) u_cnt (
    .clk, .rst_n, .a_l, .bit_cnt(), .first, .last, .rotate, .load);

  shift_rotate_reg #(.TAPS(TAPS), .SAMPLE_W(1)) u_sr (
    .clk, .rst_n, .rotate, .load, .x_in(bit_in), .col(a_h));

  waveform_lut #(.TAPS(TAPS), .UPSAMPLE(UPSAMPLE), .COEF_W(COEF_W),
                 .NUM_FILTERS(1), .COEFS(COEFS)) u_lut (
    .a_h, .a_l, .d_o);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_out   <= '0;
      w_valid <= 1'b0;
    end else begin
      w_out   <= d_o[0];
      w_valid <= 1'b1;
    end
  end

  assign bit_take = load;

endmodule
