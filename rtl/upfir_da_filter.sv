// upfir_da_filter: upsampling FIR filter in distributed arithmetic, without
// multipliers and with one adder per filter. For every unsigned B-bit input
// sample x[n] it produces K output samples
//   y[nK+k] = sum_{i=0}^{N-1} c[iK+k] * x[n-i],   k = 0..K-1
// i.e. the response of an N*K-tap filter to the zero-stuffed input, without
// inserting the zeros. The input is split into B single-bit streams; for a
// bit plane b the N bits x_b[n..n-N+1] (A_H, from the shift+rotate register)
// and k (A_L, from the binary counter) address a waveform memory holding the
// single-bit response sum_i c[iK+k]*x_b[n-i]. The accumulator adds the B bit
// plane responses, MSB first, doubling the partial sum each clock.
//
// Timing (one clock): an output sample takes B clocks, an input sample B*K
// clocks. `x_take` is high in the clock whose edge loads x_in; the source
// must hold the next sample there. y/y_valid come from a register: y_valid
// pulses one clock after the last bit clock of a sample and y holds for B
// clocks. The first K outputs after reset belong to the all-zero register
// contents; the K outputs after the first load belong to x[0], and so on.
// NUM_FILTERS > 1 gives the two-filter form: a wider memory and one
// accumulator per filter, sharing input register and counter.
// The structure follows the document; widths, reset and the strobe timing
// are this design's choices.
module upfir_da_filter #(
  parameter int unsigned TAPS        = upfir_pkg::TAPS_DEF,      // N
  parameter int unsigned UPSAMPLE    = upfir_pkg::UPSAMPLE_DEF,  // K
  parameter int unsigned SAMPLE_W    = 8,                        // B
  parameter int unsigned COEF_W      = upfir_pkg::COEF_W_DEF,
  parameter int unsigned NUM_FILTERS = 1,
  parameter real         ROLL_OFF    = 0.3,
  parameter logic signed [0:NUM_FILTERS-1][0:TAPS*UPSAMPLE-1][31:0] COEFS =
      (32*NUM_FILTERS*TAPS*UPSAMPLE)'(upfir_pkg::rc_flat(NUM_FILTERS, TAPS, UPSAMPLE, ROLL_OFF)),
  localparam int unsigned AL_W  = (UPSAMPLE > 1) ? $clog2(UPSAMPLE) : 1,
  localparam int unsigned LUT_W = COEF_W + $clog2(TAPS),
  localparam int unsigned OUT_W = LUT_W + SAMPLE_W
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [SAMPLE_W-1:0]                      x_in,
  output logic                                     x_take,
  output logic signed [NUM_FILTERS-1:0][OUT_W-1:0] y,
  output logic                                     y_valid
);

  logic [AL_W-1:0] a_l;
  logic            first, last, rotate, load;
  logic [TAPS-1:0] a_h;
  logic signed [NUM_FILTERS-1:0][LUT_W-1:0] d_o;
  logic [NUM_FILTERS-1:0] valid_f;

  upfir_sequencer #(.UPSAMPLE(UPSAMPLE), .SAMPLE_W(SAMPLE_W)) u_seq (
    .clk, .rst_n, .a_l, .bit_cnt(), .first, .last, .rotate, .load);

  shift_rotate_reg #(.TAPS(TAPS), .SAMPLE_W(SAMPLE_W)) u_sr (
    .clk, .rst_n, .rotate, .load, .x_in, .col(a_h));

  waveform_lut #(.TAPS(TAPS), .UPSAMPLE(UPSAMPLE), .COEF_W(COEF_W),
                 .NUM_FILTERS(NUM_FILTERS), .COEFS(COEFS)) u_lut (
    .a_h, .a_l, .d_o);

  for (genvar f = 0; f < NUM_FILTERS; f++) begin : g_acc
    da_accumulator #(.IN_W(LUT_W), .SAMPLE_W(SAMPLE_W)) u_acc (
      .clk, .rst_n, .d_in(d_o[f]), .first, .last, .y(y[f]), .y_valid(valid_f[f]));
  end

  assign x_take  = load;
  assign y_valid = valid_f[0];

endmodule
