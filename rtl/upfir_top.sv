// upfir_top: the two forms of the upsampling waveform-memory FIR filter,
// side by side with their own ports.
//  - u_da:  the distributed-arithmetic filter for B-bit unsigned samples
//           (one accumulator per filter; NUM_FILTERS = 2 gives two filters
//           on one input). Ports x_in/x_take/y/y_valid, see upfir_da_filter.
//  - u_bit: the single-bit-stream generator (ports bit_in/bit_take/w_out/
//           w_valid, see bit_waveform_gen), for band-limiting a binary stream.
// Both run from the one clock: the DA filter takes a sample every B*K clocks
// and gives an output every B clocks; the bit generator takes a bit every K
// clocks and gives an output every clock.
// Defaults are the example of the document: 5 taps, upsampling 5,
// raised cosine with roll-off 0.3. The coefficients are computed at
// elaboration from ROLL_OFF (see upfir_pkg) unless COEFS / BIT_COEFS are
// given. The 8-bit sample width and the 12-bit coefficients are this
// design's choices.
module upfir_top #(
  parameter int unsigned TAPS        = upfir_pkg::TAPS_DEF,
  parameter int unsigned UPSAMPLE    = upfir_pkg::UPSAMPLE_DEF,
  parameter int unsigned SAMPLE_W    = 8,
  parameter int unsigned COEF_W      = upfir_pkg::COEF_W_DEF,
  parameter int unsigned NUM_FILTERS = 1,
  parameter real         ROLL_OFF    = 0.3,
  parameter logic signed [0:NUM_FILTERS-1][0:TAPS*UPSAMPLE-1][31:0] COEFS =
      (32*NUM_FILTERS*TAPS*UPSAMPLE)'(upfir_pkg::rc_flat(NUM_FILTERS, TAPS, UPSAMPLE, ROLL_OFF)),
  parameter logic signed [0:TAPS*UPSAMPLE-1][31:0] BIT_COEFS = COEFS[0],
  localparam int unsigned LUT_W = COEF_W + $clog2(TAPS),
  localparam int unsigned OUT_W = LUT_W + SAMPLE_W
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // multi-bit DA filter
  input  logic [SAMPLE_W-1:0]                      x_in,
  output logic                                     x_take,
  output logic signed [NUM_FILTERS-1:0][OUT_W-1:0] y,
  output logic                                     y_valid,
  // single-bit-stream generator
  input  logic                                     bit_in,
  output logic                                     bit_take,
  output logic signed [LUT_W-1:0]                  w_out,
  output logic                                     w_valid
);

  upfir_da_filter #(.TAPS(TAPS), .UPSAMPLE(UPSAMPLE), .SAMPLE_W(SAMPLE_W),
                    .COEF_W(COEF_W), .NUM_FILTERS(NUM_FILTERS), .COEFS(COEFS)) u_da (
    .clk, .rst_n, .x_in, .x_take, .y, .y_valid);

  bit_waveform_gen #(.TAPS(TAPS), .UPSAMPLE(UPSAMPLE), .COEF_W(COEF_W),
                     .COEFS(BIT_COEFS)) u_bit (
    .clk, .rst_n, .bit_in, .bit_take, .w_out, .w_valid);

endmodule
