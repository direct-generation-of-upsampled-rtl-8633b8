// waveform_lut: the waveform memory of the upsampling filter. For every
// pattern m of the last N input bits (m bit i = x_b[n-i]) it stores the K
// output samples that the filter produces during one input period:
//   W_m[k] = sum_{i=0}^{N-1} m[i] * c[iK+k]
// so a look-up replaces the N multiplications of one output sample. The
// address is {A_H, A_L}: A_H = m from the input register, A_L = k from the
// sample counter, A_L padded to clog2(K) bits; when K is not a power of two
// the words with A_L >= K are unused and hold zero. For NUM_FILTERS > 1 the
// memory is widened and returns one word per filter (W_m, Z_m, ...) for the
// same address, so the filters share input register, counter and address.
// The contents are computed at elaboration from the COEFS parameter. The
// read is combinational (asynchronous ROM). Word width is COEF_W+clog2(N),
// enough for any sum of N coefficients.
// The memory organisation and its address split follow the document; the
// word width and the asynchronous read are this design's choices.
module waveform_lut #(
  parameter int unsigned TAPS        = upfir_pkg::TAPS_DEF,      // N
  parameter int unsigned UPSAMPLE    = upfir_pkg::UPSAMPLE_DEF,  // K
  parameter int unsigned COEF_W      = upfir_pkg::COEF_W_DEF,
  parameter int unsigned NUM_FILTERS = 1,
  parameter real         ROLL_OFF    = 0.3,
  parameter logic signed [0:NUM_FILTERS-1][0:TAPS*UPSAMPLE-1][31:0] COEFS =
      (32*NUM_FILTERS*TAPS*UPSAMPLE)'(upfir_pkg::rc_flat(NUM_FILTERS, TAPS, UPSAMPLE, ROLL_OFF)),
  localparam int unsigned AL_W  = (UPSAMPLE > 1) ? $clog2(UPSAMPLE) : 1,
  localparam int unsigned LUT_W = COEF_W + $clog2(TAPS),
  localparam int unsigned DEPTH = 2 ** (TAPS + AL_W)
) (
  input  logic [TAPS-1:0]                          a_h,
  input  logic [AL_W-1:0]                          a_l,
  output logic signed [NUM_FILTERS-1:0][LUT_W-1:0] d_o
);

  // Sum of the coefficients selected by pattern m for output sample k.
  function automatic int wave_word(int f, int m, int k);
    int s = 0;
    if (k >= int'(UPSAMPLE)) return 0;
    for (int i = 0; i < int'(TAPS); i++)
      if (((m >> i) & 1) == 1) s += int'(COEFS[f][i*UPSAMPLE + k]);
    return s;
  endfunction

  logic signed [LUT_W-1:0] rom [NUM_FILTERS][DEPTH];

  for (genvar f = 0; f < NUM_FILTERS; f++) begin : g_filter
    for (genvar a = 0; a < DEPTH; a++) begin : g_word
      localparam int WORD = wave_word(f, a >> AL_W, a % (2 ** AL_W));
      assign rom[f][a] = LUT_W'(WORD);
    end
  end

  always_comb begin
    for (int f = 0; f < NUM_FILTERS; f++) d_o[f] = rom[f][{a_h, a_l}];
  end

endmodule
