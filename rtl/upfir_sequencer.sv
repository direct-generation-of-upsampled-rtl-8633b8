// upfir_sequencer: the timing of the upsampling filter. A bit counter runs
// 0..B-1 at the clock rate (the accumulator / bit-shift clock, B*K*f_x); each
// time it wraps, the binary sample counter A_L steps through 0..K-1 (the
// counter clock clkL, K*f_x). From the two counters it derives:
//   first      - first bit clock of an output sample (accumulator starts anew)
//   last       - last bit clock of an output sample (result is captured)
//   rotate     - rotate the input register rows (every bit clock but the load)
//   load       - last bit clock of the last output sample: take a new input
//                sample (once every B*K clocks, the input rate f_x)
// With B = 1, first and last are high every clock and load comes every K
// clocks, which is the timing of the single-bit generator.
// The counter rates follow the document; deriving them as strobes of one
// clock instead of separate clocks, and the synchronous reset, are this
// design's choices.
module upfir_sequencer #(
  parameter int unsigned UPSAMPLE = 5,  // K
  parameter int unsigned SAMPLE_W = 8,  // B
  localparam int unsigned AL_W = (UPSAMPLE > 1) ? $clog2(UPSAMPLE) : 1,
  localparam int unsigned BC_W = (SAMPLE_W > 1) ? $clog2(SAMPLE_W) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [AL_W-1:0] a_l,
  output logic [BC_W-1:0] bit_cnt,
  output logic            first,
  output logic            last,
  output logic            rotate,
  output logic            load
);

  localparam logic [AL_W-1:0] AL_MAX = AL_W'(UPSAMPLE - 1);
  localparam logic [BC_W-1:0] BC_MAX = BC_W'(SAMPLE_W - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_cnt <= '0;
      a_l     <= '0;
    end else if (bit_cnt == BC_MAX) begin
      bit_cnt <= '0;
      a_l     <= (a_l == AL_MAX) ? '0 : a_l + 1'b1;
    end else begin
      bit_cnt <= bit_cnt + 1'b1;
    end
  end

  always_comb begin
    first  = (bit_cnt == '0);
    last   = (bit_cnt == BC_MAX);
    load   = last && (a_l == AL_MAX);
    rotate = !load;
  end

endmodule
