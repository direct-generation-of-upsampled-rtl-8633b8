// da_accumulator: the single-adder output stage of the distributed-arithmetic
// filter. Over the B clocks of one output sample it forms
//   acc = 2*acc + d_in
// with d_in the LUT word of bit plane B-1 first and bit plane 0 last, so the
// doubling applies the 2^b weight of each bit plane (Horner form of
// sum_b 2^b * W[b]). On the `first` clock the doubled term is dropped, which
// clears the accumulator for the new sample without a separate cycle. On the
// `last` clock the finished sum goes to the output register `y`, which holds
// it for B clocks, and `y_valid` pulses for one clock.
// The adder, x2 feedback and per-sample clear follow the document; the
// MSB-first order, the merged clear and the output register are this
// design's choices.
module da_accumulator #(
  parameter int unsigned IN_W     = 15,  // LUT word width
  parameter int unsigned SAMPLE_W = 8,   // B, number of bit planes
  localparam int unsigned OUT_W = IN_W + SAMPLE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  d_in,
  input  logic                    first,
  input  logic                    last,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  logic signed [OUT_W-1:0] acc, acc_next;

  always_comb begin
    acc_next = (first ? '0 : (acc <<< 1)) + OUT_W'(d_in);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      acc     <= acc_next;
      y_valid <= last;
      if (last) y <= acc_next;
    end
  end

endmodule
