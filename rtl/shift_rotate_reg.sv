// shift_rotate_reg: the N x B input register of the distributed-arithmetic
// filter. Row i holds input sample x[n-i] (row 0 the newest). Each clock with
// `rotate` set, every row rotates left by one bit, so that over B clocks the
// bits of all rows pass the read position (bit B-1) MSB first; `col` is that
// column, one bit per row, and forms the high LUT address A_H (bit i from
// row i). A `load` moves every row down by one and writes `x_in` into row 0.
// A row moves down in its rotated-once form, so a load issued in place of
// the B-th rotation of a period leaves every row back in its natural bit
// order. With B = 1 the register is the plain serial-in shift register of the
// single-bit generator.
// The two-dimensional shift+rotate register follows the document; the MSB
// first order, the synchronous active-low reset to zero and the load-in-place
// -of-rotation timing are this design's choices.
module shift_rotate_reg #(
  parameter int unsigned TAPS     = 5,  // N rows
  parameter int unsigned SAMPLE_W = 8   // B bits per row
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rotate,
  input  logic                load,
  input  logic [SAMPLE_W-1:0] x_in,
  output logic [TAPS-1:0]     col
);

  logic [SAMPLE_W-1:0] rows [TAPS];

  function automatic logic [SAMPLE_W-1:0] rotl(input logic [SAMPLE_W-1:0] v);
    return (v << 1) | (v >> (SAMPLE_W - 1));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) rows[i] <= '0;
    end else if (load) begin
      rows[0] <= x_in;
      for (int i = 1; i < TAPS; i++) rows[i] <= rotl(rows[i-1]);
    end else if (rotate) begin
      for (int i = 0; i < TAPS; i++) rows[i] <= rotl(rows[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < TAPS; i++) col[i] = rows[i][SAMPLE_W-1];
  end

endmodule
