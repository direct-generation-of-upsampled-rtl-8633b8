// tb_upfir_top: end-to-end test of the top at its default parameters
// (5 taps, upsampling 5, 8-bit samples, roll-off 0.3 raised cosine).
// The DA filter gets random 8-bit samples with runs of full-scale and zero
// values; the bit generator gets a random bit stream. Every output of both
// is compared with the direct convolution y[nK+k] = sum_i c[iK+k] x[n-i].
// The testbench counts each mechanism of the design and fails if one never
// occurred: sample loads (shift down), row rotations, A_L wrap-around,
// accumulator restarts, outputs that need several bit planes (x2 path),
// negative outputs, overshoot above full scale, exact sample instants
// (y[nK] = 1024 x[n-2]) and, for the bit generator, bit loads and played
// waveform samples. It also checks the rates: one load every B*K clocks, one
// DA output every B clocks, one bit every K clocks, one waveform sample per
// clock.
module tb_upfir_top;
  localparam int N = 5;
  localparam int K = 5;
  localparam int B = 8;
  localparam int LUT_W = 15;
  localparam int OUT_W = LUT_W + B;
  localparam int NSAMP = 400;

  logic clk = 0, rst_n = 0;
  logic [B-1:0] x_in = '0;
  logic x_take, y_valid, bit_in = 0, bit_take, w_valid;
  logic signed [0:0][OUT_W-1:0] y;
  logic signed [LUT_W-1:0] w_out;
  int checks = 0, failures = 0;

  upfir_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_load = 0, n_rotate = 0, n_wrap = 0, n_restart = 0, n_multiplane = 0;
  int n_negative = 0, n_overshoot = 0, n_exact = 0, n_bit_load = 0, n_wave = 0;

  int xs [$], bs [$];
  int cyc = 0, last_take = -1, last_valid = -1, last_bit = -1, nout = 0, nwave = 0;

  function automatic longint x_at(int n);
    return (n < 0 || n >= xs.size()) ? 0 : longint'(xs[n]);
  endfunction
  function automatic int b_at(int n);
    return (n < 0 || n >= bs.size()) ? 0 : bs[n];
  endfunction
  function automatic int c(int j);
    return int'(upfir_pkg::RC_BETA03[j]);
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("cycle %0d: %s", cyc, msg);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (dut.u_da.rotate) n_rotate++;
      if (dut.u_da.first) n_restart++;
      if (dut.u_da.last && dut.u_da.a_l == 3'(K - 1)) n_wrap++;
      if (y_valid) begin
        automatic int k = nout % K, n = nout / K - 1, planes = 0;
        automatic longint e = 0;
        automatic logic signed [OUT_W-1:0] got = y[0];
        for (int i = 0; i < N; i++) begin
          e += longint'(c(i*K + k)) * x_at(n - i);
          if (x_at(n - i) > 1) planes++;
        end
        checks++;
        if (got != e) fail($sformatf("y out %0d got %0d exp %0d", nout, got, e));
        if (planes > 0) n_multiplane++;
        if (got < 0) n_negative++;
        if (got > 255 * 1024) n_overshoot++;
        if (k == 0 && n >= 2) begin
          checks++;
          if (got != 1024 * x_at(n - 2)) fail("sample instant not exact");
          else n_exact++;
        end
        if (last_valid >= 0) begin
          checks++;
          if (cyc - last_valid != B) fail("DA output spacing");
        end
        last_valid = cyc;
        nout++;
      end
      if (x_take) begin
        xs.push_back(int'(x_in));
        n_load++;
        if (last_take >= 0) begin
          checks++;
          if (cyc - last_take != B*K) fail("load spacing");
        end
        last_take = cyc;
      end
      if (w_valid) begin
        automatic int k = nwave % K, n = nwave / K - 1, e = 0;
        for (int i = 0; i < N; i++) e += c(i*K + k) * b_at(n - i);
        checks++;
        if (w_out != e) fail($sformatf("w out %0d got %0d exp %0d", nwave, w_out, e));
        n_wave++;
        nwave++;
      end
      if (bit_take) begin
        bs.push_back(int'(bit_in));
        n_bit_load++;
        if (last_bit >= 0) begin
          checks++;
          if (cyc - last_bit != K) fail("bit spacing");
        end
        last_bit = cyc;
      end
    end
  end

  // bit stream source: a new random bit after each bit load
  logic bit_take_d = 0;
  always @(negedge clk) if (rst_n && bit_take_d) bit_in <= 1'($urandom);
  always @(posedge clk) bit_take_d <= bit_take;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < NSAMP; s++) begin
      @(negedge clk);
      case (s % 16)
        4, 5, 6, 7, 8: x_in = '1;    // full-scale run: overshoot
        12, 13, 14:    x_in = '0;
        default:       x_in = B'($urandom);
      endcase
      @(posedge clk);
      while (!x_take) @(posedge clk);
    end
    repeat (B*K*(N+1)) @(posedge clk);
    $display("loads %0d rotations %0d A_L wraps %0d accumulator restarts %0d",
             n_load, n_rotate, n_wrap, n_restart);
    $display("multi-plane outputs %0d negative %0d overshoot %0d exact sample instants %0d",
             n_multiplane, n_negative, n_overshoot, n_exact);
    $display("bit loads %0d waveform samples %0d", n_bit_load, n_wave);
    checks++; if (n_load < NSAMP) fail("too few loads");
    checks++; if (n_rotate == 0) fail("no rotation");
    checks++; if (n_wrap == 0) fail("no A_L wrap");
    checks++; if (n_restart < NSAMP * K) fail("too few accumulator restarts");
    checks++; if (n_multiplane == 0) fail("no multi-plane output");
    checks++; if (n_negative == 0) fail("no negative output");
    checks++; if (n_overshoot == 0) fail("no overshoot");
    checks++; if (n_exact < NSAMP - 2) fail("too few exact sample instants");
    checks++; if (n_bit_load == 0) fail("no bit load");
    checks++; if (n_wave == 0) fail("no waveform sample");
    checks++; if (nout < NSAMP * K) fail("too few DA outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (B*K*(NSAMP + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
