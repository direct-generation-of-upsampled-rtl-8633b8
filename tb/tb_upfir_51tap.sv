// tb_upfir_51tap: the full-length raised-cosine response. A pulse truncated
// to 51 samples at upsampling 5 spans 11 input samples, so the filter is
// built with N = 11 taps (a 2^11-pattern waveform memory, 55 coefficients
// with the roll-off 0.3 raised cosine computed at elaboration). Random 8-bit
// samples and random bits go through the DA filter and the bit generator;
// every output is compared with a direct convolution whose coefficients are
// computed here from the pulse formula, and at every sample instant the
// output must equal 1024 x[n-5] exactly.
module tb_upfir_51tap;
  localparam int N = 11;
  localparam int K = 5;
  localparam int B = 8;
  localparam int LUT_W = 12 + 4;
  localparam int OUT_W = LUT_W + B;
  localparam int NSAMP = 120;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic [B-1:0] x_in = '0;
  logic x_take, y_valid, bit_in = 0, bit_take, w_valid;
  logic signed [0:0][OUT_W-1:0] y;
  logic signed [LUT_W-1:0] w_out;
  int checks = 0, failures = 0;

  upfir_top #(.TAPS(N)) dut (.*);

  always #5 clk = ~clk;

  int c [N*K];
  int xs [$], bs [$];
  int nout = 0, nwave = 0, exact = 0;

  function automatic int rc(int t, real beta);
    real x, d, h;
    x = real'(t) / K;
    if (t == 0) return 1024;
    d = 1.0 - (2.0 * beta * x) ** 2;
    if (d < 1e-9 && d > -1e-9) h = PI / 4.0 * $sin(PI * x) / (PI * x);
    else h = $sin(PI * x) / (PI * x) * $cos(PI * beta * x) / d;
    return int'($floor(h * 1024.0 + 0.5));
  endfunction

  function automatic int at(ref int q [$], input int n);
    return (n < 0 || n >= q.size()) ? 0 : q[n];
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (y_valid) begin
        automatic int k = nout % K, n = nout / K - 1, e = 0;
        automatic logic signed [OUT_W-1:0] got = y[0];
        for (int i = 0; i < N; i++) e += c[i*K + k] * at(xs, n - i);
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 10) $display("y %0d: got %0d exp %0d", nout, got, e);
        end
        if (k == 0 && n >= N / 2) begin
          checks++;
          if (got != 1024 * at(xs, n - N / 2)) failures++; else exact++;
        end
        nout++;
      end
      if (w_valid) begin
        automatic int k = nwave % K, n = nwave / K - 1, e = 0;
        for (int i = 0; i < N; i++) e += c[i*K + k] * at(bs, n - i);
        checks++;
        if (w_out != e) begin
          failures++;
          if (failures < 10) $display("w %0d: got %0d exp %0d", nwave, w_out, e);
        end
        nwave++;
      end
      if (x_take) xs.push_back(int'(x_in));
      if (bit_take) bs.push_back(int'(bit_in));
    end
  end

  always @(negedge clk) bit_in <= 1'($urandom);

  initial begin
    for (int j = 0; j < N*K; j++) c[j] = rc(j - (N / 2) * K, 0.3);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < NSAMP; s++) begin
      @(negedge clk);
      x_in = (s % 7 == 3) ? '1 : B'($urandom);
      @(posedge clk);
      while (!x_take) @(posedge clk);
    end
    repeat (B*K*2) @(posedge clk);
    checks++;
    if (exact < NSAMP - N) begin failures++; $display("exact sample instants %0d", exact); end
    $display("outputs %0d, waveform samples %0d, exact sample instants %0d", nout, nwave, exact);
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
