// tb_upfir_fig7: the binary-stream demonstration. Two bit streams,
//   a) 10100110010101111
//   b) 11110001011010100011010101001100
// are band-limited with a roll-off 0.5 raised cosine, upsampled 5 times.
// Each stream goes through the single-bit generator and, as 8-bit samples
// of value 0 or 1, through a two-filter DA build (filter 0 roll-off 0.5,
// filter 1 roll-off 0.3, as two parallel filters on one input). Every
// output is compared with the direct convolution, and at every sample
// instant the waveform must equal the transmitted bit times 1024 exactly
// (the zero-intersymbol-interference property of the raised cosine).
// The generated waveforms are printed, one input period per line.
module tb_upfir_fig7;
  localparam int N = 5;
  localparam int K = 5;
  localparam int B = 8;
  localparam int NF = 2;
  localparam int LUT_W = 15;
  localparam int OUT_W = LUT_W + B;
  localparam string STREAM_A = "10100110010101111";
  localparam string STREAM_B = "11110001011010100011010101001100";

  logic clk = 0, rst_n = 0;
  logic [B-1:0] x_in = '0;
  logic x_take, y_valid, bit_in = 0, bit_take, w_valid;
  logic signed [NF-1:0][OUT_W-1:0] y;
  logic signed [LUT_W-1:0] w_out;
  int checks = 0, failures = 0;

  upfir_top #(.NUM_FILTERS(NF),
              .COEFS({upfir_pkg::RC_BETA05, upfir_pkg::RC_BETA03}),
              .BIT_COEFS(upfir_pkg::RC_BETA05)) dut (.*);

  always #5 clk = ~clk;

  string stream;
  int xs [$], bs [$];
  int nout = 0, nwave = 0, exact_w = 0, exact_y = 0;
  string line;

  function automatic int c(int f, int j);
    return (f == 0) ? int'(upfir_pkg::RC_BETA05[j]) : int'(upfir_pkg::RC_BETA03[j]);
  endfunction
  function automatic int at(ref int q [$], input int n);
    return (n < 0 || n >= q.size()) ? 0 : q[n];
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (w_valid) begin
        automatic int k = nwave % K, n = nwave / K - 1, e = 0;
        for (int i = 0; i < N; i++) e += c(0, i*K + k) * at(bs, n - i);
        checks++;
        if (w_out != e) begin
          failures++; $display("w %0d: got %0d exp %0d", nwave, w_out, e);
        end
        if (k == 0 && n >= 2) begin
          checks++;
          if (w_out != 1024 * at(bs, n - 2)) failures++; else exact_w++;
        end
        line = {line, $sformatf(" %5d", w_out)};
        if (k == K - 1) begin
          if (n >= 2 && n < 2 + stream.len()) $display("bit %0d:%s", at(bs, n - 2), line);
          line = "";
        end
        nwave++;
      end
      if (y_valid) begin
        automatic int k = nout % K, n = nout / K - 1;
        for (int f = 0; f < NF; f++) begin
          automatic int e = 0;
          automatic logic signed [OUT_W-1:0] got = y[f];
          for (int i = 0; i < N; i++) e += c(f, i*K + k) * at(xs, n - i);
          checks++;
          if (got != e) begin
            failures++; $display("y%0d %0d: got %0d exp %0d", f, nout, got, e);
          end
          if (k == 0 && n >= 2) begin
            checks++;
            if (got != 1024 * at(xs, n - 2)) failures++; else exact_y++;
          end
        end
        nout++;
      end
      if (bit_take) bs.push_back(int'(bit_in));
      if (x_take) xs.push_back(int'(x_in));
    end
  end

  // Runs one stream through both filters from reset, padded with zeros so
  // the whole response is played out.
  task automatic run_stream(input string s);
    int nb = 0, nx = 0;
    stream = s;
    rst_n = 0; xs.delete(); bs.delete(); nout = 0; nwave = 0; line = "";
    bit_in = 0; x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    bit_in = (s[0] == "1");
    x_in   = B'(s[0] == "1");
    while (nx < s.len() + N) begin
      @(posedge clk);
      if (bit_take) nb++;
      if (x_take) nx++;
      @(negedge clk);
      bit_in = (nb < s.len()) ? (s[nb] == "1") : 1'b0;
      x_in   = (nx < s.len()) ? B'(s[nx] == "1") : '0;
    end
    checks++;
    if (bs.size() < s.len() || xs.size() < s.len()) begin
      failures++; $display("stream not fully taken");
    end
  endtask

  initial begin
    $display("stream a (%0d bits), roll-off 0.5, 5 outputs per bit", STREAM_A.len());
    run_stream(STREAM_A);
    $display("stream b (%0d bits)", STREAM_B.len());
    run_stream(STREAM_B);
    $display("exact sample instants: bit generator %0d, DA filters %0d", exact_w, exact_y);
    checks++;
    if (exact_w < STREAM_A.len() + STREAM_B.len()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
