// tb_bit_waveform_gen: drives a random bit stream into the single-bit
// generator and compares every output with w[nK+k] = sum_i c[iK+k] b[n-i].
// Output j (counted from the first w_valid) belongs to bit n = j/K - 1 and
// k = j mod K. Checks one bit taken every K clocks, and that the waveform
// passes exactly through 0 and 1024 at the sample instants (k = 0).
module tb_bit_waveform_gen;
  localparam int N = 5;
  localparam int K = 5;

  logic clk = 0, rst_n = 0, bit_in = 0;
  logic bit_take, w_valid;
  logic signed [14:0] w_out;
  int checks = 0, failures = 0;

  bit_waveform_gen dut (.*);

  always #5 clk = ~clk;

  int bs [$];
  int cyc = 0, last_take = -1, nout = 0, zeros = 0, ones = 0;

  function automatic int b_at(int n);
    return (n < 0 || n >= bs.size()) ? 0 : bs[n];
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (w_valid) begin
        automatic int k = nout % K, n = nout / K - 1, e = 0;
        for (int i = 0; i < N; i++) e += int'(upfir_pkg::RC_BETA03[i*K + k]) * b_at(n - i);
        checks++;
        if (w_out != e) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d exp %0d", nout, w_out, e);
        end
        if (k == 0 && n >= 2) begin
          if (w_out == 0) zeros++;
          if (w_out == 1024) ones++;
        end
        nout++;
      end
      if (bit_take) begin
        bs.push_back(int'(bit_in));
        if (last_take >= 0) begin
          checks++;
          if (cyc - last_take != K) failures++;
        end
        last_take = cyc;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 500; s++) begin
      @(negedge clk);
      bit_in = 1'($urandom);
      @(posedge clk);
      while (!bit_take) @(posedge clk);
    end
    repeat (K*(N+2)) @(posedge clk);
    checks++;
    if (zeros + ones < 490 || zeros == 0 || ones == 0) begin
      failures++; $display("sample points: %0d zeros %0d ones", zeros, ones);
    end
    $display("outputs %0d bits %0d", nout, bs.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
