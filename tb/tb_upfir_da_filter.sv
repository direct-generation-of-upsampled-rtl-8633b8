// tb_upfir_da_filter: runs the two-filter form (roll-off 0.3 and 0.5
// raised cosine on one input) with random 8-bit samples, and compares every
// output with the direct convolution of the upsampled filter,
//   y[nK+k] = sum_i c[iK+k] x[n-i],
// computed here with multiplications. Output j after reset belongs to
// sample n = j/K - 1 and k = j mod K (the first K outputs see the cleared
// register). Checks one load every B*K clocks and one output every B clocks,
// and counts the sample instants where y[nK] = 1024 x[n-2] exactly.
module tb_upfir_da_filter;
  localparam int N = 5;
  localparam int K = 5;
  localparam int B = 8;
  localparam int NF = 2;
  localparam int OUT_W = 15 + B;

  logic clk = 0, rst_n = 0;
  logic [B-1:0] x_in = '0;
  logic x_take, y_valid;
  logic signed [NF-1:0][OUT_W-1:0] y;
  int checks = 0, failures = 0;
  int sample_points = 0;

  upfir_da_filter #(.TAPS(N), .UPSAMPLE(K), .SAMPLE_W(B), .NUM_FILTERS(NF),
                    .COEFS({upfir_pkg::RC_BETA03, upfir_pkg::RC_BETA05})) dut (.*);

  always #5 clk = ~clk;

  int xs [$];
  int cyc = 0, last_take = -1, last_valid = -1, nout = 0;

  function automatic int coef(int f, int j);
    return (f == 0) ? int'(upfir_pkg::RC_BETA03[j]) : int'(upfir_pkg::RC_BETA05[j]);
  endfunction

  function automatic longint x_at(int n);
    return (n < 0 || n >= xs.size()) ? 0 : longint'(xs[n]);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (y_valid) begin
        automatic int p = nout / K, k = nout % K, n = p - 1;
        for (int f = 0; f < NF; f++) begin
          automatic longint e = 0;
          for (int i = 0; i < N; i++) e += longint'(coef(f, i*K + k)) * x_at(n - i);
          checks++;
          if (longint'($signed(y[f])) != e) begin
            failures++;
            if (failures < 10) $display("out %0d f=%0d: got %0d exp %0d", nout, f, y[f], e);
          end
        end
        if (k == 0 && n >= 2) begin
          checks++;
          if (longint'($signed(y[0])) != 1024 * x_at(n - 2)) failures++;
          else sample_points++;
        end
        if (last_valid >= 0) begin
          checks++;
          if (cyc - last_valid != B) begin failures++; $display("output spacing %0d", cyc - last_valid); end
        end
        last_valid = cyc;
        nout++;
      end
      if (x_take) begin
        xs.push_back(int'(x_in));
        if (last_take >= 0) begin
          checks++;
          if (cyc - last_take != B*K) begin failures++; $display("load spacing %0d", cyc - last_take); end
        end
        last_take = cyc;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 300; s++) begin
      @(negedge clk);
      case (s % 10)
        3: x_in = '1;
        4: x_in = '1;
        7: x_in = '0;
        default: x_in = B'($urandom);
      endcase
      @(posedge clk);
      while (!x_take) @(posedge clk);
    end
    repeat (B*K*(N+1)) @(posedge clk);
    checks++;
    if (nout < 300 * K) begin failures++; $display("only %0d outputs", nout); end
    checks++;
    if (sample_points < 250) begin failures++; $display("sample points %0d", sample_points); end
    $display("outputs %0d samples %0d exact sample points %0d", nout, xs.size(), sample_points);
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
