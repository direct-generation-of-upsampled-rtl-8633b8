// tb_waveform_lut: first checks the raised-cosine coefficient sets computed
// by the package against a table of expected values and against the pulse
// formula, c[j] = round(1024*h(j-2K)) with
//   h(t) = sinc(t/K) cos(pi beta t/K) / (1 - (2 beta t/K)^2),
// computed here in real arithmetic. Then reads every address of a two-filter
// memory and compares each word with the sum of the coefficients that the
// address pattern selects, W_m[k] = sum_i m[i] c[iK+k]; words with k >= K
// must be zero.
module tb_waveform_lut;
  localparam int N = 5;
  localparam int K = 5;
  localparam int NF = 2;
  localparam int LUT_W = 15;
  localparam real PI = 3.14159265358979;

  logic [N-1:0] a_h;
  logic [2:0]   a_l;
  logic signed [NF-1:0][LUT_W-1:0] d_o;
  int checks = 0, failures = 0;

  waveform_lut #(.TAPS(N), .UPSAMPLE(K), .COEF_W(12), .NUM_FILTERS(NF),
                 .COEFS({upfir_pkg::RC_BETA03, upfir_pkg::RC_BETA05})) dut (.*);

  function automatic int rc(int t, real beta);
    real x, d, h;
    x = real'(t) / K;
    if (t == 0) return 1024;
    d = 1.0 - (2.0 * beta * x) ** 2;
    if (d < 1e-9 && d > -1e-9) h = PI / 4.0 * $sin(PI * x) / (PI * x);
    else h = $sin(PI * x) / (PI * x) * $cos(PI * beta * x) / d;
    return int'($floor(h * 1024.0 + 0.5));
  endfunction

  // Roll-off 0.3 set, worked out separately in double precision.
  localparam int GOLDEN03 [25] = '{
      0,  -80, -155, -187, -141,    0,  227,  501,  765,  955,
   1024,  955,  765,  501,  227,    0, -141, -187, -155,  -80,
      0,   57,   77,   64,   33};

  function automatic int coef(int f, int j);
    return (f == 0) ? int'(upfir_pkg::RC_BETA03[j]) : int'(upfir_pkg::RC_BETA05[j]);
  endfunction

  initial begin
    for (int j = 0; j < N*K; j++) begin
      checks++;
      if (coef(0, j) != GOLDEN03[j]) begin
        failures++; $display("beta 0.3 c[%0d] = %0d, expected %0d", j, coef(0, j), GOLDEN03[j]);
      end
      checks += 2;
      if (coef(0, j) != rc(j - 2*K, 0.3)) begin
        failures++; $display("beta 0.3 c[%0d] = %0d, formula %0d", j, coef(0, j), rc(j - 2*K, 0.3));
      end
      if (coef(1, j) != rc(j - 2*K, 0.5)) begin
        failures++; $display("beta 0.5 c[%0d] = %0d, formula %0d", j, coef(1, j), rc(j - 2*K, 0.5));
      end
    end
    for (int m = 0; m < 2**N; m++) begin
      for (int k = 0; k < 8; k++) begin
        a_h = N'(m); a_l = 3'(k);
        #1;
        for (int f = 0; f < NF; f++) begin
          automatic int e = 0;
          automatic logic signed [LUT_W-1:0] got = d_o[f];
          if (k < K)
            for (int i = 0; i < N; i++) if (m[i]) e += coef(f, i*K + k);
          checks++;
          if (got != e) begin
            failures++;
            if (failures < 10) $display("m=%0d k=%0d f=%0d got %0d exp %0d", m, k, f, got, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
