// tb_upfir_sequencer: checks the bit counter, the sample counter A_L and the
// strobes against the cycle count since reset: bit = t mod B,
// A_L = (t div B) mod K, one output every B clocks, one load every B*K
// clocks. Also runs the B = 1 form used by the single-bit generator.
module tb_upfir_sequencer;
  localparam int K = 5;
  localparam int B = 8;

  logic clk = 0, rst_n = 0;
  logic [2:0] a_l, a_l1;
  logic [2:0] bit_cnt;
  logic [0:0] bit_cnt1;
  logic first, last, rotate, load;
  logic first1, last1, rotate1, load1;
  int checks = 0, failures = 0;
  int loads = 0, outs = 0, last_load = -1;

  upfir_sequencer #(.UPSAMPLE(K), .SAMPLE_W(B)) dut (
    .clk, .rst_n, .a_l, .bit_cnt, .first, .last, .rotate, .load);
  upfir_sequencer #(.UPSAMPLE(K), .SAMPLE_W(1)) dut1 (
    .clk, .rst_n, .a_l(a_l1), .bit_cnt(bit_cnt1), .first(first1), .last(last1),
    .rotate(rotate1), .load(load1));

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what, input int t);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("t=%0d %s", t, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      chk(int'(bit_cnt) == t % B, "bit_cnt", t);
      chk(int'(a_l) == (t / B) % K, "a_l", t);
      chk(first == (t % B == 0), "first", t);
      chk(last == (t % B == B - 1), "last", t);
      chk(load == (t % (B*K) == B*K - 1), "load", t);
      chk(rotate == !load, "rotate", t);
      chk(int'(a_l1) == t % K, "a_l (B=1)", t);
      chk(first1 && last1, "first/last (B=1)", t);
      chk(load1 == (t % K == K - 1), "load (B=1)", t);
      if (last) outs++;
      if (load) begin
        if (last_load >= 0) chk(t - last_load == B*K, "load period", t);
        last_load = t;
        loads++;
      end
    end
    chk(loads == 2000 / (B*K), "load count", 0);
    chk(outs == 2000 / B, "output count", 0);
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
