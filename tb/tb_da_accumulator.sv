// tb_da_accumulator: feeds random signed words, B per output sample, and
// checks that the output is sum_b d[b] * 2^(B-1-b) (first word weighted
// most), that y_valid pulses once per B clocks one clock after `last`, and
// that y holds between pulses. Extreme words check the width.
module tb_da_accumulator;
  localparam int IN_W = 15;
  localparam int B = 8;
  localparam int OUT_W = IN_W + B;

  logic clk = 0, rst_n = 0, first = 0, last = 0;
  logic signed [IN_W-1:0] d_in = '0;
  logic signed [OUT_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  da_accumulator #(.IN_W(IN_W), .SAMPLE_W(B)) dut (.*);

  always #5 clk = ~clk;

  longint exp_q [$];
  longint sum;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 400; s++) begin
      sum = 0;
      for (int b = 0; b < B; b++) begin
        @(negedge clk);
        case (s % 4)
          0: d_in = IN_W'($urandom);
          1: d_in = (IN_W)'(1 << (IN_W - 1));           // most negative
          2: d_in = (IN_W)'((1 << (IN_W - 1)) - 1);     // most positive
          default: d_in = IN_W'($signed(12'($urandom)));
        endcase
        first = (b == 0);
        last  = (b == B - 1);
        sum = sum * 2 + longint'(d_in);
        if (b == B - 1) exp_q.push_back(sum);
      end
    end
    @(negedge clk); first = 0; last = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [OUT_W-1:0] y_prev;
  int since_valid = 0;
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        automatic longint e = exp_q.pop_front();
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("y=%0d exp %0d", y, e);
        end
      end
      if (since_valid != 0) begin
        checks++;
        if (since_valid != B) begin failures++; $display("output spacing %0d", since_valid); end
      end
      since_valid = 1;
    end else if (since_valid != 0) begin
      since_valid++;
      checks++;
      if (y !== y_prev) begin failures++; $display("y changed between valid pulses"); end
    end
    y_prev = y;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
