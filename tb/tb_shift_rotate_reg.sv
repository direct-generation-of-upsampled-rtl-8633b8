// tb_shift_rotate_reg: checks the N x B shift+rotate input register against
// a model that keeps each row's sample unrotated plus a rotation count, and
// reads the column as bit (B-1-count) of each sample. Random load/rotate
// patterns, including loads in the middle of a rotation cycle, B = 8 and 5.
module tb_shift_rotate_reg;
  localparam int N = 5;
  localparam int B = 8;

  logic clk = 0, rst_n = 0, rotate = 0, load = 0;
  logic [B-1:0] x_in = '0;
  logic [N-1:0] col;
  int checks = 0, failures = 0;

  shift_rotate_reg #(.TAPS(N), .SAMPLE_W(B)) dut (.*);

  always #5 clk = ~clk;

  logic [B-1:0] smp [N];
  int           rot [N];

  task automatic check_col();
    logic [N-1:0] exp_col;
    for (int i = 0; i < N; i++) exp_col[i] = smp[i][(B - 1 - rot[i]) % B];
    checks++;
    if (col !== exp_col) begin
      failures++;
      if (failures < 10) $display("col mismatch: got %b exp %b", col, exp_col);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin smp[i] = '0; rot[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check_col();
    for (int t = 0; t < 4000; t++) begin
      load   = ($urandom % 5 == 0);
      rotate = ($urandom % 4 != 0);
      x_in   = B'($urandom);
      @(posedge clk);
      if (load) begin
        for (int i = N - 1; i > 0; i--) begin
          smp[i] = smp[i-1];
          rot[i] = (rot[i-1] + 1) % B;
        end
        smp[0] = x_in; rot[0] = 0;
      end else if (rotate) begin
        for (int i = 0; i < N; i++) rot[i] = (rot[i] + 1) % B;
      end
      @(negedge clk);
      check_col();
    end
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
