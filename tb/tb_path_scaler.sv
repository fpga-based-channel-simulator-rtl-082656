// tb_path_scaler: self-checking test of the path gain (multiply, shift, truncate).
//
// Each clock a new sample, scale and shift are applied; a reference model
// computes floor(x * n / 2^min(S,14)) in 64-bit arithmetic and keeps its low 14
// bits. The output must match the reference of exactly two clocks earlier
// (the scaler's latency). Directed cases cover unity gain, the largest safe
// gain of 4 at full-scale input, the wrap-around beyond it, and a shift value
// of 15 that must act as the maximum shift of 14.
module tb_path_scaler;
  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic signed [11:0] din = '0;
  logic        [7:0]  scale = '0;
  logic        [3:0]  shift = '0;
  logic signed [13:0] dout;

  int checks = 0, failures = 0;
  logic signed [13:0] expq [$];

  path_scaler dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [13:0] model(int x, int n, int s);
    longint p;
    int     se;
    se = (s > 14) ? 14 : s;
    p  = longint'(x) * longint'(n);
    p  = p >>> se;
    return p[13:0];
  endfunction

  task automatic apply(input int x, input int n, input int s);
    @(negedge clk);
    din = 12'(x); scale = 8'(n); shift = 4'(s);
    expq.push_back(model(x, n, s));
    @(posedge clk);
    #1;
    // input captured at edge E appears after edge E+1: two clocks of latency
    if (expq.size() == 2) begin
      logic signed [13:0] e;
      e = expq.pop_front();
      checks++;
      if (dout !== e) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", dout, e);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // prime the two-stage pipeline
    apply(0, 0, 0);
    apply(0, 0, 0);
    apply(1000, 1, 0);      // unity gain
    apply(-1000, 1, 0);
    apply(2047, 4, 0);      // full-scale input at the largest safe gain
    apply(-2048, 4, 0);     // -8192, the most negative 14-bit value
    apply(2047, 5, 0);      // gain above 4 wraps
    apply(-2048, 255, 14);  // strongest attenuation
    apply(1234, 200, 15);   // shift 15 clamps to 14
    apply(-7, 3, 1);        // floor rounding of a negative value
    for (int i = 0; i < 10000; i++)
      apply($urandom_range(0, 4095) - 2048, $urandom_range(0, 255), $urandom_range(0, 15));
    apply(0, 0, 0);
    apply(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
