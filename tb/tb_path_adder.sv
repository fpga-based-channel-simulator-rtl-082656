// tb_path_adder: self-checking test of the per-destination path sum.
//
// Two adders are tested, one with 14 inputs and one with 16 (the input counts
// of a destination without and with a multipath channel). Random 14-bit inputs
// change every clock; the expected output is the 14-bit wrapped sum of the
// inputs applied exactly four clocks earlier (ceil(log2(N)) pipeline levels).
// Directed cases include full-scale inputs whose sum overflows and wraps.
module tb_path_adder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [13:0] a14 [14];
  logic signed [13:0] a16 [16];
  logic signed [13:0] s14, s16;

  int checks = 0, failures = 0;
  logic signed [13:0] e14 [$];
  logic signed [13:0] e16 [$];

  path_adder #(.N_IN(14), .W(14)) dut14 (.clk, .rst_n, .din(a14), .dout(s14));
  path_adder #(.N_IN(16), .W(14)) dut16 (.clk, .rst_n, .din(a16), .dout(s16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int mode);
    int t14, t16;
    @(negedge clk);
    t14 = 0; t16 = 0;
    for (int i = 0; i < 16; i++) begin
      logic signed [13:0] v;
      case (mode)
        0: v = 14'(0);
        1: v = 14'(8191);      // all full scale positive: wraps
        2: v = 14'(-8192);
        default: v = 14'($urandom);
      endcase
      if (i < 14) begin a14[i] = v; t14 += int'(v); end
      a16[i] = v; t16 += int'(v);
    end
    e14.push_back(14'(t14));
    e16.push_back(14'(t16));
    @(posedge clk);
    #1;
    // inputs captured at edge E reach the output after edge E+3
    if (e14.size() == 4) begin
      logic signed [13:0] x14, x16;
      x14 = e14.pop_front();
      x16 = e16.pop_front();
      checks += 2;
      if (s14 !== x14) begin failures++; if (failures < 10) $display("N=14 got %0d expected %0d", s14, x14); end
      if (s16 !== x16) begin failures++; if (failures < 10) $display("N=16 got %0d expected %0d", s16, x16); end
    end
  endtask

  initial begin
    foreach (a14[i]) a14[i] = '0;
    foreach (a16[i]) a16[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4) step(0);
    step(1); step(2); step(1); step(0);
    repeat (3000) step(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
