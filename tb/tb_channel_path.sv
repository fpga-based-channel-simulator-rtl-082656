// tb_channel_path: self-checking test of one hardware path (delay + gain).
//
// Two paths are driven by the same random 12-bit stream: one with a delay
// memory (small DEPTH of 64 to keep the run short), one without. The expected
// output is computed from a history of the input: the sample sent
// delay + 3 clocks earlier, times scale, shifted right by shift, truncated to
// 14 bits. The path without memory must behave as the delayed path with
// delay 0, whatever delay value it is given.
module tb_channel_path;
  import chsim_pkg::*;
  localparam int unsigned DEPTH = 64;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  sample_t   din = '0;
  path_cfg_t cfg = '0;
  dac_t      dout_d, dout_n;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  sample_t hist [int];

  channel_path #(.HAS_DELAY(1'b1), .DEPTH(DEPTH)) dut_d (.clk, .rst_n, .din, .cfg, .dout(dout_d));
  channel_path #(.HAS_DELAY(1'b0), .DEPTH(DEPTH)) dut_n (.clk, .rst_n, .din, .cfg, .dout(dout_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dac_t model(sample_t x, path_cfg_t c);
    longint p;
    int     s;
    s = (int'(c.shift) > 14) ? 14 : int'(c.shift);
    p = (longint'(x) * longint'(c.scale)) >>> s;
    return p[13:0];
  endfunction

  task automatic run(input path_cfg_t c, input int unsigned n);
    int unsigned d;
    d = (int'(c.delay) > DEPTH - 1) ? DEPTH - 1 : int'(c.delay);
    cfg = c;
    for (int unsigned i = 0; i < n; i++) begin
      @(negedge clk);
      // skip the clocks in which the previous setting is still in the pipeline
      if (i > 3 && cycle >= d + 4) begin
        checks += 2;
        if (dout_d !== model(hist[int'(cycle - 3 - d)], c)) begin
          failures++;
          if (failures < 10) $display("delayed path: got %0d expected %0d", dout_d, model(hist[int'(cycle - 3 - d)], c));
        end
        if (dout_n !== model(hist[int'(cycle - 3)], c)) begin
          failures++;
          if (failures < 10) $display("undelayed path: got %0d expected %0d", dout_n, model(hist[int'(cycle - 3)], c));
        end
      end
      din = sample_t'($urandom);
      hist[int'(cycle)] = din;
      @(posedge clk);
      cycle++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run('{delay: 11'd0,  scale: 8'd1,   shift: 4'd0}, 200);
    run('{delay: 11'd5,  scale: 8'd4,   shift: 4'd0}, 200);
    run('{delay: 11'd50, scale: 8'd128, shift: 4'd6}, 200);
    run('{delay: 11'd63, scale: 8'd255, shift: 4'd14}, 200);
    for (int i = 0; i < 30; i++)
      run('{delay: DELAY_W'($urandom_range(0, 80)), scale: SCALE_W'($urandom), shift: SHIFT_W'($urandom)}, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
