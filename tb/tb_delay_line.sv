// tb_delay_line: self-checking test of the block-RAM path delay.
//
// Drives a random 12-bit sample stream into a DEPTH-word delay line and keeps
// an independent history of every sample sent. Each clock the output must
// equal the sample sent delay + 1 clocks earlier. The delay is stepped through
// 0, 1, small values, the largest value (DEPTH-1), and an out-of-range value
// that must clamp to DEPTH-1, each after the buffer has wrapped at least once.
module tb_delay_line;
  localparam int unsigned DEPTH   = 1536;
  localparam int unsigned DATA_W  = 12;
  localparam int unsigned DELAY_W = 11;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic [DATA_W-1:0]  din = '0;
  logic [DELAY_W-1:0] delay = '0;
  logic [DATA_W-1:0]  dout;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  logic [DATA_W-1:0] hist [int];   // sample driven at each cycle

  delay_line #(.DEPTH(DEPTH), .DATA_W(DATA_W), .DELAY_W(DELAY_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run `n` clocks at delay `d`; check once the output reaches valid history.
  task automatic run(input int unsigned d, input int unsigned eff, input int unsigned n);
    delay = DELAY_W'(d);
    for (int unsigned i = 0; i < n; i++) begin
      @(negedge clk);
      // output after the last rising edge: sample of cycle - 1 - eff
      // (the first clock of a run still shows the previous tap)
      if (i > 0 && cycle >= eff + 2) begin
        checks++;
        if (dout !== hist[int'(cycle - 1 - eff)]) begin
          failures++;
          if (failures < 10)
            $display("delay %0d cycle %0d: got %h expected %h", d, cycle, dout, hist[int'(cycle - 1 - eff)]);
        end
      end
      din = DATA_W'($urandom);
      hist[int'(cycle)] = din;
      @(posedge clk);
      cycle++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // first fill with delay 0, then exercise the taps (changes settle after d+1)
    run(0, 0, 2000);
    run(1, 1, 300);
    run(7, 7, 300);
    run(100, 100, 400);
    run(DEPTH - 1, DEPTH - 1, 4000);
    run(2047, DEPTH - 1, 2000);   // clamps to DEPTH-1
    run(3, 3, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
