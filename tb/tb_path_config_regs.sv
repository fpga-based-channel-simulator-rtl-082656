// tb_path_config_regs: self-checking test of the path-setting register file.
//
// After reset every record must read zero. Random one-clock writes to random
// paths (226 of them) are mirrored in a reference array; after each write the
// written record must be visible on the next clock and all other records must
// be unchanged, also while the bus changes with the write strobe low. A full
// update of all 226 paths must take 226 clocks.
module tb_path_config_regs;
  import chsim_pkg::*;
  localparam int unsigned N_PATHS = 226;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       wr_en = 1'b0;
  logic [7:0] wr_path = '0;
  path_cfg_t  wr_data = '0;
  path_cfg_t  cfg [N_PATHS];

  int checks = 0, failures = 0;
  path_cfg_t ref_cfg [N_PATHS];

  path_config_regs #(.N_PATHS(N_PATHS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int p = 0; p < N_PATHS; p++) begin
      checks++;
      if (cfg[p] !== ref_cfg[p]) begin
        failures++;
        if (failures < 10) $display("path %0d: got %h expected %h", p, cfg[p], ref_cfg[p]);
      end
    end
  endtask

  task automatic write(input int p, input path_cfg_t d);
    @(negedge clk);
    wr_en = 1'b1; wr_path = 8'(p); wr_data = d;
    @(negedge clk);
    // strobe low: the bus keeps changing but nothing may be written
    wr_en = 1'b0;
    wr_path = 8'($urandom_range(0, N_PATHS - 1)); wr_data = path_cfg_t'($urandom);
    ref_cfg[p] = d;
    @(negedge clk);
  endtask

  initial begin
    int t0, t1;
    foreach (ref_cfg[p]) ref_cfg[p] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    compare_all();
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      write($urandom_range(0, N_PATHS - 1), path_cfg_t'($urandom));
      compare_all();
    end
    // burst update of every path, one per clock
    @(negedge clk);
    t0 = $time;
    for (int p = 0; p < N_PATHS; p++) begin
      wr_en = 1'b1; wr_path = 8'(p); wr_data = path_cfg_t'($urandom);
      ref_cfg[p] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != N_PATHS) begin
      failures++;
      $display("full update took %0d clocks", (t1 - t0) / 10);
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
