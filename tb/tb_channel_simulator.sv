// tb_channel_simulator: end-to-end test of the 15-node channel simulator at
// its default size (226 paths, 1536-sample delay memories).
//
// All 15 nodes are driven with random 12-bit samples every clock. The test
// programs the paths through the update port, and an independent reference
// model computes, from a history of the inputs and its own copy of the path
// settings, what every DAC output must be on every clock:
//   dac[k] = wrap14( sum over paths p into k of
//                    low14( floor(x_src(E - 3 - A_k - d_p) * n_p / 2^min(s_p,14)) ) )
// where E is the current clock, A_k = ceil(log2(paths into k)), and d_p is
// the path delay (0 for paths without a delay memory). Outputs are compared on
// every clock except the few that follow a settings change.
//
// Path numbering (the update port's contract): the path of channel i -> k is
// k*14 + (i < k ? i : i-1); multipath channel m (node (m+1)%15 -> node m,
// m < 8) has extra taps 210 + 2m and 211 + 2m.
//
// Phases: silence after reset; all channels at unity gain; the three-tap
// multipath channel of the spectrum test (taps 0, 278 and 456 ns, i.e. 0, 50
// and 82 samples, at 0, -6 and -3 dB); the longest delay (1535 samples);
// random settings streamed while traffic runs; a path gain above 4 (path
// overflow); summed gains above 4 (adder overflow); a shift value of 15
// (clamped); and an impulse that measures the latency. Each of these is
// counted and must happen at least once.
module tb_channel_simulator;
  import chsim_pkg::*;

  localparam int N   = 15;
  localparam int M   = 8;
  localparam int T   = 3;
  localparam int NCH = N * (N - 1);
  localparam int NP  = NCH + M * (T - 1);
  localparam int DEP = 1536;
  localparam int HL  = 4096;   // history length (power of two, > DEP + pipeline)

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  sample_t          adc_in  [N];
  dac_t             dac_out [N];
  logic             cfg_wr_en = 1'b0;
  logic [7:0]       cfg_wr_path = '0;
  path_cfg_t        cfg_wr_data = '0;

  channel_simulator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int edges = 0;                 // rising edges since reset release
  int quiet = 0;                 // clocks to skip after a settings change
  int amp = 256;                 // input amplitude
  bit impulse_mode = 1'b0;
  sample_t hist [HL][N];

  // reference copy of the path map and settings
  int        p_src [NP];
  int        p_dst [NP];
  bit        p_mem [NP];
  path_cfg_t p_cfg [NP];
  int        n_in  [N];

  // mechanism counters
  int n_unity = 0, n_multipath = 0, n_maxdelay = 0, n_live_update = 0;
  int n_path_ovf = 0, n_sum_ovf = 0, n_shift_clamp = 0, n_latency = 0;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int chan_path(int i, int k);
    return k * (N - 1) + ((i < k) ? i : i - 1);
  endfunction

  initial begin
    for (int k = 0; k < N; k++) n_in[k] = 0;
    for (int k = 0; k < N; k++)
      for (int i = 0; i < N; i++)
        if (i != k) begin
          p_src[chan_path(i, k)] = i;
          p_dst[chan_path(i, k)] = k;
          p_mem[chan_path(i, k)] = 1'b0;
          n_in[k]++;
        end
    for (int m = 0; m < M; m++) begin
      p_mem[chan_path((m + 1) % N, m)] = 1'b1;
      for (int e = 0; e < T - 1; e++) begin
        p_src[NCH + m * (T - 1) + e] = (m + 1) % N;
        p_dst[NCH + m * (T - 1) + e] = m;
        p_mem[NCH + m * (T - 1) + e] = 1'b1;
        n_in[m]++;
      end
    end
    foreach (p_cfg[p]) p_cfg[p] = '0;
  end

  // Expected output of node k after rising edge number e.
  function automatic dac_t expected(int k, int e, output bit path_ovf, output bit sum_ovf,
                                    output bit tap_used, output bit clamp_used);
    int sum = 0;
    path_ovf = 0; sum_ovf = 0; tap_used = 0; clamp_used = 0;
    for (int p = 0; p < NP; p++) begin
      if (p_dst[p] == k) begin
        int d, s, idx;
        longint v;
        d   = p_mem[p] ? ((int'(p_cfg[p].delay) > DEP - 1) ? DEP - 1 : int'(p_cfg[p].delay)) : 0;
        s   = (int'(p_cfg[p].shift) > 14) ? 14 : int'(p_cfg[p].shift);
        idx = e - 3 - clog2i(n_in[k]) - d;
        if (idx < 0) continue;
        v = (longint'(hist[idx % HL][p_src[p]]) * longint'(p_cfg[p].scale)) >>> s;
        if (v > 8191 || v < -8192) path_ovf = 1;
        if (p >= NCH && p_cfg[p].scale != 0 && hist[idx % HL][p_src[p]] != 0) tap_used = 1;
        if (p_cfg[p].shift > 14 && p_cfg[p].scale != 0) clamp_used = 1;
        sum += int'($signed(v[13:0]));
      end
    end
    if (sum > 8191 || sum < -8192) sum_ovf = 1;
    return dac_t'(sum);
  endfunction

  // Stimulus and checking, once per clock at the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (quiet > 0) quiet--;
      else if (edges > 0) begin
        for (int k = 0; k < N; k++) begin
          bit po, so, tu, cu;
          dac_t e;
          e = expected(k, edges, po, so, tu, cu);
          checks++;
          if (dac_out[k] !== e) begin
            failures++;
            if (failures < 10) $display("clock %0d node %0d: got %0d expected %0d", edges, k, dac_out[k], e);
          end
          if (po) n_path_ovf++;
          if (so) n_sum_ovf++;
          if (tu) n_multipath++;
          if (cu) n_shift_clamp++;
        end
      end
    end
    // next input samples, captured at the coming rising edge (number edges+1)
    for (int i = 0; i < N; i++) begin
      if (impulse_mode) adc_in[i] = '0;
      else              adc_in[i] = sample_t'($urandom_range(0, 2 * amp - 1) - amp);
      hist[(edges + 1) % HL][i] = adc_in[i];
    end
  end

  always @(posedge clk) if (rst_n) edges <= edges + 1;

  // One settings write through the update port (takes one clock).
  task automatic set_path(input int p, input int unsigned d, input int unsigned n, input int unsigned s);
    path_cfg_t c;
    c.delay = DELAY_W'(d); c.scale = SCALE_W'(n); c.shift = SHIFT_W'(s);
    @(posedge clk);
    #1;
    cfg_wr_en = 1'b1; cfg_wr_path = 8'(p); cfg_wr_data = c;
    @(posedge clk);
    #1;
    cfg_wr_en = 1'b0;
    p_cfg[p] = c;
    quiet = 12;
  endtask

  task automatic settle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    foreach (adc_in[i]) adc_in[i] = '0;
    foreach (hist[t, i]) hist[t][i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    settle(100);                                   // silent: all scales are 0

    // 1. every channel at unity gain: each output is the sum of the others
    for (int p = 0; p < NCH; p++) set_path(p, 0, 1, 0);
    settle(200);
    n_unity++;

    // 2. the multipath channel of the spectrum test on every multipath channel:
    //    taps at 0, 50 and 82 samples, gains 1, 0.5 (-6 dB), 181/256 (-3 dB)
    for (int m = 0; m < M; m++) begin
      set_path(chan_path((m + 1) % N, m), 0, 128, 7);
      set_path(NCH + 2 * m,     50, 128, 8);
      set_path(NCH + 2 * m + 1, 82, 181, 8);
    end
    settle(300);

    // 3. the longest delay on one tap
    set_path(NCH + 1, DEP - 1, 64, 6);
    settle(DEP + 100);
    n_maxdelay++;

    // 4. settings streamed while traffic runs, checked after each change
    for (int r = 0; r < 60; r++) begin
      set_path($urandom_range(0, NP - 1), $urandom_range(0, 200), $urandom_range(0, 8), $urandom_range(0, 2));
      settle(5);
      n_live_update++;
    end
    settle(300);

    // 5. path gain above 4 (path output wraps) with full-scale input
    amp = 2048;
    set_path(chan_path(3, 14), 0, 8, 0);
    settle(100);

    // 6. summed gains above 4 at one node (the sum wraps)
    for (int i = 0; i < N; i++) if (i != 13) set_path(chan_path(i, 13), 0, 2, 0);
    settle(100);

    // 7. shift value 15 acts as the maximum of 14
    set_path(chan_path(0, 12), 0, 255, 15);
    settle(100);
    amp = 256;

    // 8. latency: an impulse on node 1 to node 0 (16 paths end at node 0)
    for (int i = 1; i < N; i++) set_path(chan_path(i, 0), 0, 1, 0);
    set_path(chan_path(1, 0), 0, 1, 0);
    impulse_mode = 1'b1;
    settle(DEP + 200);                             // drain all delay memories
    begin
      int t_in, t_out;
      @(negedge clk);
      #1 adc_in[1] = 12'sd1000;
      hist[(edges + 1) % HL][1] = adc_in[1];
      t_in = edges + 1;                            // edge that captures the impulse
      t_out = -1;
      for (int c = 0; c < 40 && t_out < 0; c++) begin
        @(posedge clk);
        #1;
        if (dac_out[0] != 0) t_out = edges;
      end
      checks++;
      // capture edge plus 3 path and 4 adder registers: 8 clocks (44 ns)
      if (t_out - t_in + 1 != 8) begin
        failures++;
        $display("latency %0d clocks, expected 8", t_out - t_in + 1);
      end else n_latency++;
    end
    settle(50);

    checks++;
    if (n_unity == 0 || n_multipath == 0 || n_maxdelay == 0 || n_live_update == 0 ||
        n_path_ovf == 0 || n_sum_ovf == 0 || n_shift_clamp == 0 || n_latency == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("mechanisms: unity=%0d multipath_tap=%0d max_delay=%0d live_update=%0d path_overflow=%0d sum_overflow=%0d shift_clamp=%0d latency=%0d",
             n_unity, n_multipath, n_maxdelay, n_live_update, n_path_ovf, n_sum_ovf, n_shift_clamp, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
