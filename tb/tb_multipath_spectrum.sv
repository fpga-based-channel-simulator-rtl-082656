// tb_multipath_spectrum: frequency response of a three-tap multipath channel.
//
// Replays, at the default 15-node size, the multipath spectrum measurement:
// a channel with taps at 0, 278 and 456 ns (0, 50 and 82 samples at 180 MHz)
// whose powers are 0, -6 and -3 dB relative to the first tap. Tones are sent
// from node 1 to node 0 one frequency at a time (all other inputs silent).
// For each tone the output amplitude is measured with a 512-point
// single-bin DFT and compared with the channel's transfer function
//   |H(f)| = |1 + 0.5 e^(-j 2 pi f 50) + 0.7070 e^(-j 2 pi f 82)|   (f in cycles/sample)
// within 2 % + 4 LSB. With the two extra taps switched off, the response
// must be flat (|H| = 1): the undistorted case.
module tb_multipath_spectrum;
  import chsim_pkg::*;

  localparam int    N    = 15;
  localparam int    L    = 512;     // DFT length, tones on bins q/L
  localparam real   PI   = 3.14159265358979;
  localparam real   AMP  = 1000.0;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  sample_t   adc_in  [N];
  dac_t      dac_out [N];
  logic      cfg_wr_en = 1'b0;
  logic [7:0] cfg_wr_path = '0;
  path_cfg_t cfg_wr_data = '0;

  channel_simulator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_multipath_on = 0, n_multipath_off = 0;
  int t = 0;
  int q_now = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tone generator: a new sample every clock
  always @(negedge clk) begin
    foreach (adc_in[i]) adc_in[i] = '0;
    adc_in[1] = sample_t'($rtoi(AMP * $cos(2.0 * PI * real'(q_now) * real'(t) / real'(L)) +
                                (AMP * $cos(2.0 * PI * real'(q_now) * real'(t) / real'(L)) >= 0.0 ? 0.5 : -0.5)));
    t++;
  end

  task automatic set_path(input int p, input int unsigned d, input int unsigned n, input int unsigned s);
    @(negedge clk);
    cfg_wr_en = 1'b1; cfg_wr_path = 8'(p);
    cfg_wr_data = '{delay: DELAY_W'(d), scale: SCALE_W'(n), shift: SHIFT_W'(s)};
    @(negedge clk);
    cfg_wr_en = 1'b0;
  endtask

  function automatic real h_mag(int q, bit taps_on);
    real f, re, im;
    f  = real'(q) / real'(L);
    re = 1.0; im = 0.0;
    if (taps_on) begin
      re += 0.5 * $cos(2.0 * PI * f * 50.0)            + (181.0 / 256.0) * $cos(2.0 * PI * f * 82.0);
      im -= 0.5 * $sin(2.0 * PI * f * 50.0)            + (181.0 / 256.0) * $sin(2.0 * PI * f * 82.0);
    end
    return $sqrt(re * re + im * im);
  endfunction

  task automatic measure(input int q, input bit taps_on);
    real re, im, got, want;
    q_now = q;
    repeat (200) @(posedge clk);                      // fill the taps and the pipeline
    re = 0.0; im = 0.0;
    for (int k = 0; k < L; k++) begin
      @(posedge clk);
      #1;
      re += real'(dac_out[0]) * $cos(2.0 * PI * real'(q) * real'(k) / real'(L));
      im -= real'(dac_out[0]) * $sin(2.0 * PI * real'(q) * real'(k) / real'(L));
    end
    got  = 2.0 * $sqrt(re * re + im * im) / real'(L);
    want = AMP * h_mag(q, taps_on);
    checks++;
    if (got > want * 1.02 + 4.0 || got < want * 0.98 - 4.0) begin
      failures++;
      $display("tone %0d/%0d, taps %0d: amplitude %f expected %f", q, L, taps_on, got, want);
    end
    if (taps_on) n_multipath_on++; else n_multipath_off++;
  endtask

  initial begin
    foreach (adc_in[i]) adc_in[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // channel 1 -> 0 (path 0) is the first multipath channel; taps are paths 210, 211
    set_path(0, 0, 128, 7);      // gain 1
    set_path(210, 50, 128, 8);   // gain 0.5, -6 dB, 278 ns
    set_path(211, 82, 181, 8);   // gain 0.707, -3 dB, 456 ns
    for (int q = 2; q < 200; q += 11) measure(q, 1'b1);
    set_path(210, 50, 0, 8);
    set_path(211, 82, 0, 8);
    for (int q = 2; q < 200; q += 33) measure(q, 1'b0);
    checks++;
    if (n_multipath_on == 0 || n_multipath_off == 0) failures++;
    $display("tones measured: multipath %0d, single path %0d", n_multipath_on, n_multipath_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
