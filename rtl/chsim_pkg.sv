// chsim_pkg: widths, the path-setting record and the path map shared by the
// channel simulator.
//
// Sample formats follow the converters of the emulator: node inputs are 12-bit
// two's-complement ADC samples at 180 MHz, node outputs are 14-bit
// two's-complement DAC words. A path is programmed with a block-RAM delay (whole
// samples), an 8-bit unsigned scale value (fine gain) and a 4-bit right-shift
// value (coarse gain). The 11-bit delay field is this design's choice: it is
// what a 1536-sample delay memory needs.
//
// Path map (this design's numbering). With N nodes there are N*(N-1) channels.
// Channel c carries node src to node dst, where dst = c / (N-1) and
// r = c % (N-1), src = r for r < dst, else r + 1. Path p < N*(N-1) is the first
// (or only) path of channel p. The M multipath channels each have T paths;
// multipath channel m runs from node (m+1) % N to node m, and its T-1 extra
// paths are numbered N*(N-1) + m*(T-1) + e. Every path of a multipath channel
// has a delay memory; single-path channels have none.
package chsim_pkg;

  localparam int unsigned ADC_W   = 12;  // sample width from the ADC
  localparam int unsigned DAC_W   = 14;  // word width to the DAC
  localparam int unsigned SCALE_W = 8;   // multiplier scale value
  localparam int unsigned SHIFT_W = 4;   // bit-shift value
  localparam int unsigned DELAY_W = 11;  // delay value, 0 .. 1535 samples

  typedef logic signed [ADC_W-1:0] sample_t;
  typedef logic signed [DAC_W-1:0] dac_t;

  typedef struct packed {
    logic [DELAY_W-1:0] delay;  // samples of delay (ignored on paths without memory)
    logic [SCALE_W-1:0] scale;  // fine gain n, path gain is n * 2^-shift
    logic [SHIFT_W-1:0] shift;  // coarse attenuation, right shift 0 .. 14
  } path_cfg_t;

  function automatic int unsigned n_channels(int unsigned n);
    return n * (n - 1);
  endfunction

  function automatic int unsigned n_paths(int unsigned n, int unsigned m, int unsigned t);
    return n * (n - 1) + m * (t - 1);
  endfunction

  // Channel index of the channel from node src to node dst (src != dst).
  function automatic int unsigned channel_of(int unsigned src, int unsigned dst, int unsigned n);
    return dst * (n - 1) + ((src < dst) ? src : src - 1);
  endfunction

  function automatic int unsigned channel_src(int unsigned c, int unsigned n);
    int unsigned dst, r;
    dst = c / (n - 1);
    r   = c % (n - 1);
    return (r < dst) ? r : r + 1;
  endfunction

  // Multipath channel m runs from node (m+1) % n to node m.
  function automatic int unsigned multi_channel(int unsigned m, int unsigned n);
    return channel_of((m + 1) % n, m, n);
  endfunction

  function automatic bit is_multi_channel(int unsigned c, int unsigned n, int unsigned m);
    for (int unsigned i = 0; i < m; i++)
      if (multi_channel(i, n) == c) return 1'b1;
    return 1'b0;
  endfunction

  // Source node of path p.
  function automatic int unsigned path_src(int unsigned p, int unsigned n, int unsigned t);
    if (p < n_channels(n)) return channel_src(p, n);
    return ((p - n_channels(n)) / (t - 1) + 1) % n;
  endfunction

  // Whether path p has a block-RAM delay.
  function automatic bit path_has_delay(int unsigned p, int unsigned n, int unsigned m);
    if (p >= n_channels(n)) return 1'b1;
    return is_multi_channel(p, n, m);
  endfunction

  // Number of paths that end at node k.
  function automatic int unsigned dst_n_in(int unsigned k, int unsigned n, int unsigned m, int unsigned t);
    return (n - 1) + ((k < m) ? (t - 1) : 0);
  endfunction

  // j-th path ending at node k: first the N-1 channel paths, then the extra taps.
  function automatic int unsigned dst_path(int unsigned k, int unsigned j, int unsigned n, int unsigned t);
    if (j < n - 1) return k * (n - 1) + j;
    return n_channels(n) + k * (t - 1) + (j - (n - 1));
  endfunction

endpackage
