// dsc_ref_pkg: cycle-level reference model of the dynamic scan clock BIST,
// written independently of the RTL, for the end-to-end testbenches.
//
// The model holds the scan chains as circular buffers (so a shift costs O(1)
// even for tens of thousands of flip-flops), the LFSR, the signature
// register, the non-transition level counter and the frequency step. The
// testbench calls scan_clear() at the reset cycle of each scan-in, shift()
// for each shift the design makes, and capture() at each capture; ratio()
// gives the number of fast cycles the next shift must take.
package dsc_ref_pkg;

  class dsc_ref_model;
    int unsigned nc, len, nf, thr, width;
    bit          cnt_down;
    bit          chain[][];
    int unsigned head;
    int          step, count;
    bit [63:0]   lfsr, sar, taps, seed;
    int unsigned captures;
    // mechanism counters
    int unsigned n_speed, n_slow, n_sat_max, n_sat_min, n_fast_shifts, n_shifts, n_clear;
    longint unsigned cycles_dynamic, cycles_uniform;

    function new(int unsigned nc, int unsigned len, int unsigned nf, int unsigned thr,
                 bit cnt_down, int unsigned width, bit [63:0] taps, bit [63:0] seed);
      this.nc = nc; this.len = len; this.nf = nf; this.thr = thr;
      this.cnt_down = cnt_down; this.width = width; this.taps = taps; this.seed = seed;
      chain = new[nc];
      foreach (chain[c]) chain[c] = new[len];
      head = 0; step = 0; count = 0;
      lfsr = seed; sar = 0; captures = 0;
      n_speed = 0; n_slow = 0; n_sat_max = 0; n_sat_min = 0; n_fast_shifts = 0;
      n_shifts = 0; n_clear = 0; cycles_dynamic = 0; cycles_uniform = 0;
    endfunction

    // bit i (0 = first flip-flop) of chain c
    function bit get(int unsigned c, int unsigned i);
      return chain[c][(head + i) % len];
    endfunction

    function void set(int unsigned c, int unsigned i, bit v);
      chain[c][(head + i) % len] = v;
    endfunction

    function int unsigned ratio();
      return nf - step;
    endfunction

    function void start_session();
      lfsr = seed; sar = 0; captures = 0;
    endfunction

    function void scan_clear();
      step = 0; count = 0; n_clear++;
    endfunction

    function bit lfsr_bit(int unsigned c);
      return lfsr[width - 1 - c];
    endfunction

    function void shift();
      int ups = 0, downs = 0, s;
      bit so[];
      bit fb;
      so = new[nc];
      cycles_dynamic += ratio();
      cycles_uniform += nf;
      if (step == int'(nf) - 1) n_fast_shifts++;
      n_shifts++;
      for (int unsigned c = 0; c < nc; c++) begin
        bit si = lfsr_bit(c);
        if (si == get(c, 0)) ups++;
        if (cnt_down && get(c, len - 2) == get(c, len - 1)) downs++;
        so[c] = get(c, len - 1);
      end
      head = (head + len - 1) % len;
      for (int unsigned c = 0; c < nc; c++) chain[c][head] = lfsr_bit(c);
      s = count + ups - downs;
      if (s >= int'(thr)) begin
        if (step == int'(nf) - 1) begin count = thr - 1; n_sat_max++; end
        else begin step++; count = s - thr; n_speed++; end
      end else if (s < 0) begin
        if (step == 0) begin count = 0; n_sat_min++; end
        else begin step--; count = s + thr; n_slow++; end
      end else count = s;
      // LFSR
      fb = ^(lfsr & taps);
      lfsr = ((lfsr << 1) | 64'(fb)) & ((64'd1 << width) - 1);
      // signature register, only for captured responses
      if (captures > 0) begin
        fb = ^(sar & taps);
        sar = ((sar << 1) | 64'(fb)) & ((64'd1 << width) - 1);
        for (int unsigned c = 0; c < nc; c++) sar[c] ^= so[c];
      end
    endfunction

    function void capture_bit(int unsigned c, int unsigned i, bit v);
      set(c, i, v);
    endfunction

    function void capture_done();
      captures++;
    endfunction
  endclass

endpackage
