// decim_ref_pkg: bit-exact software reference for the decimation filter testbenches.
//
// Written independently of the RTL's structure: it filters a whole recorded input sequence
// with a plain convolution (samples before the first one are zero), casts each result from
// full precision (30 fraction bits) to a 16-bit sample with round-half-up and saturation, and keeps
// every M-th result starting with the first.
package decim_ref_pkg;

  typedef int int_q[$];

  // Round half up, drop 15 fraction bits, saturate to 16-bit two's complement.
  function automatic int q15_cast(longint acc, output bit clipped);
    longint r;
    r = (acc + 64'sd16384) >>> 15;
    clipped = 1'b0;
    if (r > 32767) begin r = 32767; clipped = 1'b1; end
    if (r < -32768) begin r = -32768; clipped = 1'b1; end
    return int'(r);
  endfunction

  // Full-precision convolution output at time n.
  function automatic longint conv_at(const ref int_q x, const ref int_q h, input int n);
    longint s = 0;
    for (int k = 0; k < h.size(); k++)
      if (n - k >= 0) s += longint'(h[k]) * longint'(x[n-k]);
    return s;
  endfunction

  // Filter, cast and keep every M-th output.
  function automatic int_q fir_decim(const ref int_q x, const ref int_q h, input int m);
    int_q y;
    bit   c;
    for (int n = 0; n < x.size(); n += m)
      y.push_back(q15_cast(conv_at(x, h, n), c));
    return y;
  endfunction

  // Number of filter outputs (kept or not) that the cast has to clip.
  function automatic int count_clips(const ref int_q x, const ref int_q h);
    int  cnt = 0;
    bit  c;
    int  v;
    for (int n = 0; n < x.size(); n++) begin
      v = q15_cast(conv_at(x, h, n), c);
      if (c) cnt++;
    end
    return cnt;
  endfunction

  // Read a coefficient table (one 16-bit hex word per line) as signed integers.
  function automatic int_q load_coefs(string path, int n);
    logic [15:0] mem [1024];
    int_q h;
    $readmemh(path, mem, 0, n - 1);
    for (int i = 0; i < n; i++) h.push_back(int'(signed'(mem[i])));
    return h;
  endfunction

endpackage
