// tb_ref_pkg: reference models used by the testbenches, written from the
// algorithm descriptions and independent of the RTL:
//  - ref_approx_addsub: bit-by-bit model of the approximate adder/subtractor
//  - ref_grlc_encode:   GRLC byte stream of a list of 2x3 tiles
//  - ref_round_sat:     round-half-up and saturate, as used for psums
// The models follow the published algorithms and, where those are silent,
// the choices stated in the RTL headers (rounding, mask order, run codes).
package tb_ref_pkg;
  typedef byte unsigned bytes_q[$];

  function automatic longint unsigned ref_approx_addsub(input longint unsigned a, input longint unsigned b,
                                                        input bit sub, input int n, input int ap);
    longint unsigned mask, bn, res, hi;
    bit c;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    bn   = (sub ? ~b : b) & mask;
    a    = a & mask;
    if (ap == 0) return (a + bn + (sub ? 1 : 0)) & mask;
    res = 0;
    c   = 0;
    for (int k = ap - 1; k >= 0; k--) begin
      c = c | (a[k] & bn[k]);
      res[k] = c ? 1'b1 : (a[k] ^ bn[k]);
    end
    if (ap < n) begin
      hi  = ((a >> ap) + (bn >> ap)) << ap;
      res = (res | hi) & mask;
    end
    return res;
  endfunction

  // tiles: 6 values each, element i = row i/3, column i%3
  function automatic bytes_q ref_grlc_encode(input byte unsigned tiles[$][6]);
    bytes_q out;
    int zrun;
    zrun = 0;
    foreach (tiles[t]) begin
      byte unsigned m;
      m = 0;
      for (int i = 0; i < 6; i++) if (tiles[t][i] != 0) m[i] = 1'b1;
      if (m != 0) begin
        out.push_back(byte'((zrun << 6) | m));
        for (int i = 0; i < 6; i++) if (tiles[t][i] != 0) out.push_back(tiles[t][i]);
        zrun = 0;
      end else if (zrun == 3) begin
        out.push_back(8'hC0);
        zrun = 0;
      end else zrun++;
    end
    out.push_back(8'h00);
    return out;
  endfunction

  function automatic longint ref_round_sat(input longint v, input int shift, input int qw);
    longint r, maxv, minv;
    r = (shift == 0) ? v : ((v + (longint'(1) << (shift - 1))) >>> shift);
    maxv = (longint'(1) << (qw - 1)) - 1;
    minv = -(longint'(1) << (qw - 1));
    if (r > maxv) return maxv;
    if (r < minv) return minv;
    return r;
  endfunction
endpackage
