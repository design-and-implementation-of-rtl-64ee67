// tb_ref_pkg: reference model for the testbenches, independent of the RTL.
//
// ref_kn() evaluates the two-step 802.16e interleaver permutation directly,
//   m_k = (Ncbps/d)*(k mod d) + floor(k/d)
//   j_k = s*floor(m_k/s) + (m_k + Ncbps - floor(d*m_k/Ncbps)) mod s
// with d = 16 and s = max(bits_per_symbol/2, 1), and searches for the original
// index k whose interleaved position j_k equals n. That k is the address the
// deinterleaver must produce for received position n.
package tb_ref_pkg;

  function automatic int ref_kn(int bits_per_sym, int cols, int n);
    int ncbps, s, m, jk;
    ncbps = 16 * cols;
    s = (bits_per_sym / 2 > 1) ? bits_per_sym / 2 : 1;
    for (int k = 0; k < ncbps; k++) begin
      m  = (ncbps / 16) * (k % 16) + k / 16;
      jk = s * (m / s) + (m + ncbps - (16 * m) / ncbps) % s;
      if (jk == n) return k;
    end
    return -1;
  endfunction

endpackage
