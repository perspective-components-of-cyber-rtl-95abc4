// rgb_pkg: types and constant functions for residue (RCS) coding of RGB pixels.
// A channel intensity 0..255 is coded by the moduli 5, 7 and 8 (product 280):
//   * the Rademacher-Krestenson (R-K) code holds each residue as a 3-bit binary
//     number (9 bits in all);
//   * the Haar-Krestenson (H-K) code holds each residue as a one-hot group of
//     5, 7 and 8 lines (20 bits in all).
// The CRT helpers compute, for pairwise coprime moduli, the orthogonal bases
// B_i = (P0/P_i) * m_i with (P0/P_i) * m_i = 1 (mod P_i).
package rgb_pkg;

  typedef struct packed {
    logic [2:0] a;     // intensity mod 5
    logic [2:0] c;     // intensity mod 7
    logic [2:0] d;     // intensity mod 8
  } rk_code_t;

  typedef struct packed {
    logic [7:0] d;     // one-hot intensity mod 8
    logic [6:0] c;     // one-hot intensity mod 7
    logic [4:0] a;     // one-hot intensity mod 5
  } hk_code_t;

  // Inverse element m with (q * m) mod p = 1, found by search (p is small).
  function automatic longint unsigned inv_mod(input longint unsigned q, input longint unsigned p);
    for (longint unsigned m = 1; m < p; m++)
      if ((q * m) % p == 1) return m;
    return 0;
  endfunction

  // Orthogonal basis B = (p0 / p) * inv_mod(p0 / p, p).
  function automatic longint unsigned crt_basis(input longint unsigned p0, input longint unsigned p);
    return (p0 / p) * inv_mod((p0 / p) % p, p);
  endfunction

endpackage
