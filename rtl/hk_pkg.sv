// hk_pkg: shared helpers for the Haar-Krestenson (H-K) residue-code datapath.
// An H-K code of a number x for a modulus P is a P-line one-hot code whose
// line (x mod P) is set. A set of NMOD moduli is held as an unpacked array of
// ints and the per-modulus codes as a packed [NMOD][PMAX] array, where PMAX is
// a parameter at least as large as the largest modulus; lines at and above a modulus' own value stay 0.
package hk_pkg;

  // Number of binary digits needed to count 0..n-1 (at least 1).
  function automatic int unsigned bits_for(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
