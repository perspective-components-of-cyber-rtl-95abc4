// dman_pkg: line symbols of the Manchester codes with J/K code violations,
// and the frame delimiters built from them.
// Each symbol lasts one bit time = two half-bit line levels. In the
// differential Manchester code:
//   D0: level changes at the start of the bit and again in the middle;
//   D1: no change at the start, a change in the middle;
// and in the plain Manchester code:
//   D0: high then low;  D1: low then high;
// while in both codes:
//   J : no change at the start and none in the middle (a code violation);
//   K : a change at the start and none in the middle (a code violation).
// Start delimiter SD = J K 0 J K 0 0 0 and end delimiter ED = J K 1 J K 1 1 1,
// sent first symbol first.
package dman_pkg;
  typedef enum logic [1:0] {D0 = 2'b00, D1 = 2'b01, SJ = 2'b10, SK = 2'b11} dsym_t;

  localparam dsym_t SD [8] = '{SJ, SK, D0, SJ, SK, D0, D0, D0};
  localparam dsym_t ED [8] = '{SJ, SK, D1, SJ, SK, D1, D1, D1};

  // The two half-bit levels {first, second} of a symbol after line level
  // prev; diff selects the differential code, otherwise plain Manchester.
  function automatic logic [1:0] halves(input dsym_t s, input logic prev, input logic diff);
    logic first;
    if (s == SJ || s == SK) first = (s == SK) ? ~prev : prev;
    else if (diff)          first = (s == D0) ? ~prev : prev;
    else                    first = (s == D0);
    return {first, (s == SJ || s == SK) ? first : ~first};
  endfunction
endpackage
