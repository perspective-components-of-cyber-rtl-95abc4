// gmsk_pkg: the four MSK tone indices used by the Galois-numbered signalling.
// A data 1 goes out on F11 or F12 and a data 0 on F21 or F22; the second
// digit tells the Galois numbering bit (1 -> F11/F21, 0 -> F12/F22).
package gmsk_pkg;
  typedef enum logic [1:0] {
    F11 = 2'b11,   // data 1, Galois bit 1
    F12 = 2'b10,   // data 1, Galois bit 0
    F21 = 2'b01,   // data 0, Galois bit 1
    F22 = 2'b00    // data 0, Galois bit 0
  } freq_t;
endpackage
