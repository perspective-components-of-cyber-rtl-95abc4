// dep_pkg: symbols and checksum of the 7-bit data exchange protocol (DEP)
// frame that needs no bit stuffing.
// A 7-bit word carries either an information digit 0..99 (the range a class 1.0
// sensor needs) or one of the redundant codes 100..127 that no measurement
// produces. The redundant codes are used as service codes: the idle word, the
// frame flag and the register codes R1..R5 that open each field of the frame
//   IDLE.. FLAG R1 A1 R2 A2 R3 Y R4 PDU R5 CRC FLAG IDLE..
// Since data can never look like a service code, no bit stuffing is needed and
// every frame has a fixed number of bits per field.
// Flag 1111110 (126) and the register codes 103, 107, 111, 115 follow the
// document's 7-bit frame table; R5 = 119 continues its list of odd register
// codes; IDLE = 1111111 (127) is the 7-bit form of its all-ones idle byte.
package dep_pkg;

  localparam int unsigned SYM_W    = 7;
  localparam int unsigned INFO_MAX = 99;     // largest information digit

  typedef logic [SYM_W-1:0] sym_t;

  localparam sym_t SYM_IDLE = 7'd127;        // 1111111
  localparam sym_t SYM_FLAG = 7'd126;        // 1111110
  localparam sym_t SYM_R1   = 7'd103;        // 1100111, opens A1 (destination)
  localparam sym_t SYM_R2   = 7'd107;        // 1101011, opens A2 (source)
  localparam sym_t SYM_R3   = 7'd111;        // 1101111, opens Y (control)
  localparam sym_t SYM_R4   = 7'd115;        // 1110011, opens the PDU
  localparam sym_t SYM_R5   = 7'd119;        // 1110111, opens the CRC

  localparam int unsigned CRC_WORDS = 3;     // CRC-16 sent as 6 + 6 + 4 bits

  function automatic logic is_info(input sym_t s);
    return s <= sym_t'(INFO_MAX);
  endfunction

  // CRC-16/CCITT (x^16 + x^12 + x^5 + 1) advanced by the 7 bits of one
  // symbol, most significant bit first.
  function automatic logic [15:0] crc16_sym(input logic [15:0] crc, input sym_t s);
    logic [15:0] c = crc;
    for (int i = SYM_W - 1; i >= 0; i--) begin
      logic fb = c[15] ^ s[i];
      c = {c[14:0], 1'b0};
      if (fb) c ^= 16'h1021;
    end
    return c;
  endfunction

  // The CRC word k (0..2) as an information digit: bits 15:10, 9:4, 3:0.
  function automatic sym_t crc_digit(input logic [15:0] crc, input int unsigned k);
    case (k)
      0:       return sym_t'(crc[15:10]);
      1:       return sym_t'(crc[9:4]);
      default: return sym_t'(crc[3:0]);
    endcase
  endfunction

endpackage
