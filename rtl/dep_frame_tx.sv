// dep_frame_tx: transmitter of the 7-bit DEP frame (see dep_pkg).
// When idle it sends IDLE words. A start pulse while ready latches the
// destination and source addresses (ADDR_WORDS digits each) and the control
// word(s) Y; the frame then goes out one word per clock:
//   FLAG R1 A1[0..] R2 A2[0..] R3 Y[0..] R4 PDU.. R5 CRC[0..2] FLAG
// followed by at least one IDLE word. PDU words come from a valid/ready
// stream and end with pdu_last; the PDU holds at least one word. If the source
// has no word ready during the PDU, the transmitter sends an IDLE word as
// fill, which the receiver skips. The CRC-16 covers A1, A2, Y and the PDU.
// Frame order, flags, idle words and register codes follow the document; the
// 5-word address (a 32-bit address needs five 7-bit digit words), the CRC
// kind and its 3-word form, the fill word and the handshake are this design's
// choices. Timing: sym is a registered-state function, one word per clock;
// the first FLAG appears two clocks after the accepted start.
module dep_frame_tx
  import dep_pkg::*;
#(
  parameter int unsigned ADDR_WORDS = 5,
  parameter int unsigned Y_WORDS    = 1
) (
  input  logic clk,
  input  logic rst_n,                         // synchronous, active low
  // frame request
  input  logic start,
  output logic ready,                         // start is accepted this cycle
  input  sym_t a1 [ADDR_WORDS],               // destination address digits
  input  sym_t a2 [ADDR_WORDS],               // source address digits
  input  sym_t y  [Y_WORDS],                  // control digits
  // PDU stream
  input  logic pdu_valid,
  input  sym_t pdu_data,
  input  logic pdu_last,
  output logic pdu_ready,
  // line
  output sym_t sym,
  output logic fill                           // sym is a fill word inside a frame
);
  typedef enum logic [3:0] {
    S_IDLE, S_LEAD, S_SD, S_R1, S_A1, S_R2, S_A2, S_R3, S_Y, S_R4, S_PDU, S_R5, S_CRC, S_ED
  } state_t;

  localparam int unsigned CW = $clog2(ADDR_WORDS + Y_WORDS + CRC_WORDS + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  sym_t          a1_q [ADDR_WORDS];
  sym_t          a2_q [ADDR_WORDS];
  sym_t          y_q  [Y_WORDS];
  logic [15:0]   crc;

  assign ready     = (state == S_IDLE);
  assign pdu_ready = (state == S_PDU);
  assign fill      = (state == S_PDU) && !pdu_valid;

  always_comb begin
    unique case (state)
      S_IDLE, S_LEAD: sym = SYM_IDLE;
      S_SD, S_ED:     sym = SYM_FLAG;
      S_R1:           sym = SYM_R1;
      S_A1:           sym = a1_q[int'(cnt)];
      S_R2:           sym = SYM_R2;
      S_A2:           sym = a2_q[int'(cnt)];
      S_R3:           sym = SYM_R3;
      S_Y:            sym = y_q[int'(cnt)];
      S_R4:           sym = SYM_R4;
      S_PDU:          sym = pdu_valid ? pdu_data : SYM_IDLE;
      S_R5:           sym = SYM_R5;
      S_CRC:          sym = crc_digit(crc, 32'(cnt));
      default:        sym = SYM_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      crc   <= '1;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          a1_q  <= a1;
          a2_q  <= a2;
          y_q   <= y;
          state <= S_LEAD;
        end
        S_LEAD: state <= S_SD;
        S_SD:   begin state <= S_R1; crc <= '1; end
        S_R1:   begin state <= S_A1; cnt <= '0; end
        S_A1: begin
          crc <= crc16_sym(crc, sym);
          if (32'(cnt) == ADDR_WORDS - 1) begin state <= S_R2; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_R2:   state <= S_A2;
        S_A2: begin
          crc <= crc16_sym(crc, sym);
          if (32'(cnt) == ADDR_WORDS - 1) begin state <= S_R3; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_R3:   state <= S_Y;
        S_Y: begin
          crc <= crc16_sym(crc, sym);
          if (32'(cnt) == Y_WORDS - 1) begin state <= S_R4; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_R4:   state <= S_PDU;
        S_PDU: if (pdu_valid) begin
          crc <= crc16_sym(crc, pdu_data);
          if (pdu_last) state <= S_R5;
        end
        S_R5:   begin state <= S_CRC; cnt <= '0; end
        S_CRC: begin
          if (32'(cnt) == CRC_WORDS - 1) begin state <= S_ED; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_ED:    state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Interface rules: data words must be information digits, and the address
  // and control digits too when a frame is requested.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(pdu_valid && pdu_ready) || is_info(pdu_data))
        else $error("PDU word %0d is a service code", pdu_data);
      if (start && ready) begin
        for (int i = 0; i < ADDR_WORDS; i++)
          assert (is_info(a1[i]) && is_info(a2[i])) else $error("address digit out of range");
        for (int i = 0; i < Y_WORDS; i++)
          assert (is_info(y[i])) else $error("control digit out of range");
      end
    end
  end
endmodule
