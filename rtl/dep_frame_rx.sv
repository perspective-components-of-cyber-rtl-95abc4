// dep_frame_rx: receiver of the 7-bit DEP frame (see dep_pkg).
// It hunts for a FLAG word, then expects the fields in the fixed order
//   R1 A1[ADDR_WORDS] R2 A2[ADDR_WORDS] R3 Y[Y_WORDS] R4 PDU.. R5 CRC[3] FLAG
// Register codes tell where each field starts, so a frame is found without
// bit stuffing, and any word that breaks the order (a service code inside a
// digit field, a digit where a register code belongs, a PDU longer than
// MAX_PDU) is caught at once: the frame is dropped with frame_err and the
// receiver hunts again, or restarts at once if the offending word is a FLAG.
// IDLE words inside a frame are fill and are skipped. PDU words are passed on
// as they arrive (pdu_valid/pdu_data); when the closing FLAG comes, frame_done
// pulses with frame_ok = CRC match, and the addresses, control digits and PDU
// length stay on their outputs until the next frame ends.
// Field order and codes follow the document; the error handling, the
// fill-word rule, the MAX_PDU limit and the CRC are this design's choices.
// Timing: one word per clock when sym_valid; outputs are registered, one
// clock after the word that caused them.
module dep_frame_rx
  import dep_pkg::*;
#(
  parameter int unsigned ADDR_WORDS = 5,
  parameter int unsigned Y_WORDS    = 1,
  parameter int unsigned MAX_PDU    = 1024   // longest accepted PDU, in words
) (
  input  logic        clk,
  input  logic        rst_n,                 // synchronous, active low
  input  logic        sym_valid,
  input  sym_t        sym,
  // PDU stream out
  output logic        pdu_valid,
  output sym_t        pdu_data,
  // frame results
  output logic        frame_done,            // closing FLAG seen (pulse)
  output logic        frame_ok,              // with frame_done: CRC matched
  output logic        frame_err,             // frame dropped for a broken order (pulse)
  output sym_t        a1 [ADDR_WORDS],
  output sym_t        a2 [ADDR_WORDS],
  output sym_t        y  [Y_WORDS],
  output logic [15:0] pdu_len,
  output logic [15:0] good_frames,
  output logic [15:0] bad_frames             // CRC failures plus dropped frames
);
  typedef enum logic [3:0] {
    S_HUNT, S_FLAG, S_A1, S_R2, S_A2, S_R3, S_Y, S_R4, S_PDU, S_CRC, S_ED
  } state_t;

  localparam int unsigned CW = $clog2(ADDR_WORDS + Y_WORDS + CRC_WORDS + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic [15:0]   crc, crc_rx, len;
  sym_t          a1_w [ADDR_WORDS];
  sym_t          a2_w [ADDR_WORDS];
  sym_t          y_w  [Y_WORDS];

  // a dropped frame: restart on a FLAG, otherwise hunt
  function automatic state_t drop_to(input sym_t s);
    return (s == SYM_FLAG) ? S_FLAG : S_HUNT;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_HUNT;
      cnt         <= '0;
      crc         <= '1;
      crc_rx      <= '0;
      len         <= '0;
      pdu_valid   <= 1'b0;
      pdu_data    <= '0;
      frame_done  <= 1'b0;
      frame_ok    <= 1'b0;
      frame_err   <= 1'b0;
      pdu_len     <= '0;
      good_frames <= '0;
      bad_frames  <= '0;
      for (int i = 0; i < ADDR_WORDS; i++) begin
        a1[i] <= '0; a2[i] <= '0; a1_w[i] <= '0; a2_w[i] <= '0;
      end
      for (int i = 0; i < Y_WORDS; i++) begin
        y[i] <= '0; y_w[i] <= '0;
      end
    end else begin
      pdu_valid  <= 1'b0;
      frame_done <= 1'b0;
      frame_err  <= 1'b0;
      if (sym_valid && !(sym == SYM_IDLE && state != S_HUNT && state != S_FLAG)) begin
        unique case (state)
          S_HUNT: if (sym == SYM_FLAG) state <= S_FLAG;
          S_FLAG: begin
            if (sym == SYM_R1) begin
              state <= S_A1; cnt <= '0; crc <= '1; len <= '0; crc_rx <= '0;
            end else if (sym == SYM_IDLE) state <= S_HUNT;
            else if (sym != SYM_FLAG) begin
              state <= S_HUNT; frame_err <= 1'b1; bad_frames <= bad_frames + 1'b1;
            end
          end
          S_A1, S_A2, S_Y, S_CRC: begin
            if (!is_info(sym)) begin
              state <= drop_to(sym); frame_err <= 1'b1; bad_frames <= bad_frames + 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
              if (state != S_CRC) crc <= crc16_sym(crc, sym);
              unique case (state)
                S_A1: begin
                  a1_w[int'(cnt)] <= sym;
                  if (32'(cnt) == ADDR_WORDS - 1) begin state <= S_R2; cnt <= '0; end
                end
                S_A2: begin
                  a2_w[int'(cnt)] <= sym;
                  if (32'(cnt) == ADDR_WORDS - 1) begin state <= S_R3; cnt <= '0; end
                end
                S_Y: begin
                  y_w[int'(cnt)] <= sym;
                  if (32'(cnt) == Y_WORDS - 1) begin state <= S_R4; cnt <= '0; end
                end
                default: begin   // S_CRC
                  unique case (32'(cnt))
                    0:       crc_rx[15:10] <= sym[5:0];
                    1:       crc_rx[9:4]   <= sym[5:0];
                    default: crc_rx[3:0]   <= sym[3:0];
                  endcase
                  if (32'(cnt) == CRC_WORDS - 1) begin state <= S_ED; cnt <= '0; end
                end
              endcase
            end
          end
          S_R2, S_R3, S_R4: begin
            if (sym == ((state == S_R2) ? SYM_R2 : (state == S_R3) ? SYM_R3 : SYM_R4))
              state <= (state == S_R2) ? S_A2 : (state == S_R3) ? S_Y : S_PDU;
            else begin
              state <= drop_to(sym); frame_err <= 1'b1; bad_frames <= bad_frames + 1'b1;
            end
          end
          S_PDU: begin
            if (is_info(sym) && 32'(len) < MAX_PDU) begin
              pdu_valid <= 1'b1;
              pdu_data  <= sym;
              len       <= len + 1'b1;
              crc       <= crc16_sym(crc, sym);
            end else if (sym == SYM_R5) begin
              state <= S_CRC; cnt <= '0;
            end else begin
              state <= drop_to(sym); frame_err <= 1'b1; bad_frames <= bad_frames + 1'b1;
            end
          end
          S_ED: begin
            if (sym == SYM_FLAG) begin
              state      <= S_FLAG;
              frame_done <= 1'b1;
              frame_ok   <= (crc_rx == crc);
              a1         <= a1_w;
              a2         <= a2_w;
              y          <= y_w;
              pdu_len    <= len;
              if (crc_rx == crc) good_frames <= good_frames + 1'b1;
              else               bad_frames  <= bad_frames + 1'b1;
            end else begin
              state <= S_HUNT; frame_err <= 1'b1; bad_frames <= bad_frames + 1'b1;
            end
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end
endmodule
