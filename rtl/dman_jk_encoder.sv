// dman_jk_encoder: frame transmitter on a differential Manchester line whose
// start and end are marked by J/K code violations. With DIFF = 0 the data
// bits use the plain Manchester code instead (0 = high then low, 1 = low then
// high) with the same J/K delimiters, as in the start-trigger waveform
// 1 0 J K 0 J K 0 0 0 drawn for the Manchester code.
// A start pulse while ready begins a frame: the start delimiter SD, then the
// bytes of a valid/ready stream, each sent most significant bit first, up to
// the byte with last set, then the end delimiter ED. Between frames the line
// carries D1 symbols, so the receiver always has mid-bit transitions to
// follow. The delimiters and the code are the document's; the byte stream
// handshake, bit order and the D1 fill are this design's choices.
// Timing: one half-bit line level per clock, so one symbol per two clocks; a
// byte is taken (byte_ready) at the start of its first bit. line is a register.
module dman_jk_encoder
  import dman_pkg::*;
#(
  parameter bit DIFF = 1'b1          // 1: differential Manchester, 0: plain Manchester
) (
  input  logic       clk,           // half-bit clock
  input  logic       rst_n,         // synchronous, active low
  input  logic       start,
  output logic       ready,
  input  logic       byte_valid,
  input  logic [7:0] byte_data,
  input  logic       byte_last,
  output logic       byte_ready,
  output logic       line,          // line level
  output logic       in_frame       // a frame symbol (SD, data or ED) is on the line
);
  typedef enum logic [1:0] {S_IDLE, S_SD, S_DATA, S_ED} state_t;

  state_t     state;
  logic       half;                 // 0: first half of the symbol is next
  logic [2:0] idx;                  // symbol index within the delimiter or byte
  logic [7:0] sh;                   // byte being sent
  logic       last_q;
  logic       go;                   // start accepted, SD begins at the next symbol
  logic       second;               // second half-bit level of the current symbol
  dsym_t      cur;
  logic [1:0] hv;

  assign ready      = (state == S_IDLE) && !go;
  assign byte_ready = (state == S_DATA) && !half && (idx == 3'd0);

  always_comb begin
    unique case (state)
      S_SD:    cur = SD[idx];
      S_ED:    cur = ED[idx];
      S_DATA:  cur = (idx == 3'd0) ? (byte_data[7] ? D1 : D0) : (sh[7] ? D1 : D0);
      default: cur = D1;
    endcase
    hv = halves(cur, line, DIFF);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      half     <= 1'b0;
      idx      <= '0;
      sh       <= '0;
      last_q   <= 1'b0;
      line     <= 1'b0;
      second   <= 1'b0;
      in_frame <= 1'b0;
      go       <= 1'b0;
    end else if (!half) begin
      if (start && ready) go <= 1'b1;
      // first half of a symbol: output it, remember the second half
      line     <= hv[1];
      second   <= hv[0];
      half     <= 1'b1;
      in_frame <= (state != S_IDLE);
      if (state == S_DATA && idx == 3'd0) begin
        sh     <= {byte_data[6:0], 1'b0};
        last_q <= byte_last;
      end else if (state == S_DATA) sh <= {sh[6:0], 1'b0};
    end else begin
      if (start && ready) go <= 1'b1;
      line <= second;
      half <= 1'b0;
      idx  <= idx + 1'b1;
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (go || (start && ready)) begin state <= S_SD; go <= 1'b0; end
        end
        S_SD:   if (idx == 3'd7) state <= S_DATA;
        S_DATA: if (idx == 3'd7 && last_q) state <= S_ED;
        S_ED:   if (idx == 3'd7) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // a byte must be offered when the encoder takes it
  always_ff @(posedge clk)
    if (rst_n) assert (!byte_ready || byte_valid) else $error("no byte offered inside a frame");
endmodule
