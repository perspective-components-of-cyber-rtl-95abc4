// gmsk_galois_demapper: receiving side of the Galois-numbered MSK signalling.
// Each received tone gives a data bit (F11/F12 -> 1, F21/F22 -> 0) and a
// numbering bit. The receiver runs the same two Galois sequences as the
// transmitter, stepping the ones' sequence on each received 1 and the zeros'
// sequence on each received 0, and flags num_err when the numbering bit of a
// tone differs from the expected one; err_count counts such tones. An error
// that turns a 1 into a 0 (or back) also shifts both sequences, so the
// following tones keep failing until the next packet start, which makes block
// errors visible. Correction of errors is not done.
// Timing: outputs registered, one clock after freq_valid.
module gmsk_galois_demapper
  import gmsk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,       // synchronous, active low
  input  logic        sof,         // with freq_valid: first tone of a packet
  input  logic        freq_valid,
  input  freq_t       freq,
  output logic        bit_valid,
  output logic        bit_out,
  output logic        num_err,     // numbering bit of this tone was wrong
  output logic [15:0] err_count
);
  logic d, g, e1, e0;

  assign d = (freq == F11) || (freq == F12);
  assign g = (freq == F11) || (freq == F21);

  galois_seq4 u_ones  (.clk(clk), .rst_n(rst_n), .restart(freq_valid && sof),
                       .adv(freq_valid && d), .out(e1));
  galois_seq4 u_zeros (.clk(clk), .rst_n(rst_n), .restart(freq_valid && sof),
                       .adv(freq_valid && !d), .out(e0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      num_err   <= 1'b0;
      err_count <= '0;
    end else begin
      bit_valid <= freq_valid;
      num_err   <= 1'b0;
      if (freq_valid) begin
        bit_out <= d;
        if (g != (d ? e1 : e0)) begin
          num_err   <= 1'b1;
          err_count <= err_count + 1'b1;
        end
      end
    end
  end
endmodule
