// gmsk_galois_mapper: chooses the MSK tone for each data bit so that the ones
// and the zeros of a packet are each numbered by a recurrent Galois sequence.
// Two galois_seq4 generators run side by side: one steps on every data 1 and
// one on every data 0. A data 1 is sent on F11 when its numbering bit is 1 and
// on F12 when it is 0; a data 0 on F21 or F22 the same way. The tones carry
// both the data and a known numbering, which the receiver checks to find bit
// and block errors and to keep frame synchronisation.
// The tone rule and the numbering of ones and zeros follow the document; the
// degree-4 sequence, its start value and the sof restart are read from its
// example. Timing: freq is registered, one clock after bit_valid.
module gmsk_galois_mapper
  import gmsk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,        // synchronous, active low
  input  logic  sof,          // with bit_valid: first bit of a packet
  input  logic  bit_valid,
  input  logic  bit_in,
  output logic  freq_valid,
  output freq_t freq
);
  logic g1, g0;

  galois_seq4 u_ones  (.clk(clk), .rst_n(rst_n), .restart(bit_valid && sof),
                       .adv(bit_valid && bit_in), .out(g1));
  galois_seq4 u_zeros (.clk(clk), .rst_n(rst_n), .restart(bit_valid && sof),
                       .adv(bit_valid && !bit_in), .out(g0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      freq_valid <= 1'b0;
      freq       <= F22;
    end else begin
      freq_valid <= bit_valid;
      if (bit_valid)
        freq <= bit_in ? (g1 ? F11 : F12) : (g0 ? F21 : F22);
    end
  end
endmodule
