// adc_comparator_line: BEHAVIOURAL MODEL of the resistor ladder and the
// comparator line of the parallel (flash) ADC. It stands in for an analog part.
// The analog input is given as an unsigned VW-bit sample u of the voltage, with
// full scale 2**VW. The ladder divides full scale into LEVELS equal steps;
// comparator j (j = 1..LEVELS-1) trips when u >= j * 2**VW / LEVELS. Each
// comparator is paraphase: it drives its direct output cmp_p[j] and its
// inverse cmp_n[j], which the AND-NOT line of the encoder uses instead of
// separate inverters. The comparators are ideal and have no delay.
// Index 0 of both outputs is unused and held at cmp_p[0] = 1, cmp_n[0] = 0.
module adc_comparator_line #(
  parameter int unsigned LEVELS = 8,     // output levels 0..LEVELS-1 (Fig. 1: 8)
  parameter int unsigned VW     = 16     // width of the analog sample
) (
  input  logic [VW-1:0]     u,           // analog input voltage as a sample
  output logic [LEVELS-1:0] cmp_p,       // direct comparator outputs
  output logic [LEVELS-1:0] cmp_n        // inverse comparator outputs
);
  localparam longint unsigned FS = 64'd1 << VW;

  always_comb begin
    cmp_p[0] = 1'b1;
    for (int unsigned j = 1; j < LEVELS; j++)
      cmp_p[j] = (64'(u) * 64'(LEVELS)) >= (64'(j) * FS);
    cmp_n = ~cmp_p;
  end
endmodule
