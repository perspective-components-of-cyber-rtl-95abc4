// hk_code_register: D-trigger register memory of the H-K special processor.
// Stores the code present at d on the rising clock edge where the
// synchronisation strobe sx is high and holds it otherwise. The document gives
// the strobe (synchronisation bus S_x) and the D-triggers; the synchronous
// active-low reset to all-zero is this design's choice.
module hk_code_register #(
  parameter int unsigned WIDTH = 41      // 8+9+11+13 lines of the default moduli
) (
  input  logic             clk,
  input  logic             rst_n,        // synchronous, active low
  input  logic             sx,           // write strobe from the S_x bus
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (sx) q <= d;
  end
endmodule
