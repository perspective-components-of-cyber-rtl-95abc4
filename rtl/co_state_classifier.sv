// co_state_classifier: state of a monitored control object (CO) for the
// operator's image-cluster display. Samples of one CO parameter are averaged
// over blocks of 2**AVG_LOG2 samples to give the selective mean M_x, which is
// compared with the norm setting M_x*:
//   |M_x - M_x*| <= tol   -> NORMAL    (M_x = M_x*, tol = 0 means exact)
//   |M_x - M_x*| <= eps   -> ABNORMAL  (M_x inside the eps neighbourhood)
//   otherwise             -> BREAKDOWN (M_x outside the neighbourhood)
// The three classes and the neighbourhood test follow the document's image-
// cluster model; the block mean, the tolerance input and the widths are this
// design's choices. The class is renewed once per block, which sets the
// display's renewal period (the document asks for 0.2..0.8 s).
// Timing: state_valid pulses one clock after the last sample of a block;
// state and mean hold until the next block ends.
module co_state_classifier #(
  parameter int unsigned DW       = 16,   // sample width, unsigned
  parameter int unsigned AVG_LOG2 = 3     // block of 8 samples
) (
  input  logic          clk,
  input  logic          rst_n,            // synchronous, active low
  input  logic          x_valid,
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] m_star,           // norm setting M_x*
  input  logic [DW-1:0] tol,              // normal tolerance
  input  logic [DW-1:0] eps,              // abnormal neighbourhood radius
  output logic          state_valid,
  output logic [1:0]    state,            // 0 NORMAL, 1 ABNORMAL, 2 BREAKDOWN
  output logic [DW-1:0] mean
);
  localparam logic [1:0] NORMAL = 2'd0, ABNORMAL = 2'd1, BREAKDOWN = 2'd2;

  logic [DW+AVG_LOG2-1:0] sum, sum_next;
  logic [AVG_LOG2-1:0]    cnt;
  logic [DW-1:0]          m_new, dev;

  always_comb begin
    sum_next = sum + (DW+AVG_LOG2)'(x);
    m_new    = DW'(sum_next >> AVG_LOG2);
    dev      = (m_new >= m_star) ? m_new - m_star : m_star - m_new;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum         <= '0;
      cnt         <= '0;
      state_valid <= 1'b0;
      state       <= NORMAL;
      mean        <= '0;
    end else begin
      state_valid <= 1'b0;
      if (x_valid) begin
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          sum         <= '0;
          mean        <= m_new;
          state_valid <= 1'b1;
          state       <= (dev <= tol) ? NORMAL : (dev <= eps) ? ABNORMAL : BREAKDOWN;
        end else sum <= sum_next;
      end
    end
  end
endmodule
