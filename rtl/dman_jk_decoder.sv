// dman_jk_decoder: receiver for the differential Manchester line of
// dman_jk_encoder. Every bit time it reads the two half-bit levels and names
// the symbol: a change in the middle means data, and then a change at the
// start means 0 and none means 1; no change in the middle is a J (no change
// at the start) or a K (a change at the start) code violation. With DIFF = 0
// it reads plain Manchester data instead (high then low = 0, low then high =
// 1) with the same J/K rule.
// Outside a frame it slides an 8-symbol window over the line and starts a
// frame on the start delimiter J K 0 J K 0 0 0. Inside, it takes the symbols
// in groups of eight: eight data symbols are one byte (first symbol = most
// significant bit), the group J K 1 J K 1 1 1 ends the frame, and any other
// group holding a J or K is a framing error that drops the frame.
// The half-bit phase comes from the input first_half, high on the first
// half-bit sample of each bit time: clock recovery is outside this block.
// The decoding rules and delimiters follow the document; the byte grouping
// and error handling are this design's choices. Timing: outputs are
// registered, one clock after the second half-bit sample of the symbol that
// completes them.
module dman_jk_decoder
  import dman_pkg::*;
#(
  parameter bit DIFF = 1'b1           // 1: differential Manchester, 0: plain Manchester
) (
  input  logic       clk,            // half-bit clock
  input  logic       rst_n,          // synchronous, active low
  input  logic       line,
  input  logic       first_half,     // this sample is the first half of a bit
  output logic       sym_valid,
  output dsym_t      sym,
  output logic       frame_start,    // start delimiter found (pulse)
  output logic       frame_end,      // end delimiter found (pulse)
  output logic       frame_err,      // code violation inside data (pulse)
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       in_frame
);
  logic  f, prev;
  dsym_t s_now;
  dsym_t win [8];                    // win[7] is the newest symbol
  logic [2:0] cnt;

  always_comb begin
    logic mid, st;
    mid = (f != line);
    st  = (f != prev);
    if (DIFF) s_now = mid ? (st ? D0 : D1) : (st ? SK : SJ);
    else      s_now = mid ? (f ? D0 : D1) : (st ? SK : SJ);
  end

  function automatic logic match(input dsym_t w [8], input dsym_t p [8]);
    for (int i = 0; i < 8; i++) if (w[i] != p[i]) return 1'b0;
    return 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f           <= 1'b0;
      prev        <= 1'b0;
      sym_valid   <= 1'b0;
      sym         <= D1;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      frame_err   <= 1'b0;
      byte_valid  <= 1'b0;
      byte_data   <= '0;
      in_frame    <= 1'b0;
      cnt         <= '0;
      for (int i = 0; i < 8; i++) win[i] <= D1;
    end else begin
      sym_valid   <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      frame_err   <= 1'b0;
      byte_valid  <= 1'b0;
      if (first_half) f <= line;
      else begin
        dsym_t nw [8];
        prev      <= line;
        sym_valid <= 1'b1;
        sym       <= s_now;
        for (int i = 0; i < 7; i++) nw[i] = win[i+1];
        nw[7] = s_now;
        win <= nw;
        if (!in_frame) begin
          if (match(nw, SD)) begin
            in_frame    <= 1'b1;
            frame_start <= 1'b1;
            cnt         <= '0;
          end
        end else begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) begin
            logic all_data;
            all_data = 1'b1;
            for (int i = 0; i < 8; i++) if (nw[i] == SJ || nw[i] == SK) all_data = 1'b0;
            if (all_data) begin
              byte_valid <= 1'b1;
              for (int i = 0; i < 8; i++) byte_data[7-i] <= (nw[i] == D1);
            end else if (match(nw, ED)) begin
              frame_end <= 1'b1;
              in_frame  <= 1'b0;
            end else begin
              frame_err <= 1'b1;
              in_frame  <= 1'b0;
            end
          end
        end
      end
    end
  end
endmodule
