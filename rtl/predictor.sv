// predictor: lossless-JPEG prediction circuit of one processing unit.
//
// For the current sample X with left neighbour A, upper neighbour B and
// upper-left neighbour C it produces P = X - (A + B - C), the difference
// between the sample and its estimate X' = A + B - C. Two sample streams come
// in side by side: din2 carries the current row, din1 the row above it, one
// column per slot. The pipeline is that of the original design:
//   clock 1: din1/din2 capture the incoming pair (zero where the slot is
//            padding: pad_col zeroes both, pad_row zeroes din1);
//   clock 2: I_B <= din1, I_X <= din2, I_C <= I_B, I_A <= I_X, so after one
//            more column I_A/I_C hold the left-hand pair;
//   clock 3: I_D <= I_X - (I_A + I_B - I_C), 9 bits, modulo 512.
// The pipeline advances on every clock; the slot tags (real pixel, end of
// frame) travel beside the data, so out_valid is high three clocks after a
// non-padding slot and out_eof three clocks after the eof slot. Padding slots
// only refill the neighbour registers and give no output.
// Keeping I_D as the final difference follows the block diagram and the
// prose; the tag bits and the modulo-512 wrap are this design's.
module predictor
  import ljpeg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_slot,   // a scan slot (padding or pixel)
  input  logic  pad_row,   // force the upper-row sample to zero
  input  logic  pad_col,   // force both samples to zero
  input  logic  in_eof,    // end-of-frame marker slot
  input  pix_t  src1,      // sample of the row above (to din1)
  input  pix_t  src2,      // sample of the current row (to din2)
  output logic  out_valid, // I_D holds the difference of a real pixel
  output logic  out_eof,
  output pred_t i_d
);
  pix_t din1, din2;
  pix_t i_a, i_b, i_c, i_x;
  logic v0, v1, e0, e1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din1 <= '0; din2 <= '0;
      i_a  <= '0; i_b  <= '0; i_c <= '0; i_x <= '0;
      i_d  <= '0;
      v0 <= 1'b0; v1 <= 1'b0; out_valid <= 1'b0;
      e0 <= 1'b0; e1 <= 1'b0; out_eof   <= 1'b0;
    end else begin
      // input registers with zero padding
      din1 <= (pad_row || pad_col) ? '0 : src1;
      din2 <= pad_col ? '0 : src2;
      v0   <= in_slot && !pad_col;
      e0   <= in_eof;
      // neighbour window
      i_b <= din1;
      i_x <= din2;
      i_c <= i_b;
      i_a <= i_x;
      v1  <= v0;
      e1  <= e0;
      // ALU: X - (A + B - C), kept modulo 2^PRED_W
      i_d       <= PRED_W'(i_x) - (PRED_W'(i_a) + PRED_W'(i_b) - PRED_W'(i_c));
      out_valid <= v1;
      out_eof   <= e1;
    end
  end
endmodule
