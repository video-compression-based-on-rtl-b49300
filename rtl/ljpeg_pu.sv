// ljpeg_pu: one SIMD processing unit, the prediction circuit followed by the
// modified RLE encoder.
//
// It receives, one column per clock, the current-row sample (src2) and the
// sample above it (src1) of its own partition, together with the slot flags
// of the shared pre-processing controller, and emits (dout, counter, last)
// run pairs. The unit holds no frame memory: all neighbours come from the
// two input streams and the one-column delay inside the predictor.
// Timing: a pixel slot reaches the encoder three clocks after it is
// presented; its run pair leaves at the earliest one clock later. out_eof
// pulses four clocks after the eof slot, with the final pair of the frame.
// The composition is the original design's; the flag signals are this design's.
module ljpeg_pu
  import ljpeg_pkg::*;
#(
  parameter int unsigned CNT_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot,
  input  logic             pad_row,
  input  logic             pad_col,
  input  logic             eof,
  input  pix_t             din1,
  input  pix_t             din2,
  output pred_t            dout,
  output logic [CNT_W-1:0] counter,
  output logic             last,
  output logic             out_eof
);
  logic  p_valid, p_eof;
  pred_t p_data;

  predictor u_pred (
    .clk, .rst_n,
    .in_slot  (slot),
    .pad_row,
    .pad_col,
    .in_eof   (eof),
    .src1     (din1),
    .src2     (din2),
    .out_valid(p_valid),
    .out_eof  (p_eof),
    .i_d      (p_data)
  );

  mrle_encoder #(.CNT_W(CNT_W)) u_rle (
    .clk, .rst_n,
    .in_valid(p_valid),
    .in_data (p_data),
    .in_eof  (p_eof),
    .dout,
    .counter,
    .last,
    .out_eof
  );
endmodule
