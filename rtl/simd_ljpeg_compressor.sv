// simd_ljpeg_compressor: SIMD lossless-JPEG video frame compressor.
//
// A frame of LAYERS colour layers (Y, Cr, Cb), each FRAME_H x FRAME_W 8-bit
// samples, is cut vertically into NUM_PU equal partitions of
// PART_W = FRAME_W / NUM_PU columns. One pre-processing controller scans a
// padded partition (zero row on top, zero column on the left) and all
// NUM_PU processing units follow the same scan in lock step, each on its own
// partition: single control, multiple data. Each unit predicts every sample
// from its left, upper and upper-left neighbours and run-length codes the
// 9-bit differences with a 3-bit repetition counter.
//
// Interface:
//   start/busy/done  start a frame while idle; busy covers the scan;
//                    done pulses when the last run pair of the frame leaves.
//   req, req_layer, req_row, req_col
//                    sample request; while req is high the source must drive
//                    in the same cycle, for every unit k,
//                      din2[k] = layer[req_layer][req_row    ][k*PART_W + req_col]
//                      din1[k] = layer[req_layer][req_row - 1][k*PART_W + req_col]
//                    (din1 is ignored on row 0).
//   dout[k], counter[k], last[k]
//                    run pairs of unit k; a pair is valid while last[k] = 1.
// Timing: busy lasts LAYERS*FRAME_H*(PART_W+1) + 1 clocks: one clock per
// sample, one padding clock per partition row and one end-of-frame clock,
// which reproduces the original design's 923041 / 462241 / 231841 clocks for a
// 480x640 YCrCb frame on 1 / 2 / 4 units. done comes four
// clocks after the last busy clock (pipeline depth). A new start is accepted once busy is low.
// The partitioning, padding and unit structure follow the original design; the
// request interface, the shared controller and the done timing are this
// design's own.
module simd_ljpeg_compressor
  import ljpeg_pkg::*;
#(
  parameter int unsigned NUM_PU  = 4,
  parameter int unsigned FRAME_H = 480,
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned CNT_W   = 3,
  localparam int unsigned PART_W = FRAME_W / NUM_PU
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic                            req,
  output logic [$clog2(LAYERS+1)-1:0]     req_layer,
  output logic [$clog2(FRAME_H+1)-1:0]    req_row,
  output logic [$clog2(PART_W+1)-1:0]     req_col,
  input  pix_t                            din1    [NUM_PU],
  input  pix_t                            din2    [NUM_PU],
  output pred_t                           dout    [NUM_PU],
  output logic [CNT_W-1:0]                counter [NUM_PU],
  output logic                            last    [NUM_PU]
);
  logic slot, pad_row, pad_col, eof, scan_done;
  logic pu_eof [NUM_PU];

  preproc_ctrl #(
    .FRAME_H(FRAME_H),
    .PART_W (PART_W),
    .LAYERS (LAYERS)
  ) u_ctrl (
    .clk, .rst_n,
    .start,
    .busy,
    .done     (scan_done),
    .slot,
    .pad_row,
    .pad_col,
    .req,
    .eof,
    .req_layer,
    .req_row,
    .req_col
  );

  for (genvar k = 0; k < NUM_PU; k++) begin : g_pu
    ljpeg_pu #(.CNT_W(CNT_W)) u_pu (
      .clk, .rst_n,
      .slot,
      .pad_row,
      .pad_col,
      .eof,
      .din1   (din1[k]),
      .din2   (din2[k]),
      .dout   (dout[k]),
      .counter(counter[k]),
      .last   (last[k]),
      .out_eof(pu_eof[k])
    );
  end

  // All units run the same scan, so they finish together.
  assign done = pu_eof[0];

  // The frame is done three clocks after the controller's own done pulse.
  a_done_timing: assert property (@(posedge clk) disable iff (!rst_n)
    scan_done |-> ##3 done);

  for (genvar k = 1; k < NUM_PU; k++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      pu_eof[k] == pu_eof[0]);
  end

  initial begin
    assert (FRAME_W % NUM_PU == 0)
      else $error("FRAME_W must be a multiple of NUM_PU");
  end
endmodule
