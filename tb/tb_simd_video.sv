// tb_simd_video: a whole video clip through the compressor at its default
// size: 300 frames of 480x640 YCrCb (10 s at 30 frames/s) on four units.
//
// Frames are started back to back, each as soon as the previous one is done.
// Every frame is checked by the host model (pairs against the reference,
// decode and compare, clock count). The bench also checks that the clip,
// at 231841 clocks per frame, fits in real time at a 50 MHz clock
// (300 * 231841 clocks = 1.39 s < 10 s) and prints the clip's overall
// compression ratio.
module tb_simd_video;
  import ljpeg_pkg::*;
  localparam int NUM_PU = 4, FRAME_H = 480, FRAME_W = 640, CNT_W = 3;
  localparam int PART_W = FRAME_W / NUM_PU;
  localparam int FRAMES = 300;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, req;
  logic [$clog2(LAYERS+1)-1:0]  req_layer;
  logic [$clog2(FRAME_H+1)-1:0] req_row;
  logic [$clog2(PART_W+1)-1:0]  req_col;
  pix_t  din1 [NUM_PU], din2 [NUM_PU];
  pred_t dout [NUM_PU];
  logic [CNT_W-1:0] counter [NUM_PU];
  logic  last [NUM_PU];

  logic go = 0, finished;
  int   frame_no = 0;
  int   h_checks, h_failures, busy_cycles;
  longint pair_count;
  int   n_pad_row, n_pad_col, n_split, n_break, n_layer_change;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_ljpeg_compressor dut (
    .clk, .rst_n, .start, .busy, .done, .req, .req_layer, .req_row, .req_col,
    .din1, .din2, .dout, .counter, .last
  );

  ljpeg_host_model #(
    .NUM_PU(NUM_PU), .FRAME_H(FRAME_H), .FRAME_W(FRAME_W), .CNT_W(CNT_W),
    .LW($bits(req_layer)), .RW($bits(req_row)), .CW($bits(req_col))
  ) host (
    .clk, .rst_n, .go, .frame_no, .start, .busy, .done, .req, .req_layer,
    .req_row, .req_col, .din1, .din2, .dout, .counter, .last, .finished,
    .checks(h_checks), .failures(h_failures), .busy_cycles, .pair_count,
    .n_pad_row, .n_pad_col, .n_split, .n_break, .n_layer_change
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      frame_no = 1000 + f;
      go <= 1;
      @(posedge clk);
      go <= 0;
      @(posedge finished);
      @(posedge clk);
    end
    checks++;
    if (busy_cycles != FRAMES * 231841) begin
      failures++; $display("clip took %0d clocks, expected %0d", busy_cycles, FRAMES * 231841);
    end
    checks++;
    // 50 MHz clock: 20 ns per clock; the clip lasts 10 s
    if (real'(busy_cycles) * 20.0e-9 >= 10.0) begin
      failures++; $display("clip does not compress in real time");
    end
    $display("frames %0d, clocks %0d (%f s at 50 MHz), pairs %0d, compression ratio %f",
             FRAMES, busy_cycles, real'(busy_cycles) * 20.0e-9, pair_count,
             real'(FRAMES) * real'(3 * FRAME_H * FRAME_W * 8) / (real'(pair_count) * real'(PRED_W + CNT_W)));
    checks += h_checks;
    failures += h_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (FRAMES * 232000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule
