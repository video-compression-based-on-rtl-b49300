// tb_simd_ljpeg_compressor: end-to-end test of the SIMD compressor at its
// default size: four processing units on 480x640 frames of three layers.
//
// Two different frames are compressed back to back. For each, every run
// pair of every unit is compared with a reference model, the frame is
// decoded from the pairs alone and compared with the source, and the frame
// must take 3*480*(640/4+1)+1 = 231841 clocks. The test also requires that
// each mechanism of the design occurred: zero padding of the top row and of
// the left column, split of a run at the counter limit, break of a run on a
// new value, a layer change, and output from every unit.
module tb_simd_ljpeg_compressor;
  import ljpeg_pkg::*;
  localparam int NUM_PU = 4, FRAME_H = 480, FRAME_W = 640, CNT_W = 3;
  localparam int PART_W = FRAME_W / NUM_PU;

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
  int   unit_pairs [NUM_PU];

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

  always @(posedge clk)
    for (int k = 0; k < NUM_PU; k++) if (last[k]) unit_pairs[k]++;

  task automatic need(int n, string what);
    checks++;
    if (n <= 0) begin failures++; $display("mechanism never occurred: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    foreach (unit_pairs[k]) unit_pairs[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      frame_no = f + 1;
      go <= 1;
      @(posedge clk);
      go <= 0;
      @(posedge finished);
      @(posedge clk);
    end
    checks++;
    if (busy_cycles != 2 * 231841) begin
      failures++; $display("busy for %0d clocks over two frames, expected %0d", busy_cycles, 2 * 231841);
    end
    $display("run pairs: %0d, compression ratio %f", pair_count,
             real'(2 * 3 * FRAME_H * FRAME_W * 8) / (real'(pair_count) * real'(PRED_W + CNT_W)));
    need(n_pad_row, "top padding row slots");
    need(n_pad_col, "left padding column slots");
    need(n_split, "runs split at counter limit");
    need(n_break, "runs ended by a new value");
    need(n_layer_change, "layer changes");
    for (int k = 0; k < NUM_PU; k++) need(unit_pairs[k], $sformatf("pairs from unit %0d", k));
    checks += h_checks;
    failures += h_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule
