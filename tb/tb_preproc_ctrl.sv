// tb_preproc_ctrl: self-checking test of the pre-processing scan controller.
//
// Starts two scans of a small partition and compares, cycle by cycle, the
// slot flags and pixel request coordinates with the expected raster order:
// per layer and row, one padding column slot, then PART_W pixel slots; the
// first row of every layer flagged as bordering the padding row; then one
// end-of-frame slot. busy must last LAYERS*FRAME_H*(PART_W+1)+1 clocks and
// done must pulse once right after.
module tb_preproc_ctrl;
  localparam int FRAME_H = 4, PART_W = 5, LAYERS = 3;
  localparam int SCAN = LAYERS * FRAME_H * (PART_W + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, slot, pad_row, pad_col, req, eof;
  logic [$clog2(LAYERS+1)-1:0]  req_layer;
  logic [$clog2(FRAME_H+1)-1:0] req_row;
  logic [$clog2(PART_W+1)-1:0]  req_col;
  int checks = 0, failures = 0;

  preproc_ctrl #(.FRAME_H(FRAME_H), .PART_W(PART_W), .LAYERS(LAYERS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    check(!busy && !slot && !req && !done, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      int n;
      start <= 1;
      @(posedge clk);
      start <= 0;
      #1;
      for (int l = 0; l < LAYERS; l++)
        for (int r = 0; r < FRAME_H; r++)
          for (int cp = 0; cp <= PART_W; cp++) begin
            check(busy && slot && !eof && !done, "slot flags");
            check(pad_col == (cp == 0), "pad_col");
            check(pad_row == (r == 0), "pad_row");
            check(req == (cp != 0), "req");
            if (cp != 0) begin
              check(int'(req_layer) == l && int'(req_row) == r && int'(req_col) == cp - 1, "coordinates");
            end
            @(posedge clk); #1;
          end
      check(busy && eof && !slot && !req, "eof slot");
      @(posedge clk); #1;
      check(!busy && done, "done after eof");
      @(posedge clk); #1;
      check(!done, "done is a pulse");
      // count busy length independently on the second run
      n = 0;
      if (run == 0) begin
        start <= 1; @(posedge clk); start <= 0; #1;
        while (busy) begin n++; @(posedge clk); #1; end
        check(n == SCAN + 1, $sformatf("busy length %0d", n));
        repeat (2) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
