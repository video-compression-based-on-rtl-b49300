// tb_predictor: self-checking test of the prediction circuit.
//
// Streams random H x W layers (with extreme values 0 and 255 mixed in, so
// that the 9-bit difference wraps) through the predictor in the scan order
// of the pre-processing controller: one zero padding column per row, the
// first row with its upper neighbour forced to zero. Each output is compared
// with X - (A + B - C) mod 512 computed here from the unpadded image with
// zero neighbours outside it, and must appear three clocks after its slot.
module tb_predictor;
  import ljpeg_pkg::*;
  localparam int H = 6, W = 9, FRAMES = 4;

  logic clk = 0, rst_n = 0;
  logic in_slot = 0, pad_row = 0, pad_col = 0, in_eof = 0;
  pix_t src1 = '0, src2 = '0;
  logic out_valid, out_eof;
  pred_t i_d;
  int checks = 0, failures = 0;

  predictor dut (.*);

  always #5 clk = ~clk;

  int img [H][W];
  int exp_q[$], exp_t[$];
  int eof_t[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int px(int r, int c);
    return (r < 0 || c < 0) ? 0 : img[r][c];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output %0d", i_d); end
      else begin
        int e, t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        if (i_d !== pred_t'(e)) begin failures++; $display("P mismatch: got %0d expected %0d", i_d, pred_t'(e)); end
        checks++;
        if (cyc != t + 4) begin failures++; $display("latency %0d", cyc - t); end
      end
    end
    if (out_eof) begin
      checks++;
      if (eof_t.size() == 0 || cyc != eof_t.pop_front() + 4) begin failures++; $display("eof timing"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int k;
          k = $urandom_range(0, 9);
          img[r][c] = (k == 0) ? 0 : (k == 1) ? 255 : $urandom_range(0, 255);
        end
      for (int r = 0; r < H; r++)
        for (int cp = 0; cp <= W; cp++) begin
          in_slot <= 1; in_eof <= 0;
          pad_col <= (cp == 0);
          pad_row <= (r == 0);
          // padding slots carry garbage on the inputs: it must be ignored
          src1 <= (cp == 0 || r == 0) ? pix_t'($urandom) : pix_t'(img[r-1][cp-1]);
          src2 <= (cp == 0) ? pix_t'($urandom) : pix_t'(img[r][cp-1]);
          if (cp > 0) begin
            int c, x, a, b, cc;
            c = cp - 1;
            x = img[r][c]; a = px(r, c-1); b = px(r-1, c); cc = px(r-1, c-1);
            exp_q.push_back((x - (a + b - cc)) & 511);
            exp_t.push_back(cyc);
          end
          @(posedge clk);
        end
      in_slot <= 0; pad_col <= 0; pad_row <= 0; in_eof <= 1;
      src1 <= pix_t'($urandom); src2 <= pix_t'($urandom);
      eof_t.push_back(cyc);
      @(posedge clk);
      in_eof <= 0;
      repeat (2 + f) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    checks++;
    if (eof_t.size() != 0) begin failures++; $display("eof missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
