// tb_ljpeg_pu: self-checking test of one processing unit (predictor + RLE).
//
// Drives small three-layer images through the unit in the controller's scan
// order (one padding column per row, top row bordering the padding row,
// one end-of-frame slot) and compares the run pairs with a reference model:
// P = X - (A + B - C) mod 512 with zero neighbours outside the image, then
// runs of equal P split at 7. Images mix flat areas (long zero runs) with
// noise. The final pair and out_eof must leave four clocks after the eof slot.
module tb_ljpeg_pu;
  import ljpeg_pkg::*;
  localparam int H = 7, W = 12, L = 3, CNT_W = 3, MAXC = 7, FRAMES = 3;

  logic clk = 0, rst_n = 0;
  logic slot = 0, pad_row = 0, pad_col = 0, eof = 0;
  pix_t din1 = '0, din2 = '0;
  pred_t dout;
  logic [CNT_W-1:0] counter;
  logic last, out_eof;
  int checks = 0, failures = 0;

  ljpeg_pu dut (.*);

  always #5 clk = ~clk;

  int img [L][H][W];
  int exp_v[$], exp_c[$];
  int cyc = 0, eof_cyc = -1, n_split = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int px(int l, int r, int c);
    return (r < 0 || c < 0) ? 0 : img[l][r][c];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (last) begin
      checks++;
      if (int'(counter) == MAXC) n_split++;
      if (exp_v.size() == 0) begin failures++; $display("unexpected pair"); end
      else begin
        int ev, ec;
        ev = exp_v.pop_front(); ec = exp_c.pop_front();
        if (dout !== pred_t'(ev) || counter !== CNT_W'(ec)) begin
          failures++; $display("pair (%0d,%0d) expected (%0d,%0d)", dout, counter, ev, ec);
        end
      end
    end
    if (out_eof) begin
      checks++;
      if (!last || cyc != eof_cyc + 5) begin failures++; $display("eof/final pair timing"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      bit open; int rv, rc;
      for (int l = 0; l < L; l++)
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++)
            img[l][r][c] = (c < W / 2 && f != 2) ? 40 + l : $urandom_range(0, 3) * 85;
      open = 0; rv = 0; rc = 0;
      for (int l = 0; l < L; l++)
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++) begin
            int p;
            p = (img[l][r][c] - (px(l, r, c-1) + px(l, r-1, c) - px(l, r-1, c-1))) & 511;
            if (open && p == rv && rc < MAXC) rc++;
            else begin
              if (open) begin exp_v.push_back(rv); exp_c.push_back(rc); end
              open = 1; rv = p; rc = 1;
            end
          end
      exp_v.push_back(rv); exp_c.push_back(rc);
      for (int l = 0; l < L; l++)
        for (int r = 0; r < H; r++)
          for (int cp = 0; cp <= W; cp++) begin
            slot <= 1; eof <= 0;
            pad_col <= (cp == 0);
            pad_row <= (r == 0);
            din1 <= (cp == 0 || r == 0) ? 8'hFF : pix_t'(img[l][r-1][cp-1]);
            din2 <= (cp == 0) ? 8'hFF : pix_t'(img[l][r][cp-1]);
            @(posedge clk);
          end
      slot <= 0; pad_col <= 0; pad_row <= 0; eof <= 1;
      eof_cyc = cyc;
      @(posedge clk);
      eof <= 0;
      repeat (6) @(posedge clk);
      checks++;
      if (exp_v.size() != 0) begin failures++; $display("%0d pairs missing", exp_v.size()); exp_v.delete(); exp_c.delete(); end
    end
    checks++;
    if (n_split == 0) begin failures++; $display("no run reached the counter limit"); end
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
