// ljpeg_host_model: behavioural host and scoreboard for simd_ljpeg_compressor.
//
// Plays the part of the host PC that feeds frames to the compressor. On a
// go pulse it starts one frame and answers every sample request in the same
// cycle with the upper-row and current-row samples of each unit's partition.
// Frames are synthetic, computed on the fly from the frame number and the
// coordinates: 16x16 tiles that are flat, planar ramps, ramps with a little
// noise, or pure noise, so that long zero runs, short runs and isolated
// values all occur.
// It checks the compressor three ways:
//   - every run pair of every unit against a reference model written here
//     (prediction with zero padding per partition, then run splitting at
//     2^CNT_W - 1);
//   - the frame is decoded back from the received pairs alone and compared
//     sample by sample with the source (lossless round trip);
//   - busy must last LAYERS*FRAME_H*(FRAME_W/NUM_PU+1)+1 clocks.
// It also counts how often each mechanism occurred (padding row and column
// slots, run continuation, split of a saturated run, break of a run, layer
// change) for the testbench to require. finished pulses when done was seen
// and the frame was checked.
module ljpeg_host_model #(
  parameter int NUM_PU  = 4,
  parameter int FRAME_H = 480,
  parameter int FRAME_W = 640,
  parameter int CNT_W   = 3,
  parameter int LW      = 2,
  parameter int RW      = 9,
  parameter int CW      = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  int                frame_no,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  input  logic              req,
  input  logic [LW-1:0]     req_layer,
  input  logic [RW-1:0]     req_row,
  input  logic [CW-1:0]     req_col,
  output logic [7:0]        din1    [NUM_PU],
  output logic [7:0]        din2    [NUM_PU],
  input  logic [8:0]        dout    [NUM_PU],
  input  logic [CNT_W-1:0]  counter [NUM_PU],
  input  logic              last    [NUM_PU],
  output logic              finished,
  output int                checks,
  output int                failures,
  output int                busy_cycles,
  output longint            pair_count,
  output int                n_pad_row,
  output int                n_pad_col,
  output int                n_split,
  output int                n_break,
  output int                n_layer_change
);
  localparam int PART_W  = FRAME_W / NUM_PU;
  localparam int LAYERS  = 3;
  localparam int MAXC    = (1 << CNT_W) - 1;

  // ---------------------------------------------------------------- source
  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16); x = x * 32'h7feb352d;
    x = x ^ (x >> 15); x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int pixel(int f, int l, int r, int c);
    int unsigned t, n;
    int base, gx, gy, v;
    t = mix(f * 7919 + l * 104729 + (r / 16) * 1299709 + (c / 16) * 15485863);
    n = mix(t ^ (r * 65536 + c));
    base = int'(t[7:0]);
    gx = int'(t[9:8]);
    gy = int'(t[11:10]);
    case (t[14:12])
      0, 1, 2: v = base;                                     // flat
      3, 4:    v = base + gx * (r % 16) + gy * (c % 16);     // planar ramp
      5, 6:    v = base + gx * (r % 16) + int'(n[1:0] == 0); // ramp + noise
      default: v = int'(n[7:0]);                             // noise
    endcase
    return v & 255;
  endfunction

  int cur_frame;

  always_comb begin
    for (int k = 0; k < NUM_PU; k++) begin
      int gc;
      gc = k * PART_W + int'(req_col);
      din2[k] = 8'(pixel(cur_frame, int'(req_layer), int'(req_row), gc));
      din1[k] = (req_row == 0) ? (8'hA5 ^ 8'(req_col)) // ignored by the design
                               : 8'(pixel(cur_frame, int'(req_layer), int'(req_row) - 1, gc));
    end
  end

  // --------------------------------------------------------------- reference
  int exp_v [NUM_PU][$];
  int exp_c [NUM_PU][$];
  int got_v [NUM_PU][$];
  int got_c [NUM_PU][$];

  function automatic int nb(int f, int l, int r, int c);
    // neighbour inside the partition, zero in the padding
    return (r < 0 || c < 0) ? 0 : pixel(f, l, r, c);
  endfunction

  task automatic build_reference(int f);
    for (int k = 0; k < NUM_PU; k++) begin
      int rv, rc;
      bit open;
      exp_v[k].delete(); exp_c[k].delete();
      got_v[k].delete(); got_c[k].delete();
      open = 0; rv = 0; rc = 0;
      for (int l = 0; l < LAYERS; l++)
        for (int r = 0; r < FRAME_H; r++)
          for (int c = 0; c < PART_W; c++) begin
            int g, x, a, b, cc, p;
            g = k * PART_W;
            x  = pixel(f, l, r, g + c);
            a  = (c == 0) ? 0 : pixel(f, l, r, g + c - 1);
            b  = (r == 0) ? 0 : pixel(f, l, r - 1, g + c);
            cc = (c == 0 || r == 0) ? 0 : pixel(f, l, r - 1, g + c - 1);
            p  = (x - (a + b - cc)) & 511;
            if (open && p == rv && rc < MAXC) rc++;
            else begin
              if (open) begin exp_v[k].push_back(rv); exp_c[k].push_back(rc); end
              open = 1; rv = p; rc = 1;
            end
          end
      if (open) begin exp_v[k].push_back(rv); exp_c[k].push_back(rc); end
    end
  endtask

  // decode the received pairs of every unit and compare with the source
  int rec [LAYERS][FRAME_H][PART_W];

  task automatic decode_and_compare(int f);
    int bad;
    bad = 0;
    for (int k = 0; k < NUM_PU; k++) begin
      int qi, left;
      qi = 0; left = 0;
      for (int l = 0; l < LAYERS; l++)
        for (int r = 0; r < FRAME_H; r++)
          for (int c = 0; c < PART_W; c++) begin
            int p, a, b, cc, x;
            if (left == 0) begin
              if (qi < got_v[k].size()) begin
                left = got_c[k][qi];
                qi++;
              end else begin
                left = 1; // stream too short: reconstruct garbage
              end
            end
            p = (qi > 0) ? got_v[k][qi-1] : 0;
            left--;
            a  = (c == 0) ? 0 : rec[l][r][c-1];
            b  = (r == 0) ? 0 : rec[l][r-1][c];
            cc = (c == 0 || r == 0) ? 0 : rec[l][r-1][c-1];
            x  = (p + a + b - cc) & 255;
            rec[l][r][c] = x;
            if (x != pixel(f, l, r, k * PART_W + c)) bad++;
          end
      checks++;
      if (qi != got_v[k].size()) begin
        failures++; $display("unit %0d: %0d pairs left after decoding", k, got_v[k].size() - qi);
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("decoded frame differs in %0d samples", bad); end
  endtask

  // ------------------------------------------------------------- scoreboard
  bit running;
  logic [LW-1:0] prev_layer;

  always @(posedge clk) begin
    if (rst_n && running) begin
      if (busy) busy_cycles++;
      if (busy && !req) n_pad_col++;
      if (req && req_row == 0) n_pad_row++;
      if (req && req_layer != prev_layer) n_layer_change++;
      if (req) prev_layer <= req_layer;
      for (int k = 0; k < NUM_PU; k++) if (last[k]) begin
        pair_count++;
        got_v[k].push_back(int'(dout[k]));
        got_c[k].push_back(int'(counter[k]));
        if (int'(counter[k]) == MAXC) n_split++; else n_break++;
        checks++;
        if (exp_v[k].size() == 0) begin
          failures++; $display("unit %0d: unexpected pair (%0d,%0d)", k, dout[k], counter[k]);
        end else begin
          int ev, ec;
          ev = exp_v[k].pop_front(); ec = exp_c[k].pop_front();
          if (int'(dout[k]) != ev || int'(counter[k]) != ec) begin
            failures++;
            if (failures < 10)
              $display("unit %0d: pair (%0d,%0d), expected (%0d,%0d)", k, dout[k], counter[k], ev, ec);
          end
        end
      end
    end
  end

  initial begin
    start = 0; finished = 0; running = 0;
    checks = 0; failures = 0; busy_cycles = 0; pair_count = 0;
    n_pad_row = 0; n_pad_col = 0; n_split = 0; n_break = 0; n_layer_change = 0;
    cur_frame = 0; prev_layer = '0;
    forever begin
      @(posedge clk);
      if (go) begin
        int bc0, expected;
        finished <= 0;
        cur_frame = frame_no;
        build_reference(frame_no);
        bc0 = busy_cycles;
        running = 1;
        start <= 1;
        @(posedge clk);
        start <= 0;
        @(posedge clk);
        while (!done) @(posedge clk);
        @(posedge clk);
        running = 0;
        expected = LAYERS * FRAME_H * (PART_W + 1) + 1;
        checks++;
        if (busy_cycles - bc0 != expected) begin
          failures++; $display("frame took %0d clocks, expected %0d", busy_cycles - bc0, expected);
        end
        for (int k = 0; k < NUM_PU; k++) begin
          checks++;
          if (exp_v[k].size() != 0) begin failures++; $display("unit %0d: %0d pairs missing", k, exp_v[k].size()); end
        end
        decode_and_compare(frame_no);
        finished <= 1;
        @(posedge clk);
        finished <= 0;
      end
    end
  end
endmodule
