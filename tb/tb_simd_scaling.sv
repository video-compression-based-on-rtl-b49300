// tb_simd_scaling: the compressor at 480x640x3 in every configuration
// evaluated for it: 1, 2 and 4 processing units with the 3-bit counter, and
// one unit with repetition counters of 2 to 8 bits.
//
// All configurations compress the same synthetic frame side by side. Each
// is checked pair by pair against the reference model and by decoding the
// frame back (see ljpeg_host_model). The frame must take 923041, 462241
// and 231841 clocks on 1, 2 and 4 units: 3*480*(640/N+1)+1, one clock per
// sample, one padding clock per partition row, one end-of-frame clock. The
// counter width changes the output size but never the clock count. The
// compression ratio of each configuration (8-bit samples in, 9+CNT_W bits
// per pair out) is printed; it depends on the frame content.
module tb_simd_scaling;
  import ljpeg_pkg::*;
  localparam int NCFG = 9;
  localparam int CFG_N [NCFG] = '{1, 2, 4, 1, 1, 1, 1, 1, 1};
  localparam int CFG_C [NCFG] = '{3, 3, 3, 2, 4, 5, 6, 7, 8};
  localparam int FRAME_H = 480, FRAME_W = 640;

  logic clk = 0, rst_n = 0, go = 0;
  int checks = 0, failures = 0;
  logic   fin   [NCFG];
  int     hc    [NCFG], hf [NCFG], bc [NCFG];
  longint pairs [NCFG];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int N = CFG_N[i], C = CFG_C[i], PW = FRAME_W / N;
    logic start, busy, done, req;
    logic [$clog2(LAYERS+1)-1:0]  req_layer;
    logic [$clog2(FRAME_H+1)-1:0] req_row;
    logic [$clog2(PW+1)-1:0]      req_col;
    pix_t  din1 [N], din2 [N];
    pred_t dout [N];
    logic [C-1:0] counter [N];
    logic  last [N];
    int n0, n1, n2, n3, n4;

    simd_ljpeg_compressor #(.NUM_PU(N), .FRAME_H(FRAME_H), .FRAME_W(FRAME_W), .CNT_W(C)) dut (
      .clk, .rst_n, .start, .busy, .done, .req, .req_layer, .req_row, .req_col,
      .din1, .din2, .dout, .counter, .last
    );

    ljpeg_host_model #(
      .NUM_PU(N), .FRAME_H(FRAME_H), .FRAME_W(FRAME_W), .CNT_W(C),
      .LW($bits(req_layer)), .RW($bits(req_row)), .CW($bits(req_col))
    ) host (
      .clk, .rst_n, .go, .frame_no(7), .start, .busy, .done, .req, .req_layer,
      .req_row, .req_col, .din1, .din2, .dout, .counter, .last,
      .finished(fin[i]), .checks(hc[i]), .failures(hf[i]), .busy_cycles(bc[i]),
      .pair_count(pairs[i]), .n_pad_row(n0), .n_pad_col(n1), .n_split(n2),
      .n_break(n3), .n_layer_change(n4)
    );
  end

  int table_clocks [3] = '{923041, 462241, 231841};
  bit seen [NCFG];

  always @(posedge clk) for (int i = 0; i < NCFG; i++) if (fin[i]) seen[i] = 1;

  initial begin
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    go <= 1;
    @(posedge clk);
    go <= 0;
    forever begin
      int n;
      @(posedge clk);
      n = 0;
      foreach (seen[i]) n += int'(seen[i]);
      if (n == NCFG) break;
    end
    @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      real cr;
      cr = real'(3 * FRAME_H * FRAME_W * 8) / (real'(pairs[i]) * real'(PRED_W + CFG_C[i]));
      $display("units %0d counter %0d bits: %0d clocks, %0d pairs, ratio %f",
               CFG_N[i], CFG_C[i], bc[i], pairs[i], cr);
      checks += hc[i];
      failures += hf[i];
      checks++;
      if (i < 3 && bc[i] != table_clocks[i]) begin
        failures++; $display("expected %0d clocks", table_clocks[i]);
      end
      if (i >= 3 && bc[i] != table_clocks[0]) begin
        failures++; $display("counter width changed the clock count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
