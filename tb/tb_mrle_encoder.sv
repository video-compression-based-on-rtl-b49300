// tb_mrle_encoder: self-checking test of the modified run-length encoder.
//
// Feeds the worked example sequence 83, 0 x9, 3, 0 x9, 12, 0 x4 and expects
// (83,1) (0,7) (0,2) (3,1) (0,7) (0,2) (12,1) (0,4), then random streams
// with gaps between valid samples and long runs, compared pair by pair with
// a run-length model written here. Each pair must leave one clock after the
// input that closed it.
module tb_mrle_encoder;
  import ljpeg_pkg::*;
  localparam int CNT_W = 3;
  localparam int MAXC  = (1 << CNT_W) - 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_eof = 0;
  pred_t in_data = '0;
  pred_t dout;
  logic [CNT_W-1:0] counter;
  logic last, out_eof;
  int checks = 0, failures = 0;

  mrle_encoder dut (.*);

  always #5 clk = ~clk;

  // expected pairs, {value, count}
  int exp_v[$], exp_c[$];
  bit ref_open = 0; int ref_v = 0, ref_c = 0;
  int eof_seen = 0;
  int close_cycle[$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic model_push(int v);
    if (ref_open && v == ref_v && ref_c < MAXC) ref_c++;
    else begin
      if (ref_open) begin exp_v.push_back(ref_v); exp_c.push_back(ref_c); close_cycle.push_back(cyc); end
      ref_open = 1; ref_v = v; ref_c = 1;
    end
  endtask

  task automatic model_eof();
    if (ref_open) begin exp_v.push_back(ref_v); exp_c.push_back(ref_c); close_cycle.push_back(cyc); end
    ref_open = 0;
  endtask

  task automatic send(int v);
    in_valid <= 1; in_eof <= 0; in_data <= pred_t'(v);
    model_push(v);
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 0; in_eof <= 0;
    repeat (n) @(posedge clk);
  endtask

  task automatic send_eof();
    in_valid <= 0; in_eof <= 1;
    model_eof();
    @(posedge clk);
  endtask

  // output checker
  always @(posedge clk) if (rst_n) begin
    if (last) begin
      checks++;
      if (exp_v.size() == 0) begin
        failures++; $display("unexpected pair (%0d,%0d)", dout, counter);
      end else begin
        int ev, ec, cc;
        ev = exp_v.pop_front(); ec = exp_c.pop_front(); cc = close_cycle.pop_front();
        if (dout !== pred_t'(ev) || counter !== CNT_W'(ec)) begin
          failures++; $display("pair mismatch: got (%0d,%0d) expected (%0d,%0d)", dout, counter, ev, ec);
        end
        checks++;
        // the input is presented in clock cc and sampled at the end of clock
        // cc + 1; the pair must be on the outputs right after that edge
        if (cyc != cc + 2) begin
          failures++; $display("pair latency %0d, expected 2", cyc - cc);
        end
      end
    end
    if (out_eof) eof_seen++;
  end

  int example[25] = '{83,0,0,0,0,0,0,0,0,0,3,0,0,0,0,0,0,0,0,0,12,0,0,0,0};
  int ex_v[8] = '{83,0,0,3,0,0,12,0};
  int ex_c[8] = '{1,7,2,1,7,2,1,4};

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // worked example: check the model agrees with the printed result first
    foreach (example[i]) send(example[i]);
    send_eof();
    idle(3);
    // random streams: small alphabet so that runs, long runs and splits occur
    for (int f = 0; f < 20; f++) begin
      int n;
      n = 50 + $urandom_range(0, 300);
      for (int i = 0; i < n; i++) begin
        int v;
        case ($urandom_range(0, 3))
          0: v = $urandom_range(0, 511);
          default: v = (ref_open && $urandom_range(0, 9) < 8) ? ref_v : $urandom_range(0, 2);
        endcase
        send(v);
        if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 3));
      end
      send_eof();
      idle($urandom_range(1, 3));
    end
    idle(3);
    checks++;
    if (exp_v.size() != 0) begin failures++; $display("%0d pairs never emitted", exp_v.size()); end
    checks++;
    if (ex_k != 8) begin failures++; $display("example gave %0d pairs", ex_k); end
    checks++;
    if (eof_seen != 21) begin failures++; $display("out_eof seen %0d times, expected 21", eof_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the printed example is checked separately against the printed pairs
  int ex_k = 0;
  initial begin : example_check
    int k;
    k = 0;
    @(posedge rst_n);
    while (k < 8) begin
      @(posedge clk);
      if (last) begin
        checks++;
        if (dout !== pred_t'(ex_v[k]) || counter !== CNT_W'(ex_c[k])) begin
          failures++; $display("example pair %0d: got (%0d,%0d)", k, dout, counter);
        end
        k++;
        ex_k = k;
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
