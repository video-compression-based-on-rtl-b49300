// mrle_encoder: modified run-length encoder with a short repetition counter.
//
// Consecutive equal 9-bit predictive values are replaced by one
// (dout, counter) pair: dout is the value, counter the number of repeats.
// The counter is only CNT_W bits wide (3 in the original design), so a run longer
// than 2^CNT_W - 1 = 7 is split into several pairs; with the prediction in
// front, most runs are short and the narrow counter gives the better ratio.
// Example for CNT_W = 3: 83, 0 x9, 3 -> (83,1) (0,7) (0,2) (3,1).
//
// Registers follow the original design: I_temp holds the value of the open run,
// I_counter its length so far. For every valid input I_D:
//   - I_D equal to I_temp and I_counter below its maximum: I_counter + 1;
//   - otherwise: I_temp/I_counter are copied to dout/counter with last = 1,
//     and the run restarts with I_temp = I_D, I_counter = 1.
// An in_eof pulse closes the open run (if any) the same way and is echoed
// one clock later on out_eof, together with that final pair.
// Timing: one input per clock, no back-pressure; a pair appears on
// dout/counter/last one clock after the input that closed it. last is a
// one-clock strobe; dout and counter hold their value until the next one.
// The run-splitting rule comes from the original design's example; the empty-run
// flag and the eof input are this design's own.
module mrle_encoder
  import ljpeg_pkg::*;
#(
  parameter int unsigned CNT_W = 3   // repetition counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  pred_t            in_data,   // I_D
  input  logic             in_eof,
  output pred_t            dout,
  output logic [CNT_W-1:0] counter,
  output logic             last,
  output logic             out_eof
);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  pred_t            i_temp;
  logic [CNT_W-1:0] i_counter;
  logic             open_run;   // I_temp/I_counter hold a run

  wire same   = (in_data == i_temp);
  wire at_max = (i_counter == CNT_MAX);
  wire extend = in_valid && open_run && same && !at_max;
  wire emit   = open_run && ((in_valid && !extend) || in_eof);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_temp    <= '0;
      i_counter <= '0;
      open_run  <= 1'b0;
      dout      <= '0;
      counter   <= '0;
      last      <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      last    <= emit;
      out_eof <= in_eof;
      if (emit) begin
        dout    <= i_temp;
        counter <= i_counter;
      end
      if (extend) begin
        i_counter <= i_counter + CNT_W'(1);
      end else if (in_valid) begin
        i_temp    <= in_data;
        i_counter <= CNT_W'(1);
        open_run  <= 1'b1;
      end else if (in_eof) begin
        open_run  <= 1'b0;
      end
    end
  end

  // An emitted pair never has a zero count.
  a_count_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    last |-> (counter != '0));
  // The end-of-frame slot carries no sample.
  a_eof_alone: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_eof && in_valid));
endmodule
