// preproc_ctrl: pre-processing scan controller (zero padding of each layer).
//
// Walks one partition of a frame, layer by layer, with the two position
// registers row_p (1..FRAME_H) and col_p (1..PART_W+1). Column col_p = 1 is
// the zero padding column on the left of the partition; row_p = 1 is the
// first image row, whose upper neighbour row is the zero padding row. For
// every scan cycle it issues one slot to the processing units:
//   pad_col = (col_p == 1): both inputs are replaced by zero,
//   pad_row = (row_p == 1): the upper-row input (din1) is replaced by zero,
//   req     = !pad_col:     a real pixel is wanted; req_row/req_col give the
//             0-based row of the current pixel (din2) and its 0-based column
//             inside the partition; din1 is the same column one row higher.
// The register names and the zero-forcing rule follow the original design; the
// start/busy/done handshake and the extra end-of-frame slot are this design's.
//
// Timing: a start pulse while idle begins the scan on the next clock. busy
// then stays high for LAYERS*FRAME_H*(PART_W+1) scan cycles plus one eof
// cycle, which is the clock count published for one frame
// (e.g. 3*480*641+1 = 923041 with one unit). done pulses for one cycle on
// the clock after the eof cycle. The source must present the requested
// pixels combinationally in the cycle req is high.
module preproc_ctrl #(
  parameter int unsigned FRAME_H = 480,  // rows per layer
  parameter int unsigned PART_W  = 640,  // columns per partition (FRAME_W / NUM_PU)
  parameter int unsigned LAYERS  = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          slot,     // one scan slot this cycle
  output logic                          pad_row,
  output logic                          pad_col,
  output logic                          req,
  output logic                          eof,      // end-of-frame slot
  output logic [$clog2(LAYERS+1)-1:0]   req_layer,
  output logic [$clog2(FRAME_H+1)-1:0]  req_row,
  output logic [$clog2(PART_W+1)-1:0]   req_col
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_EOF} state_t;

  localparam int unsigned RW = $clog2(FRAME_H + 1);
  localparam int unsigned CW = $clog2(PART_W + 2);
  localparam int unsigned LW = $clog2(LAYERS + 1);

  state_t        state;
  logic [RW-1:0] row_p;
  logic [CW-1:0] col_p;
  logic [LW-1:0] layer;

  wire last_col   = (col_p == CW'(PART_W + 1));
  wire last_row   = (row_p == RW'(FRAME_H));
  wire last_layer = (layer == LW'(LAYERS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row_p <= RW'(1);
      col_p <= CW'(1);
      layer <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN;
          row_p <= RW'(1);
          col_p <= CW'(1);
          layer <= '0;
        end
        S_SCAN: begin
          if (!last_col) begin
            col_p <= col_p + CW'(1);
          end else begin
            col_p <= CW'(1);
            if (!last_row) begin
              row_p <= row_p + RW'(1);
            end else begin
              row_p <= RW'(1);
              if (!last_layer) layer <= layer + LW'(1);
              else             state <= S_EOF;
            end
          end
        end
        S_EOF: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign slot      = (state == S_SCAN);
  assign eof       = (state == S_EOF);
  assign pad_col   = slot && (col_p == CW'(1));
  assign pad_row   = slot && (row_p == RW'(1));
  assign req       = slot && !pad_col;
  assign req_layer = layer;
  assign req_row   = $bits(req_row)'(row_p - RW'(1));
  assign req_col   = $bits(req_col)'(col_p - CW'(2));

  // A pixel is only ever requested inside the partition.
  a_req_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    req |-> (req_col < $bits(req_col)'(PART_W)) && (req_row < $bits(req_row)'(FRAME_H)));
endmodule
