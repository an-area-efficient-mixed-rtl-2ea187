// pe_array: ROWS x COLS output-stationary systolic array of mixed-precision PEs
// with its edge decoders.
//
// Weights enter at the left, one 8-bit buffer word per row per cycle, and move
// right through the PEs of that row; activations enter at the top, one word
// per column per cycle, and move down. PE(r,c) accumulates, over K cycles, the
// dot product of the weight stream of row r with the activation stream of
// column c. In the 4-bit modes each weight word is a packed pair of INT4
// weights, so every PE holds two 16-bit dot products (two output channels for
// one activation column); in the 8x8 modes it holds one 32-bit dot product.
//
// The raw words are first skewed, row r by r cycles and column c by c cycles,
// so that the k-th weight and k-th activation meet in PE(r,c) at cycle
// k + r + c after they were presented. A word whose in_valid is low enters as
// zero, which every decoder maps to magnitude zero, so idle and draining
// cycles add nothing. After the skew, one operand_decoder per row (weight
// side) and one per column (activation side) converts the words according to
// dmode and feeds the edge PEs.
//
// Timing: a word pair presented (in_valid high) in cycle t has been
// accumulated into PE(r,c) at the clock edge ending cycle t + r + c. clear
// zeroes all accumulators on the next edge. dmode must stay constant while
// data is in flight.
// The 48 x 64 size, the edge decoders (48 on the weight side, 64 on the
// activation side) and the buffer placement (weights at the left, activations
// at the top) follow the design description and figure. The output-stationary
// dataflow, the right/down movement of the operands and the input skew are
// this design's choices.
module pe_array
  import mpa_pkg::*;
#(
  parameter int unsigned ROWS = 48,
  parameter int unsigned COLS = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  dmode_e                     dmode,
  input  logic                       in_valid,
  input  logic [ROWS-1:0][7:0]       wgt_word,   // one word per row
  input  logic [COLS-1:0][7:0]       act_word,   // one word per column
  output logic [31:0]                acc [ROWS][COLS]
);

  logic [ROWS-1:0][7:0] wgt_skewed;
  logic [COLS-1:0][7:0] act_skewed;

  dec_op_t w_edge [ROWS];
  dec_op_t a_edge [COLS];

  // operands between PEs: w_bus[r][c] enters PE(r,c) from the left,
  // a_bus[r][c] enters PE(r,c) from above
  dec_op_t w_bus [ROWS][COLS+1];
  dec_op_t a_bus [ROWS+1][COLS];

  logic mode8;
  assign mode8 = is_8x8(dmode);

  // ---------------- input skew and row decoders (weights) ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row_in
    if (r == 0) begin : g_nodly
      assign wgt_skewed[r] = in_valid ? wgt_word[r] : 8'd0;
    end else begin : g_dly
      logic [7:0] sr [r];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < r; i++) sr[i] <= 8'd0;
        end else begin
          sr[0] <= in_valid ? wgt_word[r] : 8'd0;
          for (int i = 1; i < r; i++) sr[i] <= sr[i-1];
        end
      end
      assign wgt_skewed[r] = sr[r-1];
    end

    operand_decoder #(.IS_WEIGHT(1'b1)) u_wdec (
      .dmode (dmode),
      .data  (wgt_skewed[r]),
      .op    (w_edge[r])
    );
    assign w_bus[r][0] = w_edge[r];
  end

  // ---------------- input skew and column decoders (activations) --------
  for (genvar c = 0; c < COLS; c++) begin : g_col_in
    if (c == 0) begin : g_nodly
      assign act_skewed[c] = in_valid ? act_word[c] : 8'd0;
    end else begin : g_dly
      logic [7:0] sr [c];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < c; i++) sr[i] <= 8'd0;
        end else begin
          sr[0] <= in_valid ? act_word[c] : 8'd0;
          for (int i = 1; i < c; i++) sr[i] <= sr[i-1];
        end
      end
      assign act_skewed[c] = sr[c-1];
    end

    operand_decoder #(.IS_WEIGHT(1'b0)) u_adec (
      .dmode (dmode),
      .data  (act_skewed[c]),
      .op    (a_edge[c])
    );
    assign a_bus[0][c] = a_edge[c];
  end

  // ---------------- PE grid ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      mp_pe u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .clear (clear),
        .mode8 (mode8),
        .a_in  (a_bus[r][c]),
        .w_in  (w_bus[r][c]),
        .a_out (a_bus[r+1][c]),
        .w_out (w_bus[r][c+1]),
        .acc   (acc[r][c])
      );
    end
  end

endmodule
