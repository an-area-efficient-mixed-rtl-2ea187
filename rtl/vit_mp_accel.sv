// vit_mp_accel: area-efficient mixed-precision linear-layer accelerator for
// Vision Transformers.
//
// A ROWS x COLS (48 x 64) array of mixed-precision PEs computes a tile of a
// linear layer (Q/K/V generation, projection, FC layers) in one of four
// d-modes: INT8 x INT8, INT4 x INT4, PoT4 x INT4 or PoT4 x PoT4 (see mpa_pkg).
// In the two 4-bit-weight modes each weight word carries two INT4 weights, so
// each PE yields two 16-bit results per tile and the array does twice the
// work per cycle.
//
// Structure: an activation buffer (one 8-bit word per column per address) and
// a weight buffer (one 8-bit word per row per address) feed the array through
// the controller; edge decoders inside pe_array convert the words by d-mode.
// Results stay in the PE accumulators and are read through a registered
// read port addressed by PE row and column.
//
// Operation:
//   1. Load K activation words and K weight words through the write ports.
//   2. Pulse start with dmode_in, k_len = K and the two base addresses.
//   3. done pulses K + ROWS + COLS cycles after start (busy meanwhile).
//   4. Read PE(r,c) with out_rd_en; out_rdata appears one cycle later:
//        8x8 modes : out_rdata            = sum_k W[r][k] * A[k][c] (32-bit)
//        4-bit modes: out_rdata[31:16]     = sum_k Whi[r][k] * A[k][c]
//                     out_rdata[15:0]      = sum_k Wlo[r][k] * A[k][c]
//      where Whi/Wlo are the INT4 weights in bits [7:4]/[3:0] of a weight word.
// The array size, PE, decoders and buffers follow the design description;
// the buffer depths (ACT 4096 x 64 B + WGT 5461 x 48 B, about 512 KB in all),
// the control sequence and the result read port are this design's choices.
module vit_mp_accel
  import mpa_pkg::*;
#(
  parameter int unsigned ROWS      = 48,
  parameter int unsigned COLS      = 64,
  parameter int unsigned ACT_DEPTH = 4096,
  parameter int unsigned WGT_DEPTH = 5461,
  parameter int unsigned KW        = 16,
  parameter int unsigned AW_ACT    = (ACT_DEPTH > 1) ? $clog2(ACT_DEPTH) : 1,
  parameter int unsigned AW_WGT    = (WGT_DEPTH > 1) ? $clog2(WGT_DEPTH) : 1,
  parameter int unsigned RW        = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CW        = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // activation buffer load port
  input  logic                 act_we,
  input  logic [AW_ACT-1:0]    act_waddr,
  input  logic [COLS-1:0][7:0] act_wdata,
  // weight buffer load port
  input  logic                 wgt_we,
  input  logic [AW_WGT-1:0]    wgt_waddr,
  input  logic [ROWS-1:0][7:0] wgt_wdata,
  // operation control
  input  logic                 start,
  input  logic [1:0]           dmode_in,
  input  logic [KW-1:0]        k_len,
  input  logic [AW_ACT-1:0]    act_base,
  input  logic [AW_WGT-1:0]    wgt_base,
  output logic                 busy,
  output logic                 done,
  // result read port
  input  logic                 out_rd_en,
  input  logic [RW-1:0]        out_row,
  input  logic [CW-1:0]        out_col,
  output logic [31:0]          out_rdata,
  output logic                 out_rvalid
);

  dmode_e               dmode;
  logic                 clear, rd_en, arr_valid;
  logic [AW_ACT-1:0]    act_raddr;
  logic [AW_WGT-1:0]    wgt_raddr;
  logic [COLS-1:0][7:0] act_rdata;
  logic [ROWS-1:0][7:0] wgt_rdata;
  logic [31:0]          acc [ROWS][COLS];

  mpa_ctrl #(
    .ROWS(ROWS), .COLS(COLS), .KW(KW), .AW_ACT(AW_ACT), .AW_WGT(AW_WGT)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .dmode_in  (dmode_e'(dmode_in)),
    .k_len     (k_len),
    .act_base  (act_base),
    .wgt_base  (wgt_base),
    .busy      (busy),
    .done      (done),
    .dmode     (dmode),
    .clear     (clear),
    .rd_en     (rd_en),
    .act_raddr (act_raddr),
    .wgt_raddr (wgt_raddr),
    .arr_valid (arr_valid)
  );

  operand_buffer #(.WIDTH(COLS*8), .DEPTH(ACT_DEPTH), .AW(AW_ACT)) u_act_buf (
    .clk   (clk),
    .we    (act_we),
    .waddr (act_waddr),
    .wdata (act_wdata),
    .re    (rd_en),
    .raddr (act_raddr),
    .rdata (act_rdata)
  );

  operand_buffer #(.WIDTH(ROWS*8), .DEPTH(WGT_DEPTH), .AW(AW_WGT)) u_wgt_buf (
    .clk   (clk),
    .we    (wgt_we),
    .waddr (wgt_waddr),
    .wdata (wgt_wdata),
    .re    (rd_en),
    .raddr (wgt_raddr),
    .rdata (wgt_rdata)
  );

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .dmode    (dmode),
    .in_valid (arr_valid),
    .wgt_word (wgt_rdata),
    .act_word (act_rdata),
    .acc      (acc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_rdata  <= '0;
      out_rvalid <= 1'b0;
    end else begin
      out_rvalid <= out_rd_en;
      if (out_rd_en) out_rdata <= acc[out_row][out_col];
    end
  end

endmodule
