// mpa_ctrl: controller of the accelerator (CTRL).
//
// On start (accepted only when idle) it latches the d-mode and the operation
// description: K, the number of accumulation steps, and the base addresses of
// the K consecutive activation words and weight words. In the same cycle it
// pulses clear to zero all PE accumulators. It then reads one activation word
// and one weight word per cycle for K cycles (RUN), waits for the skewed data
// to reach the far corner of the array (DRAIN, ROWS + COLS - 1 cycles) and
// pulses done (DONE). arr_valid marks the cycles in which the buffers' read
// data is valid (one cycle after each read).
// Timing: if start is high in cycle 0, reads happen in cycles 1..K, done is
// high in cycle K + ROWS + COLS, and all accumulators hold their final value
// from that cycle on. busy is high from cycle 1 to the done cycle.
// The design description only names the controller and says it drives the
// d-mode; the sequence above is this design's choice.
module mpa_ctrl
  import mpa_pkg::*;
#(
  parameter int unsigned ROWS   = 48,
  parameter int unsigned COLS   = 64,
  parameter int unsigned KW     = 16,  // width of K
  parameter int unsigned AW_ACT = 12,
  parameter int unsigned AW_WGT = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  dmode_e            dmode_in,
  input  logic [KW-1:0]     k_len,
  input  logic [AW_ACT-1:0] act_base,
  input  logic [AW_WGT-1:0] wgt_base,
  output logic              busy,
  output logic              done,
  output dmode_e            dmode,      // held for the whole operation
  output logic              clear,      // zero the accumulators
  output logic              rd_en,      // read both buffers
  output logic [AW_ACT-1:0] act_raddr,
  output logic [AW_WGT-1:0] wgt_raddr,
  output logic              arr_valid   // buffer read data valid
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  localparam int unsigned DRAIN_CYC = ROWS + COLS - 1;
  localparam int unsigned DW = $clog2(DRAIN_CYC + 1);

  state_e        state;
  logic [KW-1:0] k_left;
  logic [DW-1:0] drain_cnt;

  assign busy  = (state != S_IDLE);
  assign done  = (state == S_DONE);
  assign clear = (state == S_IDLE) && start;
  assign rd_en = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dmode     <= DMODE_INT8;
      k_left    <= '0;
      drain_cnt <= '0;
      act_raddr <= '0;
      wgt_raddr <= '0;
      arr_valid <= 1'b0;
    end else begin
      arr_valid <= rd_en;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            dmode     <= dmode_in;
            act_raddr <= act_base;
            wgt_raddr <= wgt_base;
            k_left    <= k_len;
            drain_cnt <= DW'(DRAIN_CYC);
            state     <= (k_len == '0) ? S_DRAIN : S_RUN;
          end
        end
        S_RUN: begin
          act_raddr <= act_raddr + 1'b1;
          wgt_raddr <= wgt_raddr + 1'b1;
          k_left    <= k_left - 1'b1;
          if (k_left == KW'(1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == DW'(1)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // d-mode and addresses must not change under a running operation
  a_mode_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN) |=> $stable(dmode));
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
