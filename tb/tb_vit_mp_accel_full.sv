// tb_vit_mp_accel_full: the accelerator at its full default size (48 x 64
// PEs, full-size buffers) on tiles shaped like ViT-Base linear layers
// (hidden size 768, MLP size 3072). It loads 3072 random activation and
// weight words and runs three tiles: a Q/K/V-style tile with K = 768 in the
// packed PoT4 x INT4 mode, the same in INT4 x INT4 mode, and an FC2-style
// tile with K = 3072 in INT8 x INT8 mode. For each it checks the
// start-to-done latency K + 48 + 64 and compares all 3072 PE results with a
// reference matrix product (16-bit halves wrap like the hardware).
module tb_vit_mp_accel_full;
  import mpa_tb_pkg::*;
  localparam int R = 48, C = 64, KMAX = 3072;

  logic              clk = 0, rst_n = 0;
  logic              act_we = 0, wgt_we = 0, start = 0, out_rd_en = 0;
  logic [11:0]       act_waddr = 0, act_base = 0;
  logic [12:0]       wgt_waddr = 0, wgt_base = 0;
  logic [C-1:0][7:0] act_wdata = '0;
  logic [R-1:0][7:0] wgt_wdata = '0;
  logic [1:0]        dmode_in = 0;
  logic [15:0]       k_len = 0;
  logic              busy, done, out_rvalid;
  logic [5:0]        out_row = 0, out_col = 0;
  logic [31:0]       out_rdata;

  logic [C-1:0][7:0] amem [KMAX];
  logic [R-1:0][7:0] wmem [KMAX];
  int checks = 0, failures = 0, cyc = 0;

  vit_mp_accel dut (
    .clk(clk), .rst_n(rst_n),
    .act_we(act_we), .act_waddr(act_waddr), .act_wdata(act_wdata),
    .wgt_we(wgt_we), .wgt_waddr(wgt_waddr), .wgt_wdata(wgt_wdata),
    .start(start), .dmode_in(dmode_in), .k_len(k_len), .act_base(act_base),
    .wgt_base(wgt_base), .busy(busy), .done(done),
    .out_rd_en(out_rd_en), .out_row(out_row), .out_col(out_col),
    .out_rdata(out_rdata), .out_rvalid(out_rvalid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(int m, int K);
    int t0, bad;
    logic [31:0] exp_v;
    @(negedge clk);
    dmode_in = 2'(m); k_len = 16'(K); act_base = 12'(100); wgt_base = 13'(2000);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != K + R + C) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc - t0, K + R + C);
    end
    bad = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int s_lo, s_hi;
        s_lo = 0; s_hi = 0;
        for (int i = 0; i < K; i++) begin
          s_lo += act_val(m, amem[i][c]) * wgt_val(m, wmem[i][r], 0);
          s_hi += act_val(m, amem[i][c]) * wgt_val(m, wmem[i][r], 1);
        end
        exp_v = mode_is_8x8(m) ? 32'(s_lo) : {16'(s_hi), 16'(s_lo)};
        out_rd_en = 1; out_row = 6'(r); out_col = 6'(c);
        @(negedge clk);
        out_rd_en = 0;
        checks++;
        if (!(out_rvalid && out_rdata == exp_v)) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL mode %0d PE(%0d,%0d) got %h expected %h", m, r, c, out_rdata, exp_v);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < KMAX; i++) begin
      @(negedge clk);
      act_we = 1; act_waddr = 12'(100 + i);
      for (int c = 0; c < C; c++) act_wdata[c] = 8'($urandom);
      amem[i] = act_wdata;
      wgt_we = 1; wgt_waddr = 13'(2000 + i);
      for (int r = 0; r < R; r++) wgt_wdata[r] = 8'($urandom);
      wmem[i] = wgt_wdata;
    end
    @(negedge clk);
    act_we = 0; wgt_we = 0;
    run_op(2, 768);
    run_op(1, 768);
    run_op(0, 3072);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
