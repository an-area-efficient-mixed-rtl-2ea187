// tb_vit_mp_accel: end-to-end test of the accelerator at a reduced size
// (4 x 5 PEs, 64-word buffers). It loads random tiles into both buffers
// through the write ports, runs operations in all four d-modes with random K
// and base addresses, checks the start-to-done latency K + ROWS + COLS, reads
// every PE result through the read port and compares it with a reference
// matrix product. It counts how often each mechanism occurred: each d-mode,
// the packed two-weight operation, negative products in the high and low
// lanes (sign applied by inversion and carry-in), and 8x8 results whose
// lower half carried into the upper half; a mechanism never seen is a failure.
module tb_vit_mp_accel;
  import mpa_tb_pkg::*;
  localparam int R = 4, C = 5, AD = 64, WD = 64, KW = 8;
  localparam int AWA = 6, AWW = 6, RW = 2, CW = 3;

  logic                 clk = 0, rst_n = 0;
  logic                 act_we = 0, wgt_we = 0, start = 0, out_rd_en = 0;
  logic [AWA-1:0]       act_waddr = 0, act_base = 0;
  logic [AWW-1:0]       wgt_waddr = 0, wgt_base = 0;
  logic [C-1:0][7:0]    act_wdata = '0;
  logic [R-1:0][7:0]    wgt_wdata = '0;
  logic [1:0]           dmode_in = 0;
  logic [KW-1:0]        k_len = 0;
  logic                 busy, done, out_rvalid;
  logic [RW-1:0]        out_row = 0;
  logic [CW-1:0]        out_col = 0;
  logic [31:0]          out_rdata;

  logic [C-1:0][7:0] amem [AD];
  logic [R-1:0][7:0] wmem [WD];
  int checks = 0, failures = 0, cyc = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_packed = 0, n_neg_hi = 0, n_neg_lo = 0, n_chain = 0;

  vit_mp_accel #(.ROWS(R), .COLS(C), .ACT_DEPTH(AD), .WGT_DEPTH(WD), .KW(KW)) dut (
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
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic load_buffers();
    for (int i = 0; i < AD; i++) begin
      @(negedge clk);
      act_we = 1; act_waddr = AWA'(i);
      for (int c = 0; c < C; c++) act_wdata[c] = 8'($urandom);
      amem[i] = act_wdata;
      wgt_we = 1; wgt_waddr = AWW'(i);
      for (int r = 0; r < R; r++) wgt_wdata[r] = 8'($urandom);
      wmem[i] = wgt_wdata;
    end
    @(negedge clk);
    act_we = 0; wgt_we = 0;
  endtask

  task automatic run_op(int m, int k, int ab, int wb);
    int t0, lat;
    logic [31:0] exp_v;
    @(negedge clk);
    dmode_in = 2'(m); k_len = KW'(k); act_base = AWA'(ab); wgt_base = AWW'(wb);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    check(lat == k + R + C, $sformatf("latency %0d expected %0d", lat, k + R + C));
    n_mode[m]++;
    if (!mode_is_8x8(m)) n_packed++;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int s_lo, s_hi;
        s_lo = 0; s_hi = 0;
        for (int i = 0; i < k; i++) begin
          int a, wl, wh;
          a  = act_val(m, amem[(ab + i) % AD][c]);
          wl = wgt_val(m, wmem[(wb + i) % WD][r], 0);
          wh = wgt_val(m, wmem[(wb + i) % WD][r], 1);
          if (a * wl < 0) n_neg_lo++;
          if (a * wh < 0) n_neg_hi++;
          s_lo += a * wl;
          s_hi += a * wh;
        end
        if (mode_is_8x8(m)) begin
          exp_v = 32'(s_lo);
          if (exp_v[31:16] != 16'd0) n_chain++;
        end else begin
          exp_v = {16'(s_hi), 16'(s_lo)};
        end
        out_rd_en = 1; out_row = RW'(r); out_col = CW'(c);
        @(negedge clk);
        out_rd_en = 0;
        check(out_rvalid && out_rdata == exp_v,
              $sformatf("mode %0d K %0d PE(%0d,%0d) got %h expected %h", m, k, r, c,
                        out_rdata, exp_v));
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_buffers();
    for (int n = 0; n < 16; n++)
      run_op(n % 4, $urandom_range(40, 1), $urandom_range(AD - 1), $urandom_range(WD - 1));
    // back-to-back operations on the same data with different modes
    run_op(1, 64, 0, 0);
    run_op(0, 64, 0, 0);
    $display("mode runs %0d %0d %0d %0d, packed %0d, negative hi %0d lo %0d, 8x8 upper-half carries %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_packed, n_neg_hi, n_neg_lo, n_chain);
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, "every d-mode ran");
    check(n_packed > 0, "packed operation ran");
    check(n_neg_hi > 0 && n_neg_lo > 0, "negative products in both lanes");
    check(n_chain > 0, "8x8 carry into upper half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
