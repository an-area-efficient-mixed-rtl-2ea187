// tb_mpa_ctrl: checks the controller's sequence for several K: clear in the
// start cycle, K consecutive reads from the two base addresses, arr_valid one
// cycle after each read, d-mode latched, done exactly K + ROWS + COLS cycles
// after start, start ignored while busy, and the K = 0 case.
module tb_mpa_ctrl;
  import mpa_pkg::*;
  localparam int R = 3, C = 4, KW = 8, AWA = 6, AWW = 7;

  logic           clk = 0, rst_n = 0, start = 0;
  dmode_e         dmode_in = DMODE_INT8, dmode;
  logic [KW-1:0]  k_len = 0;
  logic [AWA-1:0] act_base = 0, act_raddr;
  logic [AWW-1:0] wgt_base = 0, wgt_raddr;
  logic           busy, done, clear, rd_en, arr_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  mpa_ctrl #(.ROWS(R), .COLS(C), .KW(KW), .AW_ACT(AWA), .AW_WGT(AWW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .dmode_in(dmode_in), .k_len(k_len),
    .act_base(act_base), .wgt_base(wgt_base), .busy(busy), .done(done), .dmode(dmode),
    .clear(clear), .rd_en(rd_en), .act_raddr(act_raddr), .wgt_raddr(wgt_raddr),
    .arr_valid(arr_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic run(int k, int mode);
    int t0, reads, valids, done_at;
    logic prev_rd;
    @(negedge clk);
    k_len = KW'(k);
    act_base = AWA'($urandom);
    wgt_base = AWW'($urandom);
    dmode_in = dmode_e'(mode);
    start = 1;
    #1;
    check(clear == 1'b1, "clear in start cycle");
    t0 = cyc;
    @(negedge clk);
    start = 0;
    // change the inputs under the running operation: must be ignored
    dmode_in = dmode_e'(mode ^ 1);
    reads = 0; valids = 0; done_at = -1; prev_rd = 0;
    for (int i = 0; i < k + R + C + 4; i++) begin
      check(clear == 1'b0, "no clear while running");
      if (arr_valid != prev_rd) check(0, "arr_valid lags rd_en by one");
      prev_rd = rd_en;
      if (rd_en) begin
        check(act_raddr == AWA'(act_base + reads) && wgt_raddr == AWW'(wgt_base + reads),
              "read address");
        check(cyc - t0 == reads + 1, "reads consecutive from cycle 1");
        reads++;
      end
      if (arr_valid) valids++;
      if (busy || done) check(dmode == dmode_e'(mode), "d-mode latched");
      if (done) done_at = cyc - t0;
      if (i == 2) begin start = 1; #1; check(clear == 1'b0, "start ignored when busy"); end
      @(negedge clk);
      start = 0;
    end
    check(reads == k, "K reads");
    check(valids == k, "K valid cycles");
    check(done_at == k + R + C, "done latency K+ROWS+COLS");
    check(!busy, "idle again");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done && !rd_en, "reset state");
    run(1, 1);
    run(5, 2);
    run(17, 3);
    run(0, 0);
    run(40, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
