// tb_operand_buffer: writes random words to a small buffer, reads them back
// and checks the one-cycle registered read latency, that rdata holds while
// re is low, and read-before-write on a same-address collision.
module tb_operand_buffer;
  localparam int W = 24, D = 32, AW = 5;

  logic          clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0]  wdata = 0, rdata;
  logic [W-1:0]  model [D];
  int checks = 0, failures = 0;

  operand_buffer #(.WIDTH(W), .DEPTH(D), .AW(AW)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rdata=%h", what, rdata); end
  endtask

  initial begin
    logic [W-1:0] held;
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    // random reads, one-cycle latency
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom_range(D-1);
      re = 1; raddr = AW'(a);
      @(negedge clk);
      check(rdata == model[a], "read");
    end
    // hold while re is low
    re = 0;
    held = rdata;
    raddr = raddr + 1'b1;
    repeat (3) @(negedge clk);
    check(rdata == held, "hold");
    // simultaneous read and write of the same address: old data
    we = 1; re = 1; waddr = 5; raddr = 5; wdata = ~model[5];
    @(negedge clk);
    check(rdata == model[5], "read-before-write");
    model[5] = wdata;
    we = 0;
    @(negedge clk);
    check(rdata == model[5], "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
