// tb_pe_array: a 3 x 4 array runs random tiles in all four d-modes. Each tile
// presents K random weight and activation words on consecutive cycles; the
// accumulators are compared with the reference matrix product exactly
// K - 1 + ROWS + COLS - 1 cycles after the first word (the skew and
// systolic latency) and are checked to still be incomplete one cycle earlier
// in the far corner when its last contribution is non-zero.
module tb_pe_array;
  import mpa_pkg::*;
  import mpa_tb_pkg::*;
  localparam int R = 3, C = 4, KMAX = 12;

  logic              clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  dmode_e            dmode = DMODE_INT8;
  logic [R-1:0][7:0] wgt_word = '0;
  logic [C-1:0][7:0] act_word = '0;
  logic [31:0]       acc [R][C];
  logic [7:0]        wm [R][KMAX];
  logic [7:0]        am [C][KMAX];
  int checks = 0, failures = 0;
  int mode_runs [4] = '{0, 0, 0, 0};

  pe_array #(.ROWS(R), .COLS(C)) dut (.clk(clk), .rst_n(rst_n), .clear(clear),
    .dmode(dmode), .in_valid(in_valid), .wgt_word(wgt_word), .act_word(act_word), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expected(int m, int r, int c, int k);
    int s32, sh, sl;
    s32 = 0; sh = 0; sl = 0;
    for (int i = 0; i < k; i++) begin
      s32 += wgt_val(m, wm[r][i], 0) * act_val(m, am[c][i]);
      sh  += wgt_val(m, wm[r][i], 1) * act_val(m, am[c][i]);
    end
    sl = s32;
    if (mode_is_8x8(m)) return 32'(s32);
    return {16'(sh), 16'(sl)};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 24; run++) begin
      int m, k;
      m = run % 4;
      k = $urandom_range(KMAX, 1);
      for (int i = 0; i < KMAX; i++) begin
        for (int r = 0; r < R; r++) wm[r][i] = 8'($urandom);
        for (int c = 0; c < C; c++) am[c][i] = 8'($urandom);
      end
      // make the far corner's last product non-zero
      wm[R-1][k-1] = 8'h11 | 8'($urandom_range(6));
      am[C-1][k-1] = 8'h01 | 8'($urandom_range(6));
      dmode = dmode_e'(m);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < k; i++) begin
        in_valid = 1;
        for (int r = 0; r < R; r++) wgt_word[r] = wm[r][i];
        for (int c = 0; c < C; c++) act_word[c] = am[c][i];
        @(negedge clk);
      end
      in_valid = 0;
      wgt_word = '1;   // ignored while in_valid is low
      act_word = '1;
      // the last word entered at the edge ending cycle k-1 of the tile;
      // PE(R-1,C-1) takes it R+C-2 cycles later
      repeat (R + C - 3) @(negedge clk);
      checks++;
      if (acc[R-1][C-1] == expected(m, R-1, C-1, k)) begin
        failures++;
        $display("FAIL corner complete one cycle early, mode %0d", m);
      end
      @(negedge clk);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          checks++;
          if (acc[r][c] !== expected(m, r, c, k)) begin
            failures++;
            $display("FAIL mode %0d k %0d PE(%0d,%0d) acc=%h expected %h", m, k, r, c,
                     acc[r][c], expected(m, r, c, k));
          end
        end
      // nothing more arrives afterwards
      repeat (3) @(negedge clk);
      checks++;
      if (acc[R-1][C-1] != expected(m, R-1, C-1, k)) begin
        failures++;
        $display("FAIL corner changed after completion");
      end
      mode_runs[m]++;
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_runs[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
