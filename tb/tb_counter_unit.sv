// tb_counter_unit: checks the iteration sequence of the global counter unit against the
// schedule written out directly: in the c-th enabled cycle, t = c mod LAM_L1, l2 = t / LAM_L2,
// p = t mod LAM_L2, and a point is executed when l2 < L2 and p < J1*J2, with (j1, j2) the p-th
// point of the tile in column-major (j1 fastest) or row-major (j2 fastest) order; l1 = c / LAM_L1.
// Two instances: the default 2x3 tile, 2 GS columns, column-major schedule (1,2,_,_,16,10), and
// a row-major 3x2 tile with 3 GS columns and a stretched period.
`timescale 1ns/1ps
module tb_counter_unit;
  import firgen_pkg::*;
  logic clk = 0, rst_n = 1, en;
  always #5 clk = ~clk;

  cnt_t cnt_a, cnt_b;
  counter_unit dut_a (.clk, .rst_n, .en, .cnt(cnt_a));
  counter_unit #(.J1(3), .J2(2), .L2(3), .ROW_MAJOR(1'b1), .LAM_L2(7), .LAM_L1(25)) dut_b (
    .clk, .rst_n, .en, .cnt(cnt_b));

  int checks = 0, failures = 0;
  int c = 0;

  task automatic expect_pt(cnt_t got, int J1, int J2, int L2, bit rm, int LL2, int LL1,
                           string tag);
    int t, l2, p, j1, j2;
    bit v;
    t  = c % LL1;
    l2 = t / LL2;
    p  = t % LL2;
    v  = (l2 < L2) && (p < J1 * J2);
    j1 = rm ? p / J2 : p % J1;
    j2 = rm ? p % J2 : p / J1;
    checks++;
    if (got.valid !== v || got.l1 != ((c / LL1 > 255) ? 255 : c / LL1) ||
        (v && (got.j1 != j1 || got.j2 != j2 || got.l2 != l2))) begin
      failures++;
      $display("FAIL %s: cycle %0d got v=%0d j1=%0d j2=%0d l2=%0d l1=%0d, expected v=%0d j1=%0d j2=%0d l2=%0d",
               tag, c, got.valid, got.j1, got.j2, got.l2, got.l1, v, j1, j2, l2);
    end
  endtask

  int n_valid_a = 0;
  initial begin
    en = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (600) begin
      @(negedge clk);
      expect_pt(cnt_a, 2, 3, 2, 1'b0, 10, 16, "default");
      expect_pt(cnt_b, 3, 2, 3, 1'b1, 7, 25, "row-major");
      en = ($urandom_range(0, 4) != 0);
      if (cnt_a.valid && en) n_valid_a++;
      @(posedge clk);
      if (en) c++;
    end
    // 12 points per 16 cycles
    checks++;
    if (n_valid_a != (c / 16) * 12 + ((c % 16 < 6) ? c % 16 : (c % 16 < 10 ? 6 : (c % 16) - 4)))
      begin failures++; $display("FAIL: %0d points in %0d cycles", n_valid_a, c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
