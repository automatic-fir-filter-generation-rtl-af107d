// tb_proc_array: the processor array with its counter unit, in five configurations:
//   A: 2x2 processors, 2x3 LS tiles, 12 taps, column-major schedule (1,2,2,5,16,10):
//      latency 19 cycles, 4 samples per 16 cycles;
//   B: 3x2 processors, 2x2 LS tiles, 8 taps, row-major schedule (2,1,3,2,8,4):
//      latency (J2-1)*1 + (K2-1)*2 + (L2-1)*4 = 7 cycles, 6 samples per 8 cycles, so
//      consecutive GS rows overlap in time and rows read their samples out of sample order.
//   C: as A, partially localized, schedule (1,2,2,1,16,8): latency 6+1+8 = 15 cycles;
//   D: 4x2 processors, 1x1 LS tiles, 2 taps, partially localized, row-major, schedule
//      (2,1,1,1,2,3) with L2 = 1: 4 samples per 3 cycles, more than one sample per clock
//      cycle; latency 1*1 + 1*1 = 2 cycles;
//   E: as A, but with every link a plain delay shift register (LINK_FIFO = 0; A to D use the
//      default, where the long wrap-around sample links from the last row are small FIFOs)
//      and with the pipelined multiply-accumulate (MAC_PIPE = 1): latency 19 + 1 = 20.
// Each runs 200 samples with random stalls (see pa_env for what is checked).
`timescale 1ns/1ps
module tb_proc_array;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int  ca, fa, cb, fb, cc, fc, cd, fd, ce, fe;
  bit  da, db, dc, dd, de;

  pa_env #(.K1(2), .K2(2), .J1(2), .J2(3), .N(12), .ROW_MAJOR(1'b0),
           .EXP_LATENCY(19), .EXP_LAM_L1(16)) env_a (
    .clk, .rst_n, .checks(ca), .failures(fa), .done(da));
  pa_env #(.K1(3), .K2(2), .J1(2), .J2(2), .N(8), .ROW_MAJOR(1'b1),
           .EXP_LATENCY(7), .EXP_LAM_L1(8)) env_b (
    .clk, .rst_n, .checks(cb), .failures(fb), .done(db));
  pa_env #(.K1(2), .K2(2), .J1(2), .J2(3), .N(12), .ROW_MAJOR(1'b0), .PARTIAL(1'b1),
           .EXP_LATENCY(15), .EXP_LAM_L1(16)) env_c (
    .clk, .rst_n, .checks(cc), .failures(fc), .done(dc));
  pa_env #(.K1(4), .K2(2), .J1(1), .J2(1), .N(2), .ROW_MAJOR(1'b1), .PARTIAL(1'b1),
           .EXP_LATENCY(2), .EXP_LAM_L1(3)) env_d (
    .clk, .rst_n, .checks(cd), .failures(fd), .done(dd));
  pa_env #(.K1(2), .K2(2), .J1(2), .J2(3), .N(12), .ROW_MAJOR(1'b0), .LINK_FIFO(1'b0), .MAC_PIPE(1'b1),
           .EXP_LATENCY(20), .EXP_LAM_L1(16)) env_e (
    .clk, .rst_n, .checks(ce), .failures(fe), .done(de));

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    wait (da && db && dc && dd && de);
    $display("checks per configuration: A %0d, B %0d, C %0d, D %0d, E %0d", ca, cb, cc, cd, ce);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc + cd + ce, fa + fb + fc + fd + fe);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc + cd + ce, fa + fb + fc + fd + fe + 1);
    $finish;
  end
endmodule
