// tb_firgen_workloads: runs the filter configurations of the method's published evaluation, end to
// end through the top level, each in its own top_env instance (see top_env.sv):
//   W1  the running example (2x2 processors, 2x3 tiles, 12 taps), partially localized, the
//       variant the method uses for its lower-latency schedule;
//   W2  64 taps on 2x4 processors, fully localized, 4x1 tiles: J1*K1 = 8 samples every
//       64 cycles, the 12.5 % throughput of the published 64-tap comparison;
//   W3  64 taps on 2x4 processors, 3x2 tiles, row-major and partially localized, whose latency
//       by this design's schedule is 68 cycles, the latency the table lists for 2x4 processors;
//   W4  64 taps on 1x8 processors, 1x8 tiles, partially localized (the table's second array,
//       there optimized for latency); this schedule gives 1 sample per 9 cycles, latency 15;
//   W5  a 4x4 array, the array size of the published tile-size sweep, with 2x2 tiles and
//       N = 32 taps (L2 = 4 tiles per row); the sweep itself spans J1, J2 up to 30, which is
//       left to parameter choice because it only changes the tile size.
// W2 to W4 use the 38-bit result of the published 64-tap comparison (16 + 16 + log2(64) bits,
// exact for 64 taps). W2, W4 and W5 use the pipelined multiply-accumulate (one more cycle of latency), as the
// published 64-tap and sweep results were obtained with pipelined MAC units.
// Every result is compared with a direct convolution, and each instance checks that the array
// keeps the period and latency its schedule gives. The test passes when every instance has
// finished with no failures; a watchdog ends it otherwise.
// Which tile sizes reproduce the table's figures is this design's own choice; the publication
// gives only the array shapes, the tap count and the throughput/latency it measured.
`timescale 1ns/1ps
module tb_firgen_workloads;
  logic clk = 0, io_clk = 0;
  always #7.5 clk = ~clk;
  always #5   io_clk = ~io_clk;

  localparam int NW = 5;
  logic done [NW];
  int   chk  [NW];
  int   fl   [NW];

  top_env #(.K1(2), .K2(2), .J1(2), .J2(3), .N(12), .PARTIAL(1'b1))
    w1 (.clk, .io_clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  top_env #(.K1(2), .K2(4), .J1(4), .J2(1), .N(64), .MAC_PIPE(1'b1), .ACC_W(38))
    w2 (.clk, .io_clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  top_env #(.K1(2), .K2(4), .J1(3), .J2(2), .N(64), .ROW_MAJOR(1'b1), .PARTIAL(1'b1), .ACC_W(38))
    w3 (.clk, .io_clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  top_env #(.K1(1), .K2(8), .J1(1), .J2(8), .N(64), .PARTIAL(1'b1), .MAC_PIPE(1'b1), .ACC_W(38))
    w4 (.clk, .io_clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  top_env #(.K1(4), .K2(4), .J1(2), .J2(2), .N(32), .MAC_PIPE(1'b1))
    w5 (.clk, .io_clk, .done(done[4]), .checks(chk[4]), .failures(fl[4]));

  function automatic bit all_done();
    for (int w = 0; w < NW; w++) if (done[w] !== 1'b1) return 0;
    return 1;
  endfunction

  task automatic report(int extra_fail);
    int c = 0, f = extra_fail;
    for (int w = 0; w < NW; w++) begin
      c += chk[w]; f += fl[w];
      if (done[w] !== 1'b1) $display("FAIL: workload W%0d did not finish", w + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    do @(posedge clk); while (!all_done());
    repeat (5) @(posedge clk);
    report(0);
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    report(1);
  end
endmodule
