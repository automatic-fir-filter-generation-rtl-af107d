// top_env: self-checking environment around one firgen_top instance, used by the workload test.
//
// What it does: loads random coefficients, streams T random samples (the last TZ are zeros so
// the pipeline flushes) through the top-level ready/valid ports with random input gaps and
// random output back-pressure, and compares every result with a direct convolution
// y(i) = sum_j a(j) * u(i-j), u(i<0) = 0. It uses only the ports of the top, so it works for
// any array shape, tile size, schedule order or localization mode given as parameters.
// It also checks the schedule in array time (cycles in which the array was enabled, read
// through the top's enable and FIFO request signals): per array row, the sample J1 places on is
// read exactly lamL1 cycles later, and each result is written LATENCY + 1 cycles after its
// sample was read, with LATENCY = (J2-1 or, partially localized, J2)*lamJ2 + (K2-1)*lamK2 +
// (L2-1)*lamL2, plus one with the pipelined multiply-accumulate.
// Interface: clocks in (clk, io_clk); done/checks/failures out. done rises once T - TZ results
// have been received and compared. It also counts cycles with in_valid low while the array was
// waiting (gaps) and cycles with out_ready low while a result was offered (blocks); a workload
// in which either never happened counts as one failure.
// This is a test-bench component of this design; nothing in it comes from the filter method
// except the filter equation.
`timescale 1ns/1ps
module top_env
  import firgen_pkg::*;
#(
  parameter int K1 = 2, K2 = 2, J1 = 2, J2 = 3, N = 12,
  parameter bit ROW_MAJOR = 1'b0,
  parameter bit PARTIAL   = 1'b0,
  parameter bit MAC_PIPE  = 1'b0,
  parameter int ACC_W     = 40,
  parameter int T  = 400,
  parameter int TZ = 100
) (
  input  logic clk,
  input  logic io_clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int TAP_W = (N > 1) ? $clog2(N) : 1;
  localparam int L2    = N / (J2 * K2);
  localparam int LL1   = lam_l1(J1, J2, K1, K2, L2, ROW_MAJOR, PARTIAL);
  localparam int LATENCY = (PARTIAL ? J2 : J2 - 1) * lam_j2(J1, ROW_MAJOR)
                           + (K2 - 1) * lam_k2(J1, J2, ROW_MAJOR, PARTIAL)
                           + (L2 - 1) * lam_l2(J1, J2, K2, ROW_MAJOR, PARTIAL) + int'(MAC_PIPE);

  logic rst_n = 1, io_rst_n = 1;
  logic               in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic signed [15:0] in_data = '0;
  logic signed [ACC_W-1:0] out_data;
  logic               coef_we = 0;
  logic [TAP_W-1:0]   coef_tap = '0;
  logic signed [15:0] coef_data = '0;

  firgen_top #(.K1(K1), .K2(K2), .J1(J1), .J2(J2), .N(N),
               .ROW_MAJOR(ROW_MAJOR), .PARTIAL(PARTIAL), .MAC_PIPE(MAC_PIPE),
               .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .io_clk, .io_rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .coef_we, .coef_tap, .coef_data
  );

  logic signed [15:0] u [T];
  logic signed [15:0] a [N];
  bit   started = 0;
  int   gaps = 0, blocks = 0;

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < T; i++) u[i] = (i < T - TZ) ? 16'($urandom) : 16'sd0;
    for (int j = 0; j < N; j++) a[j] = 16'($urandom);
    u[0] = 16'sh8000; a[N-1] = 16'sh8000;
    #1 rst_n = 0; io_rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; io_rst_n = 1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      coef_we = 1; coef_tap = TAP_W'(j); coef_data = a[j];
    end
    @(negedge clk);
    coef_we = 0;
    started = 1;
  end

  function automatic longint ref_y(int i);
    longint acc = 0;
    for (int j = 0; j < N; j++)
      if (i - j >= 0) acc += longint'(a[j]) * longint'(u[i - j]);
    return acc;
  endfunction

  int sent = 0;
  always @(posedge io_clk) begin
    int nxt;
    nxt = sent + int'(in_valid && in_ready);
    sent <= nxt;
    if (!in_valid || in_ready) begin
      if (started && nxt < T && $urandom_range(0, 2) != 0) begin
        in_valid <= 1'b1;
        in_data  <= u[nxt];
      end else begin
        in_valid <= 1'b0;
        if (started && nxt < T) gaps++;
      end
    end
  end

  always @(negedge io_clk) begin
    if (out_valid && !out_ready) blocks++;
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  int received = 0;
  always @(posedge io_clk) begin
    if (io_rst_n && out_valid && out_ready && received < T) begin
      checks++;
      if (longint'(out_data) != ref_y(received)) begin
        failures++;
        $display("FAIL (K1=%0d K2=%0d J1=%0d J2=%0d N=%0d rm=%0d p=%0d): y(%0d) = %0d, expected %0d",
                 K1, K2, J1, J2, N, ROW_MAJOR, PARTIAL, received, out_data, ref_y(received));
      end
      received <= received + 1;
    end
  end

  // schedule check in array time (cycles with the array enabled), per array row: a row reads
  // the sample J1 places further in its own sequence exactly LL1 cycles later, and writes the
  // result of each sample LATENCY + 1 cycles after reading it
  longint acyc = 0;
  longint rd_time [K1][T];
  int     n_rd [K1], n_wr [K1];
  int     n_sched = 0;
  initial for (int r = 0; r < K1; r++) begin n_rd[r] = 0; n_wr[r] = 0; end
  always @(posedge clk) begin
    if (rst_n && dut.en) begin
      for (int r = 0; r < K1; r++) begin
        if (dut.u_rd[r] && n_rd[r] < T) begin
          rd_time[r][n_rd[r]] = acyc;
          if (n_rd[r] >= J1) begin
            checks++; n_sched++;
            if (acyc - rd_time[r][n_rd[r] - J1] != LL1) begin
              failures++;
              $display("FAIL: row %0d read its sample %0d after %0d array cycles, expected %0d",
                       r, n_rd[r], acyc - rd_time[r][n_rd[r] - J1], LL1);
            end
          end
          n_rd[r]++;
        end
        if (dut.y_wr[r] && n_wr[r] < n_rd[r]) begin
          checks++; n_sched++;
          if (acyc - rd_time[r][n_wr[r]] != LATENCY + 1) begin
            failures++;
            $display("FAIL: row %0d result %0d written %0d array cycles after its sample, expected %0d",
                     r, n_wr[r], acyc - rd_time[r][n_wr[r]], LATENCY + 1);
          end
          n_wr[r]++;
        end
      end
      acyc++;
    end
  end

  initial begin
    wait (received >= T - TZ);
    checks++;
    if (gaps == 0 || blocks == 0) begin
      failures++;
      $display("FAIL: input gaps %0d, output blocks %0d", gaps, blocks);
    end
    $display("workload K1=%0d K2=%0d J1=%0d J2=%0d N=%0d rm=%0d partial=%0d: %0d results, %0d gaps, %0d blocks, period %0d, latency %0d, %0d schedule checks",
             K1, K2, J1, J2, N, ROW_MAJOR, PARTIAL, received, gaps, blocks, LL1, LATENCY, n_sched);
    done = 1;
  end
endmodule
