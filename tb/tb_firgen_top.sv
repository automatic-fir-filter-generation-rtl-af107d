// tb_firgen_top: end-to-end test of the FIR filter at its default parameters.
//
// A random 16-bit sample stream is filtered with random 16-bit coefficients; every result is
// compared with a direct convolution y(i) = sum_j a(j) * u(i-j) computed here (u(i<0) = 0).
// Halfway the stream is paused and a new coefficient set is written, so the run covers a
// coefficient change at run time; results of the few samples in flight at that moment are
// counted but not compared. The test also
//   - starves the input (random gaps in in_valid) so the array stalls on an empty input FIFO,
//   - holds out_ready low for long stretches so the output FIFOs fill and the array stalls,
//   - checks the schedule: in array time (cycles with the array running) sample n+J1*K1 is
//     read exactly LAM_L1 cycles after sample n, and y(n) is written LATENCY+1 cycles after
//     u(n) was read (LATENCY = 19 for the default 2x2 array, 2x3 tiles, 12 taps),
// and counts how often each of these happened; one that never happened is a failure.
// The I/O clock runs at 100 MHz and the filter clock at 66.7 MHz, close to the 100/65 ratio
// of the FPGA figures that motivate the separate clocks.
`timescale 1ns/1ps
module tb_firgen_top;
  import firgen_pkg::*;

  localparam int K1 = 2, K2 = 2, J1 = 2, J2 = 3, N = 12;
  localparam int L2 = N / (J2 * K2);
  localparam int LAM_L1  = lam_l1(J1, J2, K1, K2, L2, 1'b0, 1'b0);
  localparam int LATENCY = (J2 - 1) * lam_j2(J1, 1'b0) + (K2 - 1) * lam_k2(J1, J2, 1'b0, 1'b0)
                           + (L2 - 1) * lam_l2(J1, J2, K2, 1'b0, 1'b0);
  localparam int S       = 300;          // samples before the coefficient change
  localparam int T       = 600;          // samples in total (the last ones are zeros)
  localparam int TZ      = 40;           // trailing zero samples that flush the pipeline
  localparam int W       = 3 * J1 * K1;  // samples around the change left uncompared
  localparam int NCHK    = T - 2 * J1 * K1 * 2;  // results waited for

  logic clk = 0, io_clk = 0, rst_n = 1, io_rst_n = 1;
  always #7.5 clk = ~clk;
  always #5   io_clk = ~io_clk;

  logic               in_valid, in_ready, out_valid, out_ready;
  logic signed [15:0] in_data;
  logic signed [39:0] out_data;
  logic               coef_we;
  logic [3:0]         coef_tap;
  logic signed [15:0] coef_data;

  firgen_top dut (
    .clk, .rst_n, .io_clk, .io_rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .coef_we, .coef_tap, .coef_data
  );

  int checks = 0, failures = 0;
  logic signed [15:0] u     [T];
  logic signed [15:0] a_old [N];
  logic signed [15:0] a_new [N];

  function automatic longint ref_y(int i);
    longint acc = 0;
    for (int j = 0; j < N; j++)
      if (i - j >= 0) acc += longint'(i >= S ? a_new[j] : a_old[j]) * longint'(u[i - j]);
    return acc;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // ---- stimulus ----
  int  sent = 0;
  bit  paused = 1;
  int  gap_mode = 0;

  initial begin
    in_valid = 0; in_data = '0; out_ready = 1;
    coef_we = 0; coef_tap = '0; coef_data = '0;
    for (int i = 0; i < T; i++) u[i] = (i < T - TZ) ? 16'($urandom) : 16'sd0;
    u[0] = 16'sh7fff; u[1] = 16'sh8000;  // extremes of the sample range
    for (int j = 0; j < N; j++) begin
      a_old[j] = 16'($urandom);
      a_new[j] = 16'($urandom);
    end
    a_old[0] = 16'sh8000;  // extreme product (-32768 * 32767, -32768 * -32768)
    #1 rst_n = 0; io_rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; io_rst_n = 1;
    load_coefs(0);
    paused = 0;
  end

  task automatic load_coefs(bit second);
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      coef_we = 1; coef_tap = 4'(j); coef_data = second ? a_new[j] : a_old[j];
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  // input driver (io_clk): random gaps, pause at sample S until the coefficients are changed
  bit switched = 0;
  always @(posedge io_clk) begin
    int nxt;
    nxt = sent + int'(in_valid && in_ready);
    sent <= nxt;
    if (!in_valid || in_ready) begin
      if (!paused && nxt < T && (nxt != S || switched) &&
          (gap_mode == 0 || $urandom_range(0, 3) == 0)) begin
        in_valid <= 1'b1;
        in_data  <= u[nxt];
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  int n_coef_change = 0;
  initial begin
    wait (sent == S);
    repeat (200) @(posedge clk);  // the array drains what it can and stalls on empty FIFOs
    load_coefs(1);
    switched = 1;
    n_coef_change++;
  end

  // phases: fast input, starved input, blocked output
  int n_out_block = 0;
  initial begin
    wait (rst_n);
    gap_mode = 0;
    wait (sent >= 100);
    gap_mode = 1;
    wait (sent >= 200);
    gap_mode = 0;
    wait (sent >= 400);
    repeat (50) begin
      @(negedge io_clk);
      out_ready = 0;
      repeat ($urandom_range(50, 400)) @(negedge io_clk);
      out_ready = 1;
      repeat ($urandom_range(5, 60)) @(negedge io_clk);
      n_out_block++;
    end
  end

  // ---- output check (io_clk) ----
  int received = 0, uncompared = 0;
  always @(posedge io_clk) begin
    if (io_rst_n && out_valid && out_ready) begin
      if (received >= S - W && received < S) begin
        uncompared++;
      end else if (received < T) begin
        checks++;
        if (longint'(out_data) != ref_y(received))
          fail($sformatf("y(%0d) = %0d, expected %0d", received, out_data, ref_y(received)));
      end
      received <= received + 1;
    end
  end

  // ---- schedule and stall observation (filter clock) ----
  longint acyc = 0;       // array time: cycles in which the array advanced
  longint rd_time [T];
  int     n_rd = 0, n_wr = 0;
  int     n_stall_in = 0, n_stall_out = 0;
  int     n_rate = 0, n_lat = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (!dut.en) begin
        for (int r = 0; r < K1; r++) begin
          if (dut.u_rd[r] && dut.in_emp[r])  n_stall_in++;
          if (dut.y_wr[r] && dut.out_full[r]) n_stall_out++;
        end
      end else begin
        for (int r = 0; r < K1; r++) begin
          if (dut.u_rd[r] && n_rd < T) begin
            rd_time[n_rd] = acyc;
            if (n_rd >= J1 * K1) begin
              checks++; n_rate++;
              if (acyc - rd_time[n_rd - J1 * K1] != LAM_L1)
                fail($sformatf("sample %0d read %0d array cycles after sample %0d, expected %0d",
                               n_rd, acyc - rd_time[n_rd - J1 * K1], n_rd - J1 * K1, LAM_L1));
            end
            n_rd++;
          end
          if (dut.y_wr[r] && n_wr < n_rd) begin
            checks++; n_lat++;
            if (acyc - rd_time[n_wr] != LATENCY + 1)
              fail($sformatf("y(%0d) written %0d array cycles after u(%0d) was read, expected %0d",
                             n_wr, acyc - rd_time[n_wr], n_wr, LATENCY + 1));
            n_wr++;
          end
        end
        acyc++;
      end
    end
  end

  // ---- end of test ----
  initial begin
    wait (received >= NCHK);
    repeat (20) @(posedge io_clk);
    $display("samples in %0d, results out %0d (uncompared around the change: %0d)",
             sent, received, uncompared);
    $display("stall on empty input FIFO: %0d cycles, stall on full output FIFO: %0d cycles",
             n_stall_in, n_stall_out);
    $display("coefficient changes: %0d, output blocks: %0d, rate checks: %0d, latency checks: %0d",
             n_coef_change, n_out_block, n_rate, n_lat);
    checks++; if (n_stall_in == 0)    fail("input stall never happened");
    checks++; if (n_stall_out == 0)   fail("output stall never happened");
    checks++; if (n_coef_change == 0) fail("coefficient change never happened");
    checks++; if (uncompared != W)    fail("wrong number of results around the change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog, %0d results received", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
