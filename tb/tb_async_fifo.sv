// tb_async_fifo: dual-clock FIFO with unrelated write (10 ns) and read (14.3 ns) clocks.
// A random stream is pushed and popped with random enables; every popped word is compared with
// a scoreboard. The test also fills the FIFO with the reader stopped and checks that exactly
// 2**AW words are accepted before full, that empty rises once everything is read, and that
// full and empty each occurred.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 12, AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  always #5    wclk = ~wclk;
  always #7.15 rclk = ~rclk;

  logic winc, rinc, wfull, rempty;
  logic [W-1:0] wdata, rdata;

  async_fifo #(.WIDTH(W), .AW(AW)) dut (.wclk, .wrst_n, .winc, .wdata, .wfull,
                                         .rclk, .rrst_n, .rinc, .rdata, .rempty);

  int checks = 0, failures = 0;
  logic [W-1:0] sb [$];
  bit wr_on = 0, rd_on = 0, stop_rd = 0;
  int n_full = 0, n_empty = 0, n_pushed = 0, n_popped = 0;

  always @(posedge wclk) begin
    if (winc && !wfull) begin sb.push_back(wdata); n_pushed++; end
    if (wfull) n_full++;
  end
  always @(negedge wclk) begin
    winc  <= wr_on && ($urandom_range(0, 2) != 0);
    wdata <= W'($urandom);
  end

  always @(posedge rclk) begin
    if (rinc && !rempty) begin
      checks++;
      if (sb.size() == 0 || rdata !== sb[0]) begin
        failures++;
        $display("FAIL: read %0h, expected %0h", rdata, sb.size() ? sb[0] : 0);
      end
      if (sb.size()) void'(sb.pop_front());
      n_popped++;
    end
    if (rempty) n_empty++;
  end
  always @(negedge rclk) rinc <= rd_on && !stop_rd && ($urandom_range(0, 2) != 0);

  initial begin
    winc = 0; rinc = 0; wdata = '0;
    #1 wrst_n = 0; rrst_n = 0;
    #30 wrst_n = 1; rrst_n = 1;
    // phase 1: fill with the reader stopped
    #20;
    @(negedge wclk); wr_on = 1;
    repeat (100) @(posedge wclk);
    @(negedge wclk); wr_on = 0;
    checks++;
    if (n_pushed != 2**AW || !wfull) begin
      failures++; $display("FAIL: %0d words accepted before full (full=%0d)", n_pushed, wfull);
    end
    // phase 2: both sides random
    rd_on = 1; wr_on = 1;
    repeat (2000) @(posedge wclk);
    wr_on = 0;
    repeat (200) @(posedge rclk);
    checks++;
    if (!rempty || sb.size() != 0) begin
      failures++; $display("FAIL: not empty at the end (%0d left)", sb.size());
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL: full/empty not seen"); end
    $display("pushed %0d popped %0d", n_pushed, n_popped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
