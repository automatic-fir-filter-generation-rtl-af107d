// tb_io_control: I/O control unit with K1 = 3 rows and runs of J1 = 2 samples.
// Input side: sample k must be written into row (k / J1) mod K1; the testbench models the row
// FIFOs as queues of depth 3 so that in_ready drops when the current row is full. Output side:
// the testbench preloads the row output queues with tagged words in row order and checks that
// the output stream returns them in sample order, with random out_ready and empty rows.
`timescale 1ns/1ps
module tb_io_control;
  localparam int K1 = 3, J1 = 2, DW = 16, AW = 40, QD = 3;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [DW-1:0] in_data, fifo_wdata;
  logic [AW-1:0] out_data;
  logic fifo_wr [K1], fifo_full [K1], fifo_rd [K1], fifo_empty [K1];
  logic [AW-1:0] fifo_rdata [K1];

  io_control #(.K1(K1), .J1(J1), .DATA_W(DW), .ACC_W(AW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .fifo_wr, .fifo_wdata, .fifo_full,
    .fifo_rd, .fifo_rdata, .fifo_empty, .out_valid, .out_ready, .out_data);

  int checks = 0, failures = 0;
  logic [DW-1:0] inq  [K1][$];
  logic [AW-1:0] outq [K1][$];

  always_comb begin
    for (int r = 0; r < K1; r++) begin
      fifo_full[r]  = (inq[r].size() >= QD);
      fifo_empty[r] = (outq[r].size() == 0);
      fifo_rdata[r] = fifo_empty[r] ? '0 : outq[r][0];
    end
  end

  int n_in = 0, n_out = 0, n_blocked = 0;
  int next_out_feed = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < K1; r++) begin
        if (fifo_wr[r]) begin
          checks++;
          if (r != (n_in / J1) % K1 || fifo_wdata !== in_data) begin
            failures++; $display("FAIL: sample %0d went to row %0d", n_in, r);
          end
          inq[r].push_back(fifo_wdata);
          n_in++;
        end
        if (fifo_rd[r]) void'(outq[r].pop_front());
      end
      if (in_valid && !in_ready) n_blocked++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== AW'(n_out) * 7 + 1) begin
          failures++; $display("FAIL: output %0d is %0d", n_out, out_data);
        end
        n_out++;
      end
      // the testbench drains the row input FIFOs slowly and feeds results per row
      if ($urandom_range(0, 3) == 0) begin
        for (int r = 0; r < K1; r++)
          if (inq[r].size() && $urandom_range(0, 1) == 0) void'(inq[r].pop_front());
      end
      if (next_out_feed < 300 && $urandom_range(0, 1) == 0) begin
        // result k belongs to row (k / J1) mod K1
        outq[(next_out_feed / J1) % K1].push_back(AW'(next_out_feed) * 7 + 1);
        next_out_feed++;
      end
    end
  end

  always @(negedge clk) begin
    in_valid  <= ($urandom_range(0, 1) == 1);
    in_data   <= DW'($urandom);
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    wait (n_out == 300);
    checks++;
    if (n_blocked == 0) begin failures++; $display("FAIL: input never blocked by a full row"); end
    $display("inputs %0d outputs %0d blocked %0d", n_in, n_out, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
