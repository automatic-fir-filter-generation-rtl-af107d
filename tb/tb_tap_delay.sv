// tb_tap_delay: checks that tap m of the delay chain shows the input as it was m enabled clock
// cycles earlier, with random stalls, against a history kept by the testbench.
`timescale 1ns/1ps
module tb_tap_delay;
  localparam int W = 8, D = 5;
  logic clk = 0, en;
  logic [W-1:0] d;
  logic [W-1:0] taps [D];
  always #5 clk = ~clk;

  tap_delay #(.WIDTH(W), .DEPTH(D)) dut (.clk, .en, .d, .taps);

  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];  // values of d at enabled edges, newest first
  int cyc = 0;

  initial begin
    en = 0; d = '0;
    repeat (400) begin
      @(negedge clk);
      // compare after the chain has been filled
      checks++;
      if (taps[0] !== d) begin failures++; $display("FAIL: tap 0 is not the input"); end
      for (int m = 1; m < D; m++) begin
        if (hist.size() >= m) begin
          checks++;
          if (taps[m] !== hist[m-1]) begin
            failures++;
            $display("FAIL: tap %0d = %0h, expected %0h", m, taps[m], hist[m-1]);
          end
        end
      end
      d  = W'($urandom);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) hist.push_front(d);
      cyc++;
    end
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
