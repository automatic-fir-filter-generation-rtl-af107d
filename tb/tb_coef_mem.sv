// tb_coef_mem: writes random coefficients at random addresses, reads every address back in the
// same cycle it is addressed (asynchronous read), and checks that a write is visible only after
// its clock edge and that addresses beyond the depth read as zero and are not written.
`timescale 1ns/1ps
module tb_coef_mem;
  localparam int W = 16, D = 6, AW = 3;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic signed [W-1:0] wdata, rdata;
  always #5 clk = ~clk;

  coef_mem #(.COEF_W(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0;
  logic signed [W-1:0] model [D];

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (300) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, 7));
      #1;
      checks++;
      if (rdata !== ((raddr < D) ? model[raddr] : '0)) begin
        failures++;
        $display("FAIL: addr %0d read %0d, expected %0d", raddr, rdata,
                 (raddr < D) ? model[raddr] : 0);
      end
      we = ($urandom_range(0, 1) == 1); waddr = AW'($urandom_range(0, 7)); wdata = W'($urandom);
      raddr = waddr;
      #1;
      if (we && waddr < D) begin
        checks++;  // not yet written before the edge
        if (rdata !== model[waddr]) begin failures++; $display("FAIL: write visible early"); end
      end
      @(posedge clk);
      if (we && waddr < D) model[waddr] = wdata;
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
