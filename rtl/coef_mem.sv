// coef_mem: coefficient memory of one processor-array column.
//
// Column k2 of the array needs only the taps j with (j / J2) mod K2 == k2, that is J2*L2
// coefficients, stored at address j2 + J2*l2 (j2 = j mod J2, l2 = j / (J2*K2)). Because the
// coefficients live in a RAM rather than in the logic, they can be rewritten at run time.
//
// Interface and timing: one synchronous write port (we, waddr, wdata, written at the rising clock
// edge) and one asynchronous read port (raddr -> rdata in the same cycle), as a LUT RAM of the
// target FPGA would provide; the processor reading it expects the word in the cycle it
// addresses it. The content is not reset; coefficients are loaded before the filter runs.
module coef_mem #(
  parameter int unsigned COEF_W = 16,
  parameter int unsigned DEPTH  = 6,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [ADDR_W-1:0]        waddr,
  input  logic signed [COEF_W-1:0] wdata,
  input  logic [ADDR_W-1:0]        raddr,
  output logic signed [COEF_W-1:0] rdata
);

  logic signed [COEF_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
