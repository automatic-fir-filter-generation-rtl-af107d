// io_control: global I/O control unit of the filter, in the I/O clock domain.
//
// Samples i = J1*(K1*l1 + k1) + j1 are processed by array row k1, so the unit writes the input
// stream into the row input FIFOs in runs of J1 consecutive samples, row 0, 1, ..., K1-1, then
// row 0 again. Results come out of the row output FIFOs in the same order, and the output
// multiplexer reads them back the same way, so the output stream is in sample order.
//
// Interface and timing (ready/valid on both streams, a transfer when both are high at a rising
// edge of io_clk): in_ready is high when the FIFO of the current input row is not full;
// out_valid is high when the FIFO of the current output row is not empty, and out_data is that
// FIFO's head. fifo_wr / fifo_rd are the per-row write and read strobes.
module io_control #(
  parameter int unsigned K1     = 2,
  parameter int unsigned J1     = 2,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  // input stream
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  // input FIFOs
  output logic              fifo_wr    [K1],
  output logic [DATA_W-1:0] fifo_wdata,
  input  logic              fifo_full  [K1],
  // output FIFOs
  output logic              fifo_rd    [K1],
  input  logic [ACC_W-1:0]  fifo_rdata [K1],
  input  logic              fifo_empty [K1],
  // output stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [ACC_W-1:0]  out_data
);

  localparam int unsigned RW = (K1 > 1) ? $clog2(K1) : 1;
  localparam int unsigned CW = (J1 > 1) ? $clog2(J1) : 1;

  logic [RW-1:0] in_row, out_row;
  logic [CW-1:0] in_cnt, out_cnt;
  logic          in_fire, out_fire;

  assign in_ready   = !fifo_full[in_row];
  assign in_fire    = in_valid && in_ready;
  assign fifo_wdata = in_data;

  assign out_valid = !fifo_empty[out_row];
  assign out_data  = fifo_rdata[out_row];
  assign out_fire  = out_valid && out_ready;

  always_comb begin
    for (int r = 0; r < K1; r++) begin
      fifo_wr[r] = in_fire && (in_row == RW'(r));
      fifo_rd[r] = out_fire && (out_row == RW'(r));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row  <= '0;
      in_cnt  <= '0;
      out_row <= '0;
      out_cnt <= '0;
    end else begin
      if (in_fire) begin
        if (in_cnt == CW'(J1 - 1)) begin
          in_cnt <= '0;
          in_row <= (in_row == RW'(K1 - 1)) ? '0 : in_row + 1'b1;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
      if (out_fire) begin
        if (out_cnt == CW'(J1 - 1)) begin
          out_cnt <= '0;
          out_row <= (out_row == RW'(K1 - 1)) ? '0 : out_row + 1'b1;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end

endmodule
