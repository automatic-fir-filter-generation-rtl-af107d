// firgen_top: streaming FIR filter y(i) = sum_{j<N} a(j) * u(i-j) on a K1 x K2 processor array.
//
// The filter is a two-dimensional pipelined processor array produced by co-partitioning the
// (sample, tap) iteration space: each processor computes one LS tile of J1 samples x J2 taps
// sequentially, all K1*K2 tiles of a GS tile run in parallel, and the GS tiles run one after
// another (L2 = N / (J2*K2) of them per block of J1*K1 samples). Around the array sit
//   - one input FIFO and one output FIFO per array row, dual-clock, between the I/O clock
//     (io_clk) and the filter clock (clk);
//   - the I/O control unit, which deals the input stream out to the row FIFOs in runs of J1
//     samples and gathers the results back in sample order through the output multiplexer;
//   - one coefficient memory per array column, writable at run time;
//   - the global counter unit, whose iteration counters travel through the array.
// The array advances only in filter cycles where every input FIFO it reads holds a sample and
// every output FIFO it writes has room; otherwise the whole array, counters included, stalls
// for that cycle (the stall is this implementation's own way of meeting empty or full FIFOs).
//
// Options: PARTIAL selects partial localization (lower latency), ROW_MAJOR the scan order of
// an LS tile, LINK_FIFO the FIFO form of the long wrap-around links, MAC_PIPE a pipeline
// register inside each processor's multiply-accumulate (one cycle more latency).
// Interface:
//   io_clk domain: in_valid/in_ready/in_data (signed samples), out_valid/out_ready/out_data
//                  (signed results, ACC_W bits, full precision), ready/valid handshakes.
//   clk domain:    coef_we/coef_tap/coef_data write coefficient a(coef_tap).
// Timing: with the default schedule the array takes J1*K1 = 4 samples per LAM_L1 = 16 filter
// cycles and y(i) is complete 19 filter cycles after u(i) enters the array. Because the array
// is a pipeline that runs only when input is available, the last results of a finite stream
// appear only after further samples (zeros, for instance) have been fed in.
// Resets are active low and asynchronous; both must be applied together.
module firgen_top
  import firgen_pkg::*;
#(
  parameter int unsigned K1        = 2,
  parameter int unsigned K2        = 2,
  parameter int unsigned J1        = 2,
  parameter int unsigned J2        = 3,
  parameter int unsigned N         = 12,
  parameter bit          ROW_MAJOR = 1'b0,
  parameter bit          PARTIAL   = 1'b0,
  parameter bit          LINK_FIFO = 1'b1,
  parameter bit          MAC_PIPE  = 1'b0,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned ACC_W     = 40,
  parameter int unsigned FIFO_AW   = 4,
  parameter int unsigned L2        = N / (J2 * K2),
  parameter int unsigned LAM_L1    = lam_l1(J1, J2, K1, K2, L2, ROW_MAJOR, PARTIAL),
  parameter int unsigned TAP_W     = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     io_clk,
  input  logic                     io_rst_n,
  // sample stream (io_clk)
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  // result stream (io_clk)
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [ACC_W-1:0]  out_data,
  // coefficient load (clk)
  input  logic                     coef_we,
  input  logic [TAP_W-1:0]         coef_tap,
  input  logic signed [COEF_W-1:0] coef_data
);

  localparam int unsigned ADDR_W = (J2 * L2 > 1) ? $clog2(J2 * L2) : 1;
  localparam int unsigned LAM_L2 = lam_l2(J1, J2, K2, ROW_MAJOR, PARTIAL);

  // ---- I/O control unit (io_clk) ----
  logic              in_wr    [K1];
  logic [DATA_W-1:0] in_wdata;
  logic              in_full  [K1];
  logic              out_rd   [K1];
  logic [ACC_W-1:0]  out_rdat [K1];
  logic              out_emp  [K1];
  logic [ACC_W-1:0]  out_mux;

  io_control #(.K1(K1), .J1(J1), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_ioc (
    .clk       (io_clk),
    .rst_n     (io_rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .fifo_wr   (in_wr),
    .fifo_wdata(in_wdata),
    .fifo_full (in_full),
    .fifo_rd   (out_rd),
    .fifo_rdata(out_rdat),
    .fifo_empty(out_emp),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_mux)
  );
  assign out_data = out_mux;

  // ---- row FIFOs ----
  logic [DATA_W-1:0]        u_head  [K1];
  logic signed [DATA_W-1:0] u_in    [K1];
  logic                     in_emp  [K1];
  logic                     u_rd    [K1];
  logic signed [ACC_W-1:0]  y_out   [K1];
  logic                     y_wr    [K1];
  logic                     out_full[K1];
  logic                     en;

  for (genvar r = 0; r < K1; r++) begin : g_fifo
    async_fifo #(.WIDTH(DATA_W), .AW(FIFO_AW)) u_in_fifo (
      .wclk(io_clk), .wrst_n(io_rst_n), .winc(in_wr[r]), .wdata(in_wdata), .wfull(in_full[r]),
      .rclk(clk), .rrst_n(rst_n), .rinc(u_rd[r] && en), .rdata(u_head[r]), .rempty(in_emp[r]));
    assign u_in[r] = u_head[r];

    async_fifo #(.WIDTH(ACC_W), .AW(FIFO_AW)) u_out_fifo (
      .wclk(clk), .wrst_n(rst_n), .winc(y_wr[r] && en), .wdata(y_out[r]), .wfull(out_full[r]),
      .rclk(io_clk), .rrst_n(io_rst_n), .rinc(out_rd[r]), .rdata(out_rdat[r]),
      .rempty(out_emp[r]));
  end

  // ---- global stall ----
  always_comb begin
    en = 1'b1;
    for (int r = 0; r < K1; r++) begin
      if (u_rd[r] && in_emp[r])  en = 1'b0;
      if (y_wr[r] && out_full[r]) en = 1'b0;
    end
  end

  // ---- coefficient memories: tap j -> column (j / J2) mod K2, address j mod J2 + J2*l2 ----
  logic [ADDR_W-1:0]        coef_raddr [K2];
  logic signed [COEF_W-1:0] coef_rdata [K2];
  logic [TAP_W-1:0]         wcol;
  logic [ADDR_W-1:0]        waddr;

  always_comb begin
    wcol  = TAP_W'((coef_tap / TAP_W'(J2)) % TAP_W'(K2));
    waddr = ADDR_W'(coef_tap % TAP_W'(J2)) + ADDR_W'(J2) * ADDR_W'(coef_tap / TAP_W'(J2 * K2));
  end

  for (genvar c = 0; c < K2; c++) begin : g_coef
    coef_mem #(.COEF_W(COEF_W), .DEPTH(J2 * L2), .ADDR_W(ADDR_W)) u_cmem (
      .clk  (clk),
      .we   (coef_we && (wcol == TAP_W'(c))),
      .waddr(waddr),
      .wdata(coef_data),
      .raddr(coef_raddr[c]),
      .rdata(coef_rdata[c])
    );
  end

  // ---- counter unit and processor array ----
  cnt_t cnt;

  counter_unit #(
    .J1(J1), .J2(pts_j2(J2, PARTIAL)), .L2(L2), .ROW_MAJOR(ROW_MAJOR), .LAM_L2(LAM_L2),
    .LAM_L1(LAM_L1)
  ) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt)
  );

  proc_array #(
    .K1(K1), .K2(K2), .J1(J1), .J2(J2), .N(N), .ROW_MAJOR(ROW_MAJOR), .PARTIAL(PARTIAL),
    .LINK_FIFO(LINK_FIFO), .MAC_PIPE(MAC_PIPE),
    .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .L2(L2), .LAM_L1(LAM_L1), .ADDR_W(ADDR_W)
  ) u_pa (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .cnt_in   (cnt),
    .u_in     (u_in),
    .u_rd     (u_rd),
    .coef_addr(coef_raddr),
    .coef_data(coef_rdata),
    .y_out    (y_out),
    .y_wr     (y_wr)
  );

endmodule
