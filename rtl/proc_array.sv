// proc_array: K1 x K2 processor array implementing the localized co-partitioned FIR filter.
//
// Processor (k1, k2) owns LS tile (k1, k2) of every GS tile: samples i with
// (i / J1) mod K1 == k1 and taps j with (j / J2) mod K2 == k2. Row k1 therefore reads its
// samples from input FIFO k1 and delivers the finished y(i) of those samples from its last
// column to output FIFO k1; column k2 reads the coefficients of its taps from coefficient
// memory k2 (only the first row reads the memory; lower rows receive a from the row above).
//
// All data dependencies are local links with delay registers. The number of registers on a link
// is n = lambda . d (see firgen_pkg), counted from the producer's point register, so a consumer
// reads tap n-1 of the producer's delay chain (tap_delay). The links are:
//   a: own (D_a0), from the row above (D_a);
//   u: nine cases (ci, cj) = inside the tile / from the neighbour / wrap-around in each
//      dimension, e.g. own (D_u0), from the left, from above, diagonal, and the wrap-around
//      paths from the last column back to the first and from the last row back to the first;
//   y: own (D_y0), from the left (D_y1), wrap-around from the last column (D_y2).
// With the default parameters the delays are D_u0 = 3, D_u1 = 2, D_u3 = 3, D_u(diagonal) = 2
// and the longest wrap-around D_u = 14 (last row, last column to processor (0,0)).
// With PARTIAL set (partial localization) the u links that cross a column border are replaced
// by border links: the first tap column of tile (k2, l2) reads sample u(i - jb) from the delay
// chain of the column-0 processor that read that sample, at a distance computed per (j1, l2);
// the y links across columns connect the partial-sum points (j2 = J2) of consecutive tiles.
// Each LS tile row then holds J2 + 1 points and the default schedule is (1,2,2,1,16,8).
// With LINK_FIFO set (default) the long wrap-around u links from the last row to the first
// row, which carry a value the consumer uses only for a few points per period, are small FIFOs
// (link_fifo): the producer pushes exactly the values that a first-row point will read, and the
// consumer pops them at those points; the delay chains then only need to reach the short
// links. This replaces long shift registers by FIFOs, an area optimization the method names;
// which links qualify (case ci = 2, at least 3 cycles) is this design's choice. MAC_PIPE is
// passed to the processors (see fir_pe).
// The iteration counters of the counter unit reach processor (k1, k2) delayed by
// lamK1*k1 + lamK2*k2 registers: lamK1 between rows (along column 0), lamK2 between columns.
//
// Interface and timing: the array advances only in cycles with en high; the caller lowers en to
// stall everything (counters, delay chains, point registers) together. u_rd[k1] asks, in the
// current cycle, for the head of input FIFO k1 (u_in[k1]), which is consumed if en is high.
// coef_addr[k2] is combinational and coef_data[k2] must answer in the same cycle. y_wr[k1] and
// y_out[k1] are registered and hold until a cycle with en high consumes them.
module proc_array
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
  parameter int unsigned L2        = N / (J2 * K2),
  parameter int unsigned LAM_L1    = lam_l1(J1, J2, K1, K2, L2, ROW_MAJOR, PARTIAL),
  parameter int unsigned ADDR_W    = (J2 * L2 > 1) ? $clog2(J2 * L2) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  cnt_t                     cnt_in,
  input  logic signed [DATA_W-1:0] u_in      [K1],
  output logic                     u_rd      [K1],
  output logic [ADDR_W-1:0]        coef_addr [K2],
  input  logic signed [COEF_W-1:0] coef_data [K2],
  output logic signed [ACC_W-1:0]  y_out     [K1],
  output logic                     y_wr      [K1]
);

  // ---- schedule and link delays ----
  localparam int LJ1 = lam_j1(J2, ROW_MAJOR, PARTIAL);
  localparam int LJ2 = lam_j2(J1, ROW_MAJOR);
  localparam int LK1 = lam_k1(J1, J2, ROW_MAJOR, PARTIAL);
  localparam int LK2 = lam_k2(J1, J2, ROW_MAJOR, PARTIAL);
  localparam int LL2 = lam_l2(J1, J2, K2, ROW_MAJOR, PARTIAL);
  localparam int LL1 = LAM_L1;

  localparam int DI0 = dly_i(0, J1, K1, LJ1, LK1, LL1);
  // partial localization: partial-sum chain and border links
  localparam int DP1 = dly_ps(1, K2, LK2, LL2);
  localparam int DP2 = dly_ps(2, K2, LK2, LL2);
  localparam int DB_MAX = PARTIAL ? bsrc_max(J1, J2, K1, K2, L2, LJ1, LK1, LK2, LL2, LL1) : 1;
  localparam int DB_MIN = PARTIAL ? bsrc_min(J1, J2, K1, K2, L2, LJ1, LK1, LK2, LL2, LL1) : 1;
  localparam int DI1 = dly_i(1, J1, K1, LJ1, LK1, LL1);
  localparam int DI2 = dly_i(2, J1, K1, LJ1, LK1, LL1);
  localparam int DJ0 = dly_j(0, J2, K2, LJ2, LK2, LL2);
  localparam int DJ1 = dly_j(1, J2, K2, LJ2, LK2, LL2);
  localparam int DJ2 = dly_j(2, J2, K2, LJ2, LK2, LL2);

  localparam int DI [3] = '{DI0, DI1, DI2};
  localparam int DJ [3] = '{DJ0, DJ1, DJ2};

  function automatic int max3(int a, int b, int c);
    int m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  localparam int DI_MAX = max3(DI0, DI1, DI2);
  localparam int DJ_MAX = max3(DJ0, DJ1, DJ2);
  // With LINK_FIFO the wrap-around u links from the last row (case ci = 2) that are at least
  // FIFO_MIN cycles long run through link_fifo instead of the producer's delay chain, so the
  // chains only need to reach the other links.
  localparam int FIFO_MIN = 3;
  localparam int DU_CH  = LINK_FIFO ? max3((DI0 > DI1 ? DI0 : DI1) + DJ_MAX, FIFO_MIN - 1, 1)
                                    : DI_MAX + DJ_MAX;
  localparam int DU_MAX = (DU_CH > DB_MAX) ? DU_CH : DB_MAX;
  localparam int DY_MAX = PARTIAL ? max3(DJ0, DP1, DP2) : DJ_MAX;
  localparam int DA_MAX = (DI0 > DI1) ? DI0 : DI1;

  // ---- iteration counters, delayed through the array ----
  cnt_t cnt_pe [K1][K2];

  for (genvar r = 0; r < K1; r++) begin : g_cnt_row
    for (genvar c = 0; c < K2; c++) begin : g_cnt_col
      if (r == 0 && c == 0) begin : g_src
        assign cnt_pe[0][0] = cnt_in;
      end else begin : g_dly
        localparam int D = (c == 0) ? LK1 : LK2;
        cnt_t pipe [D];
        cnt_t from;
        assign from = (c == 0) ? cnt_pe[r-1][0] : cnt_pe[r][c-1];
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            for (int m = 0; m < D; m++) pipe[m] <= '0;
          end else if (en) begin
            pipe[0] <= from;
            for (int m = 1; m < D; m++) pipe[m] <= pipe[m-1];
          end
        end
        assign cnt_pe[r][c] = pipe[D-1];
      end
    end
  end

  // ---- processor outputs and their delay chains ----
  logic signed [DATA_W-1:0] u_q    [K1][K2];
  logic signed [COEF_W-1:0] a_q    [K1][K2];
  logic signed [ACC_W-1:0]  y_q    [K1][K2];
  logic                     y_last [K1][K2];
  logic                     rd     [K1][K2];
  logic [ADDR_W-1:0]        addr   [K1][K2];

  logic [DATA_W-1:0] u_tap [K1][K2][DU_MAX];
  logic [COEF_W-1:0] a_tap [K1][K2][DA_MAX];
  logic [ACC_W-1:0]  y_tap [K1][K2][DY_MAX];

  for (genvar r = 0; r < K1; r++) begin : g_row
    for (genvar c = 0; c < K2; c++) begin : g_col
      tap_delay #(.WIDTH(DATA_W), .DEPTH(DU_MAX)) u_dl (
        .clk(clk), .en(en), .d(u_q[r][c]), .taps(u_tap[r][c]));
      tap_delay #(.WIDTH(COEF_W), .DEPTH(DA_MAX)) a_dl (
        .clk(clk), .en(en), .d(a_q[r][c]), .taps(a_tap[r][c]));
      tap_delay #(.WIDTH(ACC_W), .DEPTH(DY_MAX)) y_dl (
        .clk(clk), .en(en), .d(y_q[r][c]), .taps(y_tap[r][c]));

      // Source processor of each case: 0 = itself, 1 = neighbour, 2 = last row / column.
      localparam int SR [3] = '{r, (r > 0) ? r - 1 : 0, K1 - 1};
      localparam int SC [3] = '{c, (c > 0) ? c - 1 : 0, K2 - 1};

      logic signed [DATA_W-1:0] u_link [3][3];
      logic signed [DATA_W-1:0] u_border [J1][L2];
      logic signed [COEF_W-1:0] a_link [2];

      for (genvar b1 = 0; b1 < J1; b1++) begin : g_b1
        for (genvar b2 = 0; b2 < L2; b2++) begin : g_b2
          if (!PARTIAL || (c == 0 && b2 == 0)) begin : g_none
            assign u_border[b1][b2] = '0;
          end else begin : g_link
            localparam int BR = bsrc_row(b1, r, c, b2, J1, J2, K1, K2);
            localparam int BD = bsrc_dly(b1, r, c, b2, J1, J2, K1, K2, LJ1, LK1, LK2, LL2, LL1);
            assign u_border[b1][b2] = u_tap[BR][0][BD - 1];
          end
        end
      end
      logic signed [ACC_W-1:0]  y_link [3];

      for (genvar ci = 0; ci < 3; ci++) begin : g_ci
        for (genvar cj = 0; cj < 3; cj++) begin : g_cj
          // case 1 exists only off the first row / column, case 2 only on it
          if ((ci == 1 && r == 0) || (ci == 2 && r != 0) ||
              (cj == 1 && c == 0) || (cj == 2 && c != 0) || (PARTIAL && cj != 0)) begin : g_none
            assign u_link[ci][cj] = '0;
          end else if (LINK_FIFO && ci == 2 && DI[ci] + DJ[cj] >= FIFO_MIN) begin : g_fifo
            // Producer (K1-1, SC[cj]) pushes u of its points (j1 = J1-1, j2p, l2p) that this
            // processor reads one GS tile row later; this processor pops at its points
            // (j1 = 0, l1 > 0) of case (2, cj). The push is registered with u_q.
            cnt_t pc, cc;
            logic push_now, push_q, pop;
            assign pc = cnt_pe[K1-1][SC[cj]];
            assign cc = cnt_pe[r][c];
            always_comb begin
              push_now = pc.valid && pc.j1 == CNT_W'(J1 - 1);
              pop      = cc.valid && cc.j1 == '0 && cc.l1 != '0;
              case (cj)
                0: begin
                  push_now = push_now && pc.j2 < CNT_W'(J2 - 1);
                  pop      = pop && cc.j2 != '0 && cc.j2 < CNT_W'(J2);
                end
                1: begin
                  push_now = push_now && pc.j2 == CNT_W'(J2 - 1);
                  pop      = pop && cc.j2 == '0;
                end
                default: begin
                  push_now = push_now && pc.j2 == CNT_W'(J2 - 1) && pc.l2 < CNT_W'(L2 - 1);
                  pop      = pop && cc.j2 == '0 && cc.l2 != '0;
                end
              endcase
            end
            always_ff @(posedge clk or negedge rst_n) begin
              if (!rst_n)  push_q <= 1'b0;
              else if (en) push_q <= push_now;
            end
            link_fifo #(.WIDTH(DATA_W), .DEPTH(DI[ci] + DJ[cj])) u_lf (
              .clk(clk), .rst_n(rst_n), .en(en), .push(push_q), .din(u_q[SR[ci]][SC[cj]]),
              .pop(pop), .dout(u_link[ci][cj]));
          end else begin : g_link
            assign u_link[ci][cj] = u_tap[SR[ci]][SC[cj]][DI[ci] + DJ[cj] - 1];
          end
        end
      end

      assign a_link[0] = a_tap[r][c][DI0 - 1];
      if (r > 0) begin : g_a_up
        assign a_link[1] = a_tap[r-1][c][DI1 - 1];
      end else begin : g_a_none
        assign a_link[1] = '0;
      end

      assign y_link[0] = y_tap[r][c][DJ0 - 1];
      if (c > 0) begin : g_y_left
        assign y_link[1] = y_tap[r][c-1][(PARTIAL ? DP1 : DJ1) - 1];
        assign y_link[2] = '0;
      end else begin : g_y_wrap
        assign y_link[1] = '0;
        assign y_link[2] = y_tap[r][K2-1][(PARTIAL ? DP2 : DJ2) - 1];
      end

      fir_pe #(
        .K1POS(r), .K2POS(c), .K1(K1), .K2(K2), .J1(J1), .J2(J2), .L2(L2), .PARTIAL(PARTIAL),
        .MAC_PIPE(MAC_PIPE),
        .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .ADDR_W(ADDR_W)
      ) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .en       (en),
        .cnt      (cnt_pe[r][c]),
        .u_fifo   (u_in[r]),
        .u_link   (u_link),
        .u_border (u_border),
        .a_mem    (coef_data[c]),
        .a_link   (a_link),
        .y_link   (y_link),
        .fifo_rd  (rd[r][c]),
        .coef_addr(addr[r][c]),
        .u_q      (u_q[r][c]),
        .a_q      (a_q[r][c]),
        .y_q      (y_q[r][c]),
        .y_last   (y_last[r][c])
      );
    end

    assign u_rd[r]  = rd[r][0];
    assign y_out[r] = y_q[r][K2-1];
    assign y_wr[r]  = y_last[r][K2-1];
  end

  for (genvar c = 0; c < K2; c++) begin : g_coef
    assign coef_addr[c] = addr[0][c];
  end

  initial begin
    assert (N == J2 * K2 * L2) else $error("N must equal J2*K2*L2");
    assert (LAM_L1 >= lam_l1(J1, J2, K1, K2, L2, ROW_MAJOR, PARTIAL))
      else $error("LAM_L1 below minimum");
    assert (DI0 >= 1 && DI1 >= 1 && DI2 >= 0 && DJ0 >= 1)
      else $error("schedule gives a link without delay");
    assert (PARTIAL || (DJ1 >= 1 && DJ2 >= 1)) else $error("y link without delay");
    assert (!PARTIAL || (DP1 >= 1 && DP2 >= 1 && DB_MIN >= 1))
      else $error("partial-sum or border link without delay");
    assert (N < J1 * K1 * ((1 << CNT_W) - 1)) else $error("l1 counter too narrow for N");
  end

endmodule
