// tb_fir_pe: processor element, checked in two positions of a 2x2 array with 2x3 tiles and
// 12 taps: processor (0,0) (first row and column: coefficient memory, input FIFO, wrap-around
// links) and processor (1,1) (last column: links from above/left, finished results).
// A third instance is processor (1,1) of the partially localized array: tiles start their sum
// from zero, the sample at a tile's first tap column comes from the border input (zero when
// i - j < 0), and the extra point j2 = J2 adds the running sum of the previous tile.
// Random iteration counters and random link values are applied; the expected operands follow
// from the global indices of the point: sample i = j1 + J1*k1 + J1*K1*l1, tap
// j = j2 + J2*k2 + J2*K2*l2, and "first sample" for j1 = k1 = l1 = 0. The registered a, u, y, the result flag and the combinational FIFO read
// request and coefficient address are compared, including hold while en is low.
// A fourth instance is processor (1,1) with the pipelined multiply-accumulate (MAC_PIPE): its
// y and result flag must be those of the previous enabled point, added to the y-link value
// present one enabled cycle later.
`timescale 1ns/1ps
module tb_fir_pe;
  import firgen_pkg::*;
  localparam int K1 = 2, K2 = 2, J1 = 2, J2 = 3, L2 = 2, DW = 16, CW = 16, AW = 40, ADW = 3;
  logic clk = 0, rst_n = 1, en;
  always #5 clk = ~clk;

  cnt_t cnt;
  logic signed [DW-1:0] u_fifo;
  logic signed [DW-1:0] u_link [3][3];
  logic signed [DW-1:0] u_border [J1][L2];
  logic signed [CW-1:0] a_mem;
  logic signed [CW-1:0] a_link [2];
  logic signed [AW-1:0] y_link [3];

  logic                 rd   [3];
  logic [ADW-1:0]       addr [3];
  logic signed [AW-1:0] yq3;
  logic                 yl3;
  logic                 rd3;
  logic [ADW-1:0]       addr3;
  logic signed [DW-1:0] uq3;
  logic signed [CW-1:0] aq3;
  logic signed [DW-1:0] uq   [3];
  logic signed [CW-1:0] aq   [3];
  logic signed [AW-1:0] yq   [3];
  logic                 yl   [3];

  fir_pe #(.K1POS(0), .K2POS(0), .K1(K1), .K2(K2), .J1(J1), .J2(J2), .L2(L2), .ADDR_W(ADW)) pe0 (
    .clk, .rst_n, .en, .cnt, .u_fifo, .u_link, .u_border, .a_mem, .a_link, .y_link,
    .fifo_rd(rd[0]), .coef_addr(addr[0]), .u_q(uq[0]), .a_q(aq[0]), .y_q(yq[0]), .y_last(yl[0]));
  fir_pe #(.K1POS(1), .K2POS(1), .K1(K1), .K2(K2), .J1(J1), .J2(J2), .L2(L2), .ADDR_W(ADW)) pe1 (
    .clk, .rst_n, .en, .cnt, .u_fifo, .u_link, .u_border, .a_mem, .a_link, .y_link,
    .fifo_rd(rd[1]), .coef_addr(addr[1]), .u_q(uq[1]), .a_q(aq[1]), .y_q(yq[1]), .y_last(yl[1]));
  fir_pe #(.K1POS(1), .K2POS(1), .K1(K1), .K2(K2), .J1(J1), .J2(J2), .L2(L2), .PARTIAL(1'b1),
           .ADDR_W(ADW)) pe2 (
    .clk, .rst_n, .en, .cnt, .u_fifo, .u_link, .u_border, .a_mem, .a_link, .y_link,
    .fifo_rd(rd[2]), .coef_addr(addr[2]), .u_q(uq[2]), .a_q(aq[2]), .y_q(yq[2]), .y_last(yl[2]));

  fir_pe #(.K1POS(1), .K2POS(1), .K1(K1), .K2(K2), .J1(J1), .J2(J2), .L2(L2), .MAC_PIPE(1'b1),
           .ADDR_W(ADW)) pe3 (
    .clk, .rst_n, .en, .cnt, .u_fifo, .u_link, .u_border, .a_mem, .a_link, .y_link,
    .fifo_rd(rd3), .coef_addr(addr3), .u_q(uq3), .a_q(aq3), .y_q(yq3), .y_last(yl3));

  int checks = 0, failures = 0;
  // pipelined instance: what the previous enabled point left in the pipeline register
  bit                   pv_ok = 0, pv_zero = 0, pv_last = 0;
  int                   pv_cj = 0;
  logic signed [AW-1:0] pv_prod = '0;
  logic signed [AW-1:0] ey3;
  bit                   el3, ok3;
  int                   n_pipe = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic signed [DW-1:0] eu [3];
  logic signed [CW-1:0] ea [3];
  logic signed [AW-1:0] ey [3];
  logic                 el [3];
  int n_first_tap = 0, n_first_sample = 0, n_mem = 0;

  initial begin
    en = 0; cnt = '0; u_fifo = '0; a_mem = '0;
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) u_link[a][b] = '0;
    for (int a = 0; a < J1; a++) for (int b = 0; b < L2; b++) u_border[a][b] = '0;
    a_link[0] = '0; a_link[1] = '0; y_link[0] = '0; y_link[1] = '0; y_link[2] = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    check(yl[0] == 0 && yl[1] == 0 && yl[2] == 0, "result flag not cleared by reset");
    repeat (2000) begin
      @(negedge clk);
      cnt.valid    = ($urandom_range(0, 5) != 0);
      cnt.j1       = CNT_W'($urandom_range(0, 1));
      cnt.j2       = CNT_W'($urandom_range(0, J2));  // J2 only exists in the partial array
      cnt.l2       = CNT_W'($urandom_range(0, L2 - 1));
      cnt.l1       = CNT_W'($urandom_range(0, 3));
      u_fifo = DW'($urandom); a_mem = CW'($urandom);
      for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) u_link[a][b] = DW'($urandom);
      for (int a = 0; a < J1; a++) for (int b = 0; b < L2; b++) u_border[a][b] = DW'($urandom);
      a_link[0] = CW'($urandom); a_link[1] = CW'($urandom);
      for (int b = 0; b < 3; b++) y_link[b] = AW'($urandom) << $urandom_range(0, 8);
      en = ($urandom_range(0, 4) != 0);
      #1;
      // pipelined copy: adds the previous point's product to this cycle's y link
      ok3 = pv_ok;
      ey3 = (pv_zero ? 0 : y_link[pv_cj]) + pv_prod;
      el3 = pv_last;
      for (int p = 0; p < 3; p++) begin
        int k1, k2, i, j, ci, cj;
        bit first_sample, part;
        logic signed [AW-1:0] yin, add;
        part = (p == 2);
        if (!part && cnt.j2 == J2) continue;  // no such point in the fully localized array
        k1 = (p == 0) ? 0 : 1; k2 = k1;
        i  = cnt.j1 + J1 * k1 + J1 * K1 * cnt.l1;
        j  = cnt.j2 + J2 * k2 + J2 * K2 * cnt.l2;
        first_sample = (cnt.j1 == 0 && k1 == 0 && cnt.l1 == 0);
        // source of u[i-1, j-1] and a[i-1, j]: 0 own tile, 1 neighbour, 2 wrap-around
        ci = (cnt.j1 > 0) ? 0 : (k1 > 0 ? 1 : 2);
        cj = (cnt.j2 > 0) ? 0 : (k2 > 0 ? 1 : 2);
        if (j == 0 && cnt.j2 == 0) begin eu[p] = u_fifo; n_first_tap += (p == 0); end
        else if (part && cnt.j2 == 0) eu[p] = (i < j) ? 16'sd0 : u_border[cnt.j1][cnt.l2];
        else begin
          eu[p] = first_sample ? 16'sd0 : u_link[ci][cj];
          if (first_sample) n_first_sample++;
        end
        ea[p] = (ci == 2) ? a_mem : a_link[ci];
        if (ci == 2) n_mem++;
        add = AW'(longint'(eu[p]) * longint'(ea[p]));
        if (!part) yin = (j == 0) ? 0 : y_link[cj];
        else begin
          yin = (cnt.j2 == 0) ? 0 : y_link[0];
          if (cnt.j2 == J2) add = y_link[1];  // running sum from the left processor
        end
        ey[p] = yin + add;
        el[p] = cnt.valid && (part ? (cnt.j2 == J2 && cnt.l2 == L2 - 1)
                                   : (j == K2 * J2 * L2 - 1));
        check(rd[p] == (cnt.valid && j == 0 && cnt.j2 == 0), $sformatf("pe%0d fifo_rd", p));
        if (p == 0) check(addr[p] == ADW'(cnt.j2 + J2 * cnt.l2), "coefficient address");
        if (p == 1) begin
          if (en) begin
            pv_ok   = 1;
            pv_zero = (j == 0);
            pv_cj   = cj;
            pv_prod = add;
            pv_last = el[p];
          end
        end
      end
      if (cnt.j2 == J2 && en) pv_ok = 0;  // no such point in the fully localized array
      begin
        logic signed [DW-1:0] pu [3];
        logic signed [CW-1:0] pa [3];
        logic signed [AW-1:0] py [3];
        logic                 pl [3];
        logic signed [AW-1:0] py3;
        logic                 pl3;
        pu = uq; pa = aq; py = yq; pl = yl; py3 = yq3; pl3 = yl3;
        @(posedge clk); #1;
        if (en && ok3) begin
          n_pipe++;
          check(yq3 == ey3, $sformatf("pe3 (pipelined) y %0d != %0d", yq3, ey3));
          check(yl3 == el3, "pe3 (pipelined) result flag");
        end else if (!en) begin
          check(yq3 == py3 && yl3 == pl3, "pe3 (pipelined) changed while stalled");
        end
        for (int p = 0; p < 3; p++) begin
          if (p < 2 && cnt.j2 == J2) continue;
          if (en) begin
            check(uq[p] == eu[p], $sformatf("pe%0d u %0d != %0d", p, uq[p], eu[p]));
            if (!(p == 2 && cnt.j2 == J2))  // a is not used at a partial-sum point
              check(aq[p] == ea[p], $sformatf("pe%0d a %0d != %0d", p, aq[p], ea[p]));
            check(yq[p] == ey[p], $sformatf("pe%0d y %0d != %0d", p, yq[p], ey[p]));
            check(yl[p] == el[p], $sformatf("pe%0d result flag", p));
          end else begin
            check(uq[p] == pu[p] && aq[p] == pa[p] && yq[p] == py[p] && yl[p] == pl[p],
                  $sformatf("pe%0d changed while stalled", p));
          end
        end
      end
    end
    check(n_first_tap > 0 && n_first_sample > 0 && n_mem > 0, "a multiplexer input never used");
    check(n_pipe > 0, "pipelined instance never checked");
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
