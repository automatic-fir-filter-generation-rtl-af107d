// fir_pe: processor element of the co-partitioned FIR array.
//
// Each processor owns one LS tile per GS tile and executes one iteration point per cycle:
//   y = y_in + a * u   (fixed-point, full precision multiply, then accumulate).
// Three multiplexers pick the operands, as in the processor of the method's array drawing:
//   MUX_A  coefficient from the coefficient memory (top row, first j1 of a tile) or the value
//          this or the upper processor used earlier (a[i,j] = a[i-1,j]);
//   MUX_U  sample from the row's input FIFO (tap j = 0), zero (sample index i-j < 0), or a
//          delayed copy of a processor's u (u[i,j] = u[i-1,j-1]) chosen by the tile-border case
//          (ci, cj) of the source point: 0 same tile, 1 neighbour, 2 wrap-around;
//   MUX_Y  zero (first tap of the sum) or a delayed partial sum from this, the left, or the
//          last column's processor (y[i,j] = y[i,j-1] + x).
// The local control unit decodes the iteration counters (j1, j2, l2, l1) into these select
// signals and, for border processors, into the input-FIFO read request, the coefficient-memory
// address and the output-FIFO write request.
//
// With PARTIAL set (partial localization) the sum of each tile starts from zero at j2 = 0, an
// extra point j2 = J2 per tile row adds the tile's sum to the running sum of the previous tile
// (the multiplier's place in the adder is then taken by the running sum), and at j2 = 0 the
// sample u(i - jb), jb = first tap of the tile, comes in on u_border[j1][l2] straight from the
// processor that read it. PARTIAL = 0 is the fully localized array.
//
// Interface and timing: the counters and all link inputs belong to the current cycle. a, u and y
// of the point are registered in a_q, u_q and y_q at the end of the cycle (when en is high) and
// are seen by their consumers through delay chains outside this module. fifo_rd and coef_addr
// are combinational. y_last is registered with y_q and marks y_q as a finished filter output
// (only in the last column); it and its pipeline copy are the only reset registers. With
// MAC_PIPE = 0 (default) multiplier and adder work in the same cycle. MAC_PIPE = 1 adds the
// pipeline register between multiplier and adder that the method allows: y_q and y_last then
// belong to the point of the previous cycle, the y links keep their delays, and every result
// appears one cycle later.
module fir_pe
  import firgen_pkg::*;
#(
  parameter int unsigned K1POS   = 0,
  parameter int unsigned K2POS   = 0,
  parameter int unsigned K1      = 2,
  parameter int unsigned K2      = 2,
  parameter int unsigned J1      = 2,
  parameter int unsigned J2      = 3,
  parameter int unsigned L2      = 2,
  parameter bit          PARTIAL = 1'b0,
  parameter bit          MAC_PIPE = 1'b0,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned COEF_W  = 16,
  parameter int unsigned ACC_W   = 40,
  parameter int unsigned ADDR_W  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  cnt_t                      cnt,
  // operand sources
  input  logic signed [DATA_W-1:0]  u_fifo,            // head of the row's input FIFO
  input  logic signed [DATA_W-1:0]  u_link   [3][3],   // [ci][cj] delayed u of source processor
  input  logic signed [DATA_W-1:0]  u_border [J1][L2], // partial localization: u(i - jb)
  input  logic signed [COEF_W-1:0]  a_mem,             // coefficient memory read data
  input  logic signed [COEF_W-1:0]  a_link   [2],      // [ci] delayed a (0: own, 1: upper)
  input  logic signed [ACC_W-1:0]   y_link   [3],      // [cj] delayed y (0: own, 1: left, 2: wrap)
  // border control outputs
  output logic                      fifo_rd,
  output logic [ADDR_W-1:0]         coef_addr,
  // registered results of the point
  output logic signed [DATA_W-1:0]  u_q,
  output logic signed [COEF_W-1:0]  a_q,
  output logic signed [ACC_W-1:0]   y_q,
  output logic                      y_last
);

  // ---- control unit ----
  logic       first_tap;     // global tap index j == 0
  logic       first_sample;  // global sample index i == 0
  logic       tile_start;    // first tap column of a tile (j2 == 0)
  logic       psum_pt;       // partial-sum point (j2 == J2), partial localization only
  logic       neg_sample;    // sample index i - jb < 0 at a tile's first tap column
  logic       coef_load;     // first row of the array at j1 == 0: a from the memory
  logic [1:0] ci, cj;
  logic       last_pt;
  int         i_idx, jb_idx;

  always_comb begin
    tile_start   = (cnt.j2 == '0);
    first_tap    = tile_start && (K2POS == 0) && (cnt.l2 == '0);
    first_sample = (cnt.j1 == '0) && (K1POS == 0) && (cnt.l1 == '0);
    psum_pt      = PARTIAL && (cnt.j2 == CNT_W'(J2));
    i_idx        = int'(cnt.j1) + int'(J1 * K1POS) + int'(J1 * K1) * int'(cnt.l1);
    jb_idx       = int'(J2 * K2POS) + int'(J2 * K2) * int'(cnt.l2);
    neg_sample   = (i_idx < jb_idx);
    coef_load    = (cnt.j1 == '0) && (K1POS == 0);
    ci           = (cnt.j1 != '0) ? 2'd0 : ((K1POS != 0) ? 2'd1 : 2'd2);
    cj           = (cnt.j2 != '0) ? 2'd0 : ((K2POS != 0) ? 2'd1 : 2'd2);
    if (PARTIAL)
      last_pt = (K2POS == K2 - 1) && psum_pt && (cnt.l2 == CNT_W'(L2 - 1));
    else
      last_pt = (K2POS == K2 - 1) && (cnt.j2 == CNT_W'(J2 - 1)) && (cnt.l2 == CNT_W'(L2 - 1));
    fifo_rd      = cnt.valid && first_tap;
    coef_addr    = ADDR_W'(cnt.j2) + ADDR_W'(J2) * ADDR_W'(cnt.l2);
  end

  // ---- multiplexers ----
  logic signed [DATA_W-1:0]        u_sel;
  logic signed [COEF_W-1:0]        a_sel;
  logic signed [ACC_W-1:0]         y_sel;
  logic signed [ACC_W-1:0]         addend;
  logic signed [DATA_W+COEF_W-1:0] prod;
  logic signed [ACC_W-1:0]         y_new;
  logic [1:0]                      cj_ps;  // source of the running sum at a partial-sum point

  // adder operands, decided in the cycle of the point
  logic       ysel_zero;   // MUX_Y: zero
  logic [1:0] ysel_idx;    // MUX_Y: y_link index otherwise
  logic [1:0] add_kind;    // 0: product, 1: zero, 2: running sum y_link[cj_ps]

  always_comb begin
    cj_ps = (K2POS != 0) ? 2'd1 : 2'd2;

    if (first_tap)                       u_sel = u_fifo;
    else if (PARTIAL && tile_start)      u_sel = neg_sample ? '0 : u_border[cnt.j1][cnt.l2];
    else if (first_sample)               u_sel = '0;
    else                                 u_sel = u_link[ci][cj];

    a_sel = coef_load ? a_mem : a_link[ci[0]];
    prod  = u_sel * a_sel;

    if (PARTIAL) begin
      ysel_zero = tile_start;
      ysel_idx  = 2'd0;
      if (!psum_pt)                          add_kind = 2'd0;
      else if (K2POS == 0 && cnt.l2 == '0)   add_kind = 2'd1;
      else                                   add_kind = 2'd2;
    end else begin
      ysel_zero = first_tap;
      ysel_idx  = cj;
      add_kind  = 2'd0;
    end
  end

  // ---- optional pipeline register between multiplier and adder ----
  // With MAC_PIPE the adder works one cycle after the multiplier, on the registered product
  // and the registered select signals. Every y value, and every read of a y link, then moves
  // one cycle later, so the link delays stay as they are and only the output latency grows.
  logic signed [DATA_W+COEF_W-1:0] prod_s;
  logic                            ysel_zero_s, last_s;
  logic [1:0]                      ysel_idx_s, add_kind_s;

  if (MAC_PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (en) begin
        prod_s      <= prod;
        ysel_zero_s <= ysel_zero;
        ysel_idx_s  <= ysel_idx;
        add_kind_s  <= add_kind;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  last_s <= 1'b0;
      else if (en) last_s <= cnt.valid && last_pt;
    end
  end else begin : g_nopipe
    assign prod_s      = prod;
    assign ysel_zero_s = ysel_zero;
    assign ysel_idx_s  = ysel_idx;
    assign add_kind_s  = add_kind;
    assign last_s      = cnt.valid && last_pt;
  end

  always_comb begin
    y_sel = ysel_zero_s ? '0 : y_link[ysel_idx_s];
    case (add_kind_s)
      2'd0:    addend = ACC_W'(prod_s);
      2'd1:    addend = '0;
      default: addend = y_link[cj_ps];
    endcase
    y_new = y_sel + addend;
  end

  // ---- point registers ----
  always_ff @(posedge clk) begin
    if (en) begin
      u_q <= u_sel;
      a_q <= a_sel;
      y_q <= y_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y_last <= 1'b0;
    else if (en) y_last <= last_s;
  end

  initial begin
    assert (ACC_W >= DATA_W + COEF_W) else $error("accumulator narrower than the product");
  end

endmodule
