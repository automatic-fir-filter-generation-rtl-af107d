// counter_unit: global iteration counter of the processor array.
//
// Processor (0,0) executes the points of its LS tile (j1, j2) for every GS tile (l1, l2); the
// other processors run the same sequence shifted by lamK1*k1 + lamK2*k2 cycles, so one counter
// suffices and its output is delayed on its way through the array (see proc_array). Within one
// GS row (period LAM_L1 cycles) the L2 LS tiles start every LAM_L2 cycles; each tile takes
// J1*J2 consecutive cycles, scanned column-major (j1 fastest) or row-major (j2 fastest). The
// remaining cycles of a period are idle (valid = 0). J2 here is the number of points in a tile
// row: the taps of the tile, plus the partial-sum point when partial localization is used.
// l1 counts GS rows and saturates at its maximum; the array only asks whether l1 is small
// enough for a sample index to be negative, which happens in the first few GS rows only.
//
// Interface: cnt is registered and describes the iteration executed in the current cycle. The
// counter advances only when en is high. After reset cnt describes point (0,0,0,0) of the first
// GS row.
module counter_unit
  import firgen_pkg::*;
#(
  parameter int unsigned J1        = 2,
  parameter int unsigned J2        = 3,
  parameter int unsigned L2        = 2,
  parameter bit          ROW_MAJOR = 1'b0,
  parameter int unsigned LAM_L2    = 10,
  parameter int unsigned LAM_L1    = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output cnt_t cnt
);

  localparam int unsigned TW = $clog2(LAM_L1 + 1);

  logic [TW-1:0]    t1;  // position within the GS row period
  logic [TW-1:0]    t2;  // position within the current LS tile slot
  logic [CNT_W-1:0] j1, j2, l2;
  logic [CNT_W-1:0] l1;
  logic             active;
  logic             last_j1, last_j2;

  assign active  = (l2 < CNT_W'(L2)) && (t2 < TW'(J1 * J2));
  assign last_j1 = (j1 == CNT_W'(J1 - 1));
  assign last_j2 = (j2 == CNT_W'(J2 - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1       <= '0;
      t2       <= '0;
      j1       <= '0;
      j2       <= '0;
      l2       <= '0;
      l1       <= '0;
    end else if (en) begin
      if (t1 == TW'(LAM_L1 - 1)) begin
        t1       <= '0;
        t2       <= '0;
        j1       <= '0;
        j2       <= '0;
        l2       <= '0;
        if (l1 != '1) l1 <= l1 + 1'b1;
      end else begin
        t1 <= t1 + 1'b1;
        if (t2 == TW'(LAM_L2 - 1)) begin
          t2 <= '0;
          j1 <= '0;
          j2 <= '0;
          if (l2 < CNT_W'(L2)) l2 <= l2 + 1'b1;
        end else begin
          t2 <= t2 + 1'b1;
          if (active) begin
            if (ROW_MAJOR) begin
              if (last_j2) begin
                j2 <= '0;
                j1 <= last_j1 ? '0 : j1 + 1'b1;
              end else begin
                j2 <= j2 + 1'b1;
              end
            end else begin
              if (last_j1) begin
                j1 <= '0;
                j2 <= last_j2 ? '0 : j2 + 1'b1;
              end else begin
                j1 <= j1 + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  always_comb begin
    cnt          = '0;
    cnt.valid    = active;
    cnt.j1       = j1;
    cnt.j2       = j2;
    cnt.l2       = l2;
    cnt.l1       = l1;
  end

  initial begin
    assert (LAM_L2 >= J1 * J2) else $error("LAM_L2 shorter than one LS tile");
    assert (LAM_L1 >= (L2 - 1) * LAM_L2 + J1 * J2) else $error("LAM_L1 too short for L2 tiles");
    assert (L2 < (1 << CNT_W) - 1 && J1 < (1 << CNT_W) && J2 < (1 << CNT_W))
      else $error("counter fields too narrow");
  end

endmodule
