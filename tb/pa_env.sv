// pa_env: test environment for one processor-array configuration (used by tb_proc_array).
// It drives a counter unit and a proc_array with a random sample stream through behavioural row
// queues, answers the coefficient-memory addresses from its own table, stalls the array at
// random, and checks
//   - every result against y(i) = sum_j a(j) u(i-j), in sample order, from the right row;
//   - in array time, sample n + J1*K1 is read LAM_L1 cycles after sample n;
//   - y(n) leaves the array LATENCY + 1 cycles after u(n) was read, where
//     LATENCY = (J2-1)*lamJ2 + (K2-1)*lamK2 + (L2-1)*lamL2 fully localized, or
//     J2*lamJ2 + (K2-1)*lamK2 + (L2-1)*lamL2 partially localized (expected value passed in).
module pa_env
  import firgen_pkg::*;
#(
  parameter int  K1 = 2, K2 = 2, J1 = 2, J2 = 3, N = 12,
  parameter bit  ROW_MAJOR = 1'b0,
  parameter bit  PARTIAL = 1'b0,
  parameter bit  LINK_FIFO = 1'b1,
  parameter bit  MAC_PIPE = 1'b0,
  parameter int  EXP_LATENCY = 19,
  parameter int  EXP_LAM_L1 = 16,
  parameter int  T = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int L2 = N / (J2 * K2);
  localparam int LL1 = lam_l1(J1, J2, K1, K2, L2, ROW_MAJOR, PARTIAL);
  localparam int LL2 = lam_l2(J1, J2, K2, ROW_MAJOR, PARTIAL);
  localparam int ADW = (J2 * L2 > 1) ? $clog2(J2 * L2) : 1;

  logic en, en_rand;
  cnt_t cnt;
  logic signed [15:0] u_in [K1];
  logic               u_rd [K1];
  logic [ADW-1:0]     caddr [K2];
  logic signed [15:0] cdata [K2];
  logic signed [39:0] y_out [K1];
  logic               y_wr  [K1];

  counter_unit #(.J1(J1), .J2(pts_j2(J2, PARTIAL)), .L2(L2), .ROW_MAJOR(ROW_MAJOR), .LAM_L2(LL2),
                 .LAM_L1(LL1))
    u_cnt (.clk, .rst_n, .en, .cnt);
  proc_array #(.K1(K1), .K2(K2), .J1(J1), .J2(J2), .N(N), .ROW_MAJOR(ROW_MAJOR),
               .PARTIAL(PARTIAL), .LINK_FIFO(LINK_FIFO), .MAC_PIPE(MAC_PIPE)) dut (
    .clk, .rst_n, .en, .cnt_in(cnt), .u_in, .u_rd, .coef_addr(caddr), .coef_data(cdata),
    .y_out, .y_wr);

  logic signed [15:0] u [4 * T + 64];
  logic signed [15:0] a [N];
  int     n_rd [K1];       // samples read by row r so far
  int     n_wr [K1];       // results written by row r so far
  int     n_total = 0;
  longint acyc = 0;
  longint rd_time [K1][4 * T + 64];

  function automatic longint ref_y(int i);
    longint acc = 0;
    for (int j = 0; j < N; j++) if (i - j >= 0) acc += longint'(a[j]) * longint'(u[i - j]);
    return acc;
  endfunction

  // the k-th sample handled by row r
  function automatic int sample_of(int r, int k);
    return J1 * K1 * (k / J1) + J1 * r + (k % J1);
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int r = 0; r < K1; r++) begin n_rd[r] = 0; n_wr[r] = 0; end
    for (int i = 0; i < 4 * T + 64; i++) u[i] = 16'($urandom);
    for (int j = 0; j < N; j++) a[j] = 16'($urandom);
  end

  // coefficient memory of column c: address j2 + J2*l2 holds a(j2 + J2*c + J2*K2*l2)
  always_comb
    for (int c = 0; c < K2; c++)
      cdata[c] = a[(int'(caddr[c]) % J2) + J2 * c + J2 * K2 * (int'(caddr[c]) / J2)];

  always_comb begin
    en = en_rand;
    for (int r = 0; r < K1; r++) u_in[r] = u[sample_of(r, n_rd[r])];
  end

  always @(negedge clk) en_rand <= ($urandom_range(0, 5) != 0);

  always @(posedge clk) begin
    if (rst_n && en && !done) begin
      for (int r = 0; r < K1; r++) begin
        if (u_rd[r]) begin
          rd_time[r][n_rd[r]] = acyc;
          if (n_rd[r] >= J1) begin
            checks++;
            if (acyc - rd_time[r][n_rd[r] - J1] != EXP_LAM_L1) begin
              failures++;
              $display("FAIL: row %0d read period %0d", r, acyc - rd_time[r][n_rd[r] - J1]);
            end
          end
          n_rd[r]++;
        end
        if (y_wr[r]) begin
          int i;
          i = sample_of(r, n_wr[r]);
          checks++;
          if (longint'(y_out[r]) != ref_y(i)) begin
            failures++;
            $display("FAIL: y(%0d) = %0d from row %0d, expected %0d", i, y_out[r], r, ref_y(i));
          end
          checks++;
          if (n_wr[r] >= n_rd[r] || acyc - rd_time[r][n_wr[r]] != EXP_LATENCY + 1) begin
            failures++;
            $display("FAIL: latency of y(%0d) is %0d", i, acyc - rd_time[r][n_wr[r]] - 1);
          end
          n_wr[r]++;
          n_total++;
          if (n_total == T) done = 1;
        end
      end
      acyc++;
    end
  end

endmodule
