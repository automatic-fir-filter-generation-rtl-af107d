// async_fifo: dual-clock FIFO between the I/O clock and the filter clock.
//
// The filter's I/O ports run on their own clock so that they can keep up with an array that
// consumes more than one sample per filter cycle; one such FIFO per array row carries samples
// in and one carries results out. The implementation is the usual one: a RAM of 2**AW words,
// binary read and write pointers with one extra wrap bit, Gray-coded copies of each pointer
// passed to the other clock domain through two flip-flops. full and empty are therefore
// pessimistic for two cycles of the other clock, never wrong.
//
// Interface and timing: write side (wclk) writes wdata when winc is high and full is low. Read
// side (rclk) shows the oldest word on rdata whenever empty is low (first-word fall-through) and
// drops it at the clock edge when rinc is high. Each side has its own active-low asynchronous
// reset; both must be applied together.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray;  // read pointer seen in the write domain
  logic [AW:0] rq1_wgray, rq2_wgray;  // write pointer seen in the read domain
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write domain ----
  assign wbin_n = wbin + (AW+1)'(winc && !wfull);

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_n;
      wgray     <= bin2gray(wbin_n);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  // full: write pointer one lap ahead of the read pointer (two MSBs inverted in Gray code)
  assign wfull = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});

  // ---- read domain ----
  assign rbin_n = rbin + (AW+1)'(rinc && !rempty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_n;
      rgray     <= bin2gray(rbin_n);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

  assign rempty = (rgray == rq2_wgray);
  assign rdata  = mem[rbin[AW-1:0]];

  initial begin
    assert (AW >= 2) else $error("async_fifo needs AW >= 2");
  end

endmodule
