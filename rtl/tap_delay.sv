// tap_delay: a chain of delay registers with every stage visible.
//
// In the processor array a value produced by one processor is consumed by other processors a
// fixed number of cycles later; that number is n = lambda . d for the dependency vector d and
// the schedule vector lambda. Instead of one private delay line per consumer, each producer
// drives one shared chain and each consumer taps it at its own depth (sharing the chain is a
// choice of this implementation).
//
// Interface: taps[0] is the input d itself; taps[m] (1 <= m < DEPTH) is d as it was m enabled
// clock cycles earlier. A consumer that needs delay n >= 1 relative to the producer's output
// register therefore reads taps[n-1]. The chain advances only when en is high, so a stall of the
// whole array keeps all distances intact. The stages are not reset: what they hold before the
// first value arrives is never selected.
module tap_delay #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] taps [DEPTH]
);

  logic [WIDTH-1:0] stage [DEPTH];

  assign stage[0] = d;

  for (genvar m = 1; m < DEPTH; m++) begin : g_stage
    always_ff @(posedge clk) begin
      if (en) stage[m] <= stage[m-1];
    end
  end

  assign taps = stage;

endmodule
