// link_fifo: small synchronous FIFO that replaces a long delay shift register on a link whose
// producer delivers a value the consumer will use only in some cycles.
//
// A delay line of n registers holds a value in every stage, even though only a few of the n
// values in flight are ever read. When the producer's writes and the consumer's reads follow a
// fixed schedule (the consumer reads, in the same order, exactly the values the producer wrote
// n cycles earlier), a FIFO of n words holds the same information. So does any FIFO at least as
// deep as the number of values in flight. Replacing long shift registers that do not carry
// valid data in every stage by FIFOs is an area optimization the filter method names. The
// structure here (a register array with wrap-around read and write pointers) is this design's
// own choice.
//
// Interface and timing: push writes din at the end of a cycle with en high; dout is the oldest
// word (first-word fall-through) and pop removes it at the end of a cycle with en high. Both
// follow the global enable, so a stall freezes the link like it freezes a delay line. The
// schedule guarantees that the FIFO never overflows or underflows; assertions report it if it
// does (they need no reset qualifier: push and pop come from reset registers and are low
// while reset is applied). Pointers and the fill count are reset; the storage is not (it is never read before it
// has been written).
module link_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic [PW:0]      fill;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (en && push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      fill <= '0;
    end else if (en) begin
      if (push) wptr <= next_ptr(wptr);
      if (pop)  rptr <= next_ptr(rptr);
      fill <= fill + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  assign dout = mem[rptr];

  a_no_underflow: assert property (@(posedge clk) en && pop |-> fill != '0)
    else $error("link_fifo: read from an empty link");
  a_no_overflow: assert property (@(posedge clk)
                                  en && push && !pop |-> fill != (PW+1)'(DEPTH))
    else $error("link_fifo: link overflow");
endmodule
