// fifo: synchronous first-in first-out buffer of D entries of W bits.
//
// Used as the event queue of the core scheduler (depth D = 128 by default)
// and as the small pipelining buffer of the AER arbiter. The width and depth
// are generator parameters; the internal structure (circular buffer with a
// read pointer, a write pointer and an occupancy count) is this design's own.
//
// Interface and timing: the oldest entry is always visible on dout while
// empty is low (first-word fall-through), so a consumer can decode it and
// assert pop in the same cycle. push is ignored while full and pop while
// empty. A push and a pop in the same cycle keep the count unchanged.
// Reset is synchronous and active high.
module fifo #(
  parameter int unsigned W = 12,
  parameter int unsigned D = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [$clog2(D+1)-1:0] count
);
  localparam int unsigned AD = (D <= 2) ? 1 : $clog2(D);

  logic [W-1:0]  mem [D];
  logic [AD-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign full    = (count == D[$clog2(D+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [AD-1:0] inc(input logic [AD-1:0] p);
    return (p == AD'(D - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
