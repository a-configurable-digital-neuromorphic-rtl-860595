// synapse_memory: register-array model of the synapse memory of one core.
//
// DEPTH = m' = n_wordS * n words of W = 32 bits. The memory is split into n
// blocks, one per pre-synaptic neuron i; block i holds the n weights from
// neuron i to every post-synaptic neuron, packed m_wordS = floor(32/B_s) to
// a word. Word k of block i is at address i*n_wordS + k and weight s of a
// word sits at bits [s*B_s +: B_s]; that packing order is this design's own.
// This is the register-array variant (blkBox = false).
//
// Interface and timing: identical to neuron_memory. A read (en, !we) shows
// the word on rdata after the next rising edge; rdata then holds while the
// controller uses the m_wordS weights over consecutive synaptic operations.
// A write changes only the bits selected by wmask. Contents are not reset.
module synapse_memory #(
  parameter int unsigned DEPTH = 25600,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   addr,
  input  logic [W-1:0]               wmask,
  input  logic [W-1:0]               wdata,
  output logic [W-1:0]               rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < W; b++)
          if (wmask[b]) mem[addr][b] <= wdata[b];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
