// neuron_memory: register-array model of the neuron memory of one core.
//
// N words of W = B_wordN bits, one word per neuron. Each word holds, from the
// most significant bit down, neur_disable, neur_output, neur_reschedule,
// unused padding, leak_str (B_l bits), threshold (B_n bits) and core_state
// (B_n bits); the word is interpreted by the controller, not here. The word
// width is rounded up to whole bytes so that SPI can reach every byte.
// This is the register-array variant of the memory (blkBox = false); a
// vendor memory macro with the same port could replace it.
//
// Interface and timing: one port. With en high and we low the word at addr
// appears on rdata after the next rising edge and stays there until the
// next read. With en and we high the bits of wdata whose wmask bit is 1 are
// written; the others keep their value (used by SPI byte writes).
// The contents are not reset; they are loaded over SPI.
module neuron_memory #(
  parameter int unsigned N = 640,
  parameter int unsigned W = 16
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic                   we,
  input  logic [$clog2(N)-1:0]   addr,
  input  logic [W-1:0]           wmask,
  input  logic [W-1:0]           wdata,
  output logic [W-1:0]           rdata
);
  logic [W-1:0] mem [N];

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
