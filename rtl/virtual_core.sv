// virtual_core: a core generated with interfaces only.
//
// It has the AER input and AER output of a core but no neurons, synapses or
// SPI port. At the root of the four-core vision configuration it receives
// the arbiter's packets {core index, neuron address} and sends on only the
// lower W_OUT bits, the neuron address within a single core. Outputs of the
// four cores with the same neuron index therefore arrive as the same output
// address, which adds up the four sub-networks' class votes. The truncation
// follows the document; the one-entry buffer between the two handshakes is
// this design's choice.
//
// Timing: a packet is taken when the (synchronised) input request is seen
// and the output side is free; the input is acknowledged at once and the
// packet is offered on the output on the same edge.
module virtual_core #(
  parameter int unsigned W_IN  = 12,
  parameter int unsigned W_OUT = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_req,
  input  logic [W_IN-1:0]  in_addr,
  output logic             in_ack,
  output logic             out_req,
  output logic [W_OUT-1:0] out_addr,
  input  logic             out_ack
);
  logic             push, ready;
  logic [W_IN-1:0]  pkt;

  aer_input #(.W(W_IN)) u_in (
    .clk, .rst, .aer_req(in_req), .aer_addr(in_addr), .aer_ack(in_ack),
    .push, .pkt, .push_ready(ready)
  );

  aer_output #(.W(W_OUT)) u_out (
    .clk, .rst, .send(push), .addr_in(pkt[W_OUT-1:0]), .ready,
    .aer_req(out_req), .aer_ack(out_ack), .aer_addr(out_addr)
  );

endmodule
