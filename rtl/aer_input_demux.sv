// aer_input_demux: one AER channel fanned out to NOUT cores.
//
// On the FPGA board a single GPIO word carries the input events of all four
// vision cores. The two most significant bits of the incoming packet select
// the destination core and the remaining W bits are that core's own input
// packet (opcode and address). The request is steered to the selected core
// and that core's acknowledge is returned, so the four-phase handshake runs
// end to end; the sender must keep the packet stable while its request is
// high, as the AER protocol requires. The bit split follows the document;
// the pass-through handshake is this design's choice.
module aer_input_demux #(
  parameter int unsigned NOUT = 4,
  parameter int unsigned W    = 12
) (
  input  logic                   in_req,
  input  logic [W+1:0]           in_addr,
  output logic                   in_ack,
  output logic [NOUT-1:0]        out_req,
  output logic [NOUT-1:0][W-1:0] out_addr,
  input  logic [NOUT-1:0]        out_ack
);
  logic [1:0] dst;
  assign dst = in_addr[W+1:W];

  always_comb begin
    out_req = '0;
    in_ack  = 1'b0;
    for (int k = 0; k < NOUT; k++) begin
      out_addr[k] = in_addr[W-1:0];
      if (dst == 2'(k)) begin
        out_req[k] = in_req;
        in_ack     = out_ack[k];
      end
    end
  end

endmodule
