// aer_input: four-phase AER receiver at the input of a core.
//
// A sender puts a packet on aer_addr and raises aer_req. The request passes
// a two-flop synchroniser (this design's choice, so that the port can face
// another clock domain or a sensor). When the synchronised request is high,
// no acknowledge is pending and the scheduler can accept (push_ready), the
// packet is handed over with a one-cycle push pulse and aer_ack rises on the
// next edge. aer_ack falls once the synchronised request has fallen, which
// completes the four-phase handshake of the AER protocol.
// A packet is therefore pushed one cycle after the synchronised request is
// seen, and a full scheduler simply delays the acknowledge.
// pkt is aer_addr itself: the protocol keeps the packet stable until it
// is acknowledged, so no register is needed.
module aer_input #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         aer_req,
  input  logic [W-1:0] aer_addr,
  output logic         aer_ack,
  output logic         push,
  output logic [W-1:0] pkt,
  input  logic         push_ready
);
  logic [1:0] req_sync;
  logic       req_s;

  assign req_s = req_sync[1];
  assign pkt   = aer_addr;
  assign push  = req_s && !aer_ack && push_ready && !rst;  // nothing during reset

  always_ff @(posedge clk) begin
    if (rst) begin
      req_sync <= '0;
      aer_ack  <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], aer_req};
      if (push)                  aer_ack <= 1'b1;
      else if (aer_ack && !req_s) aer_ack <= 1'b0;
    end
  end

endmodule
