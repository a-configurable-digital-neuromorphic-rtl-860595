// aer_output: four-phase AER sender at the output of a core or arbiter.
//
// When ready is high a one-cycle send pulse loads addr_in; aer_addr then
// holds that address and aer_req rises on the same edge. The receiver's
// acknowledge passes a two-flop synchroniser (this design's choice); once it
// is seen high the request is dropped, and once it is seen low again the
// sender returns to idle and ready rises. Only one event is held: the
// producer must wait for ready.
module aer_output #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         send,
  input  logic [W-1:0] addr_in,
  output logic         ready,
  output logic         aer_req,
  input  logic         aer_ack,
  output logic [W-1:0] aer_addr
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_ACK, S_WAIT_ACKDN} state_e;
  state_e     state;
  logic [1:0] ack_sync;
  logic       ack_s;

  assign ack_s = ack_sync[1];
  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ack_sync <= '0;
      aer_req  <= 1'b0;
      aer_addr <= '0;
    end else begin
      ack_sync <= {ack_sync[0], aer_ack};
      unique case (state)
        S_IDLE: if (send) begin
          aer_addr <= addr_in;
          aer_req  <= 1'b1;
          state    <= S_WAIT_ACK;
        end
        S_WAIT_ACK: if (ack_s) begin
          aer_req <= 1'b0;
          state   <= S_WAIT_ACKDN;
        end
        S_WAIT_ACKDN: if (!ack_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
