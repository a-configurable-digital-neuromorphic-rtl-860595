// aer_arbiter: merges L AER channels into one, for the tree of cores.
//
// Each child core (or an optional external AER source) drives one four-phase
// AER input. An input FSM takes one request at a time, chosen by a
// round-robin search that starts at a one-hot priority pointer; the pointer
// then moves to the input after the one served. The packet is stored in a
// small FIFO of depth D_A (2 for L <= 4, else 2^(A(L)-1)) and the input is
// acknowledged as soon as it is stored, so a child is not held up by a busy
// parent (pipelined AER). A separate output FSM pops the FIFO and runs the
// four-phase handshake towards the parent core. The FSM states, the FIFO
// depth rule and the output width A_max + A(L) follow the document.
//
// Input FSM:  IDLE -(request, FIFO full)-> WAIT_FIFO -(not full, push)->
//             WAIT_REQDN;  IDLE -(request, not full, push)-> WAIT_REQDN;
//             WAIT_REQDN -(request low, ack low)-> IDLE.
// Output FSM: IDLE -(FIFO not empty)-> POP (pop, raise req) -> WAIT_ACK
//             -(ack)-> WAIT_ACKDN (req low) -(ack low)-> IDLE.
//
// Output packet: {input index, address}. The index is this design's way of
// keeping the neurons of different children apart in the parent; zero
// extended into the parent's input it carries opcode 00 (neuron spike
// event). With EXT_AER = 1 input L-1 is the external input and its packet
// is forwarded without the index, so that it can carry its own opcode.
// Request and acknowledge inputs pass two-flop synchronisers.
module aer_arbiter
  import snn_pkg::*;
#(
  parameter int unsigned L       = 4,
  parameter int unsigned A_MAX   = 10,
  parameter bit          EXT_AER = 1'b0,
  // derived
  parameter int unsigned AL  = addr_w(L),
  parameter int unsigned D_A = (L <= 4) ? 2 : (2 ** (addr_w(L) - 1)),
  parameter int unsigned OW  = A_MAX + AL
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [L-1:0]          in_req,
  input  logic [L-1:0][A_MAX-1:0] in_addr,
  output logic [L-1:0]          in_ack,
  output logic                  out_req,
  output logic [OW-1:0]         out_addr,
  input  logic                  out_ack
);
  typedef enum logic [1:0] {I_IDLE, I_WAIT_FIFO, I_WAIT_REQDN} in_state_e;
  typedef enum logic [1:0] {O_IDLE, O_POP, O_WAIT_ACK, O_WAIT_ACKDN} out_state_e;

  in_state_e      ist;
  out_state_e     ost;
  logic [L-1:0]   req_s1, req_s;
  logic [1:0]     ack_sync;
  logic [L-1:0]   last_arb;          // one-hot round-robin priority
  logic [AL-1:0]  sel, grant;
  logic           any_req;
  logic           push, pop, full, empty;
  logic [OW-1:0]  din, dout;
  logic [$clog2(D_A+1)-1:0] count;

  // Round robin: first requesting input at or after the priority position.
  always_comb begin
    grant   = '0;
    any_req = 1'b0;
    for (int k = L - 1; k >= 0; k--) begin
      for (int p = 0; p < L; p++) begin
        if (last_arb[p] && req_s[(p + k) % L]) begin
          grant   = AL'((p + k) % L);
          any_req = 1'b1;
        end
      end
    end
  end

  function automatic logic [OW-1:0] pack(input logic [AL-1:0] idx, input logic [A_MAX-1:0] a);
    if (EXT_AER && idx == AL'(L - 1)) return OW'(a);
    return {idx, a};
  endfunction

  assign din = (ist == I_IDLE) ? pack(grant, in_addr[grant]) : pack(sel, in_addr[sel]);
  always_comb begin
    push = 1'b0;
    unique case (ist)
      I_IDLE:      push = any_req && !full;
      I_WAIT_FIFO: push = !full;
      default:     push = 1'b0;
    endcase
  end
  assign pop = (ost == O_POP);

  fifo #(.W(OW), .D(D_A)) u_fifo (
    .clk, .rst, .push, .din, .pop, .dout, .full, .empty, .count
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ist      <= I_IDLE;
      ost      <= O_IDLE;
      req_s1   <= '0;
      req_s    <= '0;
      ack_sync <= '0;
      last_arb <= L'(1);
      sel      <= '0;
      in_ack   <= '0;
      out_req  <= 1'b0;
      out_addr <= '0;
    end else begin
      req_s1   <= in_req;
      req_s    <= req_s1;
      ack_sync <= {ack_sync[0], out_ack};
      // input side
      unique case (ist)
        I_IDLE: if (any_req) begin
          sel      <= grant;
          last_arb <= L'(1) << ((grant == AL'(L - 1)) ? 0 : (grant + 1'b1));
          if (!full) begin
            in_ack[grant] <= 1'b1;
            ist <= I_WAIT_REQDN;
          end else begin
            ist <= I_WAIT_FIFO;
          end
        end
        I_WAIT_FIFO: if (!full) begin
          in_ack[sel] <= 1'b1;
          ist <= I_WAIT_REQDN;
        end
        I_WAIT_REQDN: if (!req_s[sel]) begin
          in_ack[sel] <= 1'b0;
          ist <= I_IDLE;
        end
        default: ist <= I_IDLE;
      endcase
      // output side
      unique case (ost)
        O_IDLE: if (!empty) ost <= O_POP;
        O_POP: begin
          out_addr <= dout;
          out_req  <= 1'b1;
          ost      <= O_WAIT_ACK;
        end
        O_WAIT_ACK: if (ack_sync[1]) begin
          out_req <= 1'b0;
          ost     <= O_WAIT_ACKDN;
        end
        O_WAIT_ACKDN: if (!ack_sync[1]) ost <= O_IDLE;
        default: ost <= O_IDLE;
      endcase
    end
  end

  // At most one input is acknowledged at a time.
  assert property (@(posedge clk) disable iff (rst) $onehot0(in_ack));
  // The output request is held until the acknowledge arrives.
  assert property (@(posedge clk) disable iff (rst)
                   (ost == O_WAIT_ACK && !ack_sync[1]) |=> out_req);

endmodule
