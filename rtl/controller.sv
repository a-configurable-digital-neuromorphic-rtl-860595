// controller: event sequencer of one time-multiplexed crossbar core.
//
// The controller pops one event at a time from the scheduler and walks the
// neuron memory with a single physical neuron (lif_update). Each neuron
// update, a synaptic operation (SOP) or a leak, takes two cycles: in the
// first the neuron word is read (and, for a spike event, the synapse word
// holding this neuron's weight when a new group of m_wordS weights starts);
// in the second the updated potential is written back. The event kinds
// (opcode in the two top packet bits) and their costs follow the document:
//   10 virtual event       neuron neur is integrated with the weight w
//                          carried in the packet: 2 cycles
//   01 time reference      leak of one neuron (2 cycles) or, when the
//                          address field is all ones, of neurons
//                          0..SPI_MAX_NEUR: 2(SPI_MAX_NEUR+1) cycles
//   00 neuron spike        neurons 0..SPI_MAX_NEUR are integrated with the
//                          weights of pre-synaptic neuron pre_neur:
//                          2(SPI_MAX_NEUR+1) cycles
//   11 unused              popped and discarded in one cycle
// The first read cycle is the cycle in which the event is popped.
//
// When a neuron fires, its address goes to the AER output if its
// neur_output bit is set, SPI_AER_SRC_CTRL_nNEUR is 0 and the address is
// below N_OUT, and to the scheduler as a new spike event if neur_reschedule
// is set and SPI_OPEN_LOOP is 0. With SPI_AER_SRC_CTRL_nNEUR = 1 the
// controller instead sends the pre-synaptic address of each spike event it
// pops. Waiting in the write cycle while the AER output is still busy, and
// the neuron word field order of the memory, are as described in the core;
// the waiting is this design's choice. No event starts while
// SPI_GATE_ACTIVITY is set, so the SPI port can own the memories.
// Only the core_state field is ever written (the write mask covers it
// alone), and a rescheduled spike always carries opcode 00, so the upper
// bits of nm_wmask, nm_wdata and loc_pkt are constant by design.
module controller
  import snn_pkg::*;
#(
  parameter int unsigned N          = 640,
  parameter int unsigned N_OUT      = 640,
  parameter int unsigned BN         = 5,
  parameter int unsigned BS         = 2,
  parameter int unsigned BL         = 3,
  parameter int unsigned LEAK_MODE  = 0,
  parameter int unsigned RESET_MODE = 0,
  // derived, not meant to be overridden
  parameter int unsigned AN   = addr_w(N),
  parameter int unsigned BWN  = neuron_word_w(BN, BL),
  parameter int unsigned MWS  = 32 / BS,
  parameter int unsigned NWS  = (N + MWS - 1) / MWS,
  parameter int unsigned MP   = NWS * N,
  parameter int unsigned AM   = addr_w(MP),
  parameter int unsigned AAER = aer_in_w(N, BS),
  parameter int unsigned ANO  = addr_w(N_OUT)
) (
  input  logic             clk,
  input  logic             rst,
  input  core_cfg_t        cfg,
  // scheduler
  input  logic             sched_empty,
  input  logic [AAER-1:0]  sched_head,
  output logic             sched_pop,
  output logic             loc_push,
  output logic [AAER-1:0]  loc_pkt,
  // neuron memory
  output logic             nm_en,
  output logic             nm_we,
  output logic [AN-1:0]    nm_addr,
  output logic [BWN-1:0]   nm_wmask,
  output logic [BWN-1:0]   nm_wdata,
  input  logic [BWN-1:0]   nm_rdata,
  // synapse memory
  output logic             sm_en,
  output logic [AM-1:0]    sm_addr,
  input  logic [31:0]      sm_rdata,
  // AER output
  input  logic             out_ready,
  output logic             out_send,
  output logic [ANO-1:0]   out_addr,
  // status
  output logic             busy,
  output logic             spike_fired
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  typedef enum logic [1:0] {EV_SPIKE, EV_LEAK, EV_VIRTUAL} ev_e;

  state_e                state;
  ev_e                   ev;
  logic [AN-1:0]         j, j_last;
  logic [$clog2(MWS+1)-1:0] slot;
  logic [AM-1:0]         syn_base;       // address of the current synapse word
  logic signed [BS-1:0]  vweight;

  // Decoding of the scheduler head.
  aer_op_e               h_op;
  logic [AN-1:0]         h_neur, h_vneur, max_j;
  logic                  h_all;
  logic signed [BS-1:0]  h_w;
  logic                  start, can_start;

  assign h_op    = aer_op_e'(sched_head[AAER-1 -: 2]);
  assign h_neur  = sched_head[AN-1:0];
  assign h_vneur = AN'(sched_head[AAER-BS-3:0]);
  assign h_w     = sched_head[AAER-3 -: BS];
  assign h_all   = &sched_head[AAER-3:0];
  assign max_j   = (cfg.max_neur >= MAX_AN'(N - 1)) ? AN'(N - 1) : cfg.max_neur[AN-1:0];
  // with controller-sourced output a spike event also needs the AER output
  assign can_start = !sched_empty && !cfg.gate_activity &&
                     !(cfg.aer_src_ctrl && h_op == OP_SPIKE && !out_ready);
  assign start   = (state == S_IDLE) && can_start;
  assign busy    = (state != S_IDLE);

  // Fields of the neuron word just read.
  logic signed [BN-1:0] n_state, n_thr, n_next;
  logic [BL-1:0]        n_leak;
  logic                 n_dis, n_out, n_resched, spike;
  logic signed [BS-1:0] w_cur;
  lif_op_e              lop;
  logic                 need_out, stall;

  assign n_state   = nm_rdata[BN-1:0];
  assign n_thr     = nm_rdata[2*BN-1:BN];
  assign n_leak    = nm_rdata[2*BN+BL-1:2*BN];
  assign n_resched = nm_rdata[BWN-3];
  assign n_out     = nm_rdata[BWN-2];
  assign n_dis     = nm_rdata[BWN-1];
  assign w_cur     = (ev == EV_VIRTUAL) ? vweight : sm_rdata[slot*BS +: BS];
  assign lop       = (ev == EV_LEAK) ? LIF_LEAK : LIF_INTEG;

  lif_update #(.BN(BN), .BS(BS), .BL(BL), .LEAK_MODE(LEAK_MODE), .RESET_MODE(RESET_MODE)) u_lif (
    .op(lop), .state(n_state), .threshold(n_thr), .leak_str(n_leak), .weight(w_cur),
    .disable_n(n_dis), .state_next(n_next), .spike
  );

  assign need_out = spike && n_out && !cfg.aer_src_ctrl && (N_OUT >= N || j < AN'(N_OUT));
  assign stall    = (state == S_WRITE) && need_out && !out_ready;

  // Memory and output drive.
  always_comb begin
    nm_en     = 1'b0;
    nm_we     = 1'b0;
    nm_addr   = j;
    nm_wmask  = '0;
    nm_wmask[BN-1:0] = '1;
    nm_wdata  = '0;
    nm_wdata[BN-1:0] = n_next;
    sm_en     = 1'b0;
    sm_addr   = syn_base;
    sched_pop = 1'b0;
    loc_push  = 1'b0;
    loc_pkt   = '0;
    loc_pkt[AN-1:0] = j;            // opcode 00: neuron spike event
    out_send  = 1'b0;
    out_addr  = ANO'(j);
    spike_fired = 1'b0;
    // nothing is driven during reset, when the state register may not yet
    // hold a valid state
    if (!rst) unique case (state)
      S_IDLE: if (start) begin
        sched_pop = 1'b1;
        if (h_op != OP_UNUSED) nm_en = 1'b1;
        nm_addr = (h_op == OP_VIRTUAL) ? h_vneur :
                  (h_op == OP_TREF && !h_all) ? h_neur : '0;
        if (h_op == OP_SPIKE) begin
          sm_en   = 1'b1;
          sm_addr = AM'(h_neur) * AM'(NWS);
          if (cfg.aer_src_ctrl && (N_OUT >= N || h_neur < AN'(N_OUT))) begin
            out_send = 1'b1;
            out_addr = ANO'(h_neur);
          end
        end
      end
      S_READ: begin
        nm_en = 1'b1;
        if (ev == EV_SPIKE && slot == '0) sm_en = 1'b1;
      end
      S_WRITE: if (!stall) begin
        nm_en = 1'b1;
        nm_we = 1'b1;
        if (spike) begin
          spike_fired = 1'b1;
          if (need_out) out_send = 1'b1;
          if (n_resched && !cfg.open_loop) loc_push = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ev       <= EV_SPIKE;
      j        <= '0;
      j_last   <= '0;
      slot     <= '0;
      syn_base <= '0;
      vweight  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          slot     <= '0;
          syn_base <= AM'(h_neur) * AM'(NWS);
          vweight  <= h_w;
          unique case (h_op)
            OP_SPIKE: begin
              ev <= EV_SPIKE; j <= '0; j_last <= max_j; state <= S_WRITE;
            end
            OP_TREF: begin
              ev <= EV_LEAK;
              j      <= h_all ? '0 : h_neur;
              j_last <= h_all ? max_j : h_neur;
              state  <= S_WRITE;
            end
            OP_VIRTUAL: begin
              ev <= EV_VIRTUAL; j <= h_vneur; j_last <= h_vneur; state <= S_WRITE;
            end
            default: state <= S_IDLE;
          endcase
        end
        S_READ: state <= S_WRITE;
        S_WRITE: if (!stall) begin
          if (j == j_last) begin
            state <= S_IDLE;
          end else begin
            j     <= j + 1'b1;
            state <= S_READ;
            if (ev == EV_SPIKE) begin
              if (slot == $bits(slot)'(MWS - 1)) begin
                slot     <= '0;
                syn_base <= syn_base + 1'b1;
              end else begin
                slot <= slot + 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
