// snn_core: one configurable neuromorphic core with an n x n crossbar.
//
// The core holds n leaky integrate-and-fire neurons and n*n synapses, all
// time-multiplexed onto a single physical neuron: a spike from pre-synaptic
// neuron i sweeps the neuron memory once and adds, to each post-synaptic
// neuron j, the signed weight w(i,j) read from the synapse memory. The block
// structure is that of the document: AER input, scheduler, controller,
// neuron memory, synapse memory, LIF update logic (inside the controller),
// AER output and an SPI slave holding the global configuration.
//
// Generator parameters and the widths they imply:
//   N       neurons n                  AN   = A(n)          word address
//   N_OUT   neurons that may send out  ANO  = A(n_out)      output address
//   BN, BS, BL  neuron, synapse and leak widths
//   BWN = ceil((2BN+BL+3)/8)*8  neuron word, MWS = floor(32/BS) weights per
//   synapse word, NWS = ceil(n/MWS) words per block, MP = NWS*n words.
//   AAER = max(AN+2, BS+4) input packet {opcode[1:0], payload}.
// Defaults give one core of the four-core vision (DVS) configuration:
// 640 neurons, 5-bit neurons, 2-bit weights, 16-bit neuron words.
//
// SPI memory access is possible while SPI_GATE_ACTIVITY is set (its reset
// value); clear it to start processing events. Writes are byte-wise with a
// mask, reads return one byte. SPI requests take the memory ports in the
// cycle they occur, so gating should be set only while the core is idle.
// Neither the controller nor the SPI port touches the memories while rst is
// high, so contents loaded before reset survive it.
module snn_core
  import snn_pkg::*;
#(
  parameter int unsigned N          = 640,
  parameter int unsigned N_OUT      = 640,
  parameter int unsigned BN         = 5,
  parameter int unsigned BS         = 2,
  parameter int unsigned BL         = 3,
  parameter int unsigned FIFO_D     = 128,
  parameter int unsigned LEAK_MODE  = 0,
  parameter int unsigned RESET_MODE = 0,
  parameter int unsigned B_SPI      = 32,
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
  input  logic            clk,
  input  logic            rst,
  // input AER
  input  logic            aer_in_req,
  input  logic [AAER-1:0] aer_in_addr,
  output logic            aer_in_ack,
  // output AER
  output logic            aer_out_req,
  output logic [ANO-1:0]  aer_out_addr,
  input  logic            aer_out_ack,
  // SPI
  input  logic            sck,
  input  logic            ss_n,
  input  logic            mosi,
  output logic            miso,
  // status (observation only)
  output logic            sched_overflow,
  output logic            spike_fired,
  output logic            busy
);
  localparam int unsigned ABN = addr_w(BWN / 8);
  localparam int unsigned ABS = 2;

  core_cfg_t cfg;

  // ---------------- AER input and scheduler ----------------
  logic            in_push, in_ready;
  logic [AAER-1:0] in_pkt;
  logic            loc_push, sched_pop, sched_empty;
  logic [AAER-1:0] loc_pkt, sched_head;

  aer_input #(.W(AAER)) u_aer_in (
    .clk, .rst, .aer_req(aer_in_req), .aer_addr(aer_in_addr), .aer_ack(aer_in_ack),
    .push(in_push), .pkt(in_pkt), .push_ready(in_ready)
  );

  scheduler #(.W(AAER), .D(FIFO_D)) u_sched (
    .clk, .rst, .ext_push(in_push), .ext_pkt(in_pkt), .ext_ready(in_ready),
    .loc_push, .loc_pkt, .pop(sched_pop), .head(sched_head), .empty(sched_empty),
    .overflow(sched_overflow)
  );

  // ---------------- SPI slave ----------------
  logic            spi_req, spi_we, spi_syn;
  logic [AN-1:0]   spi_naddr;
  logic [AM-1:0]   spi_saddr;
  logic [3:0]      spi_byte;
  logic [7:0]      spi_wbyte, spi_wmask, spi_rbyte;

  spi_slave #(.B_SPI(B_SPI), .AN(AN), .ABN(ABN), .AM(AM), .ABS(ABS), .N(N)) u_spi (
    .clk, .rst, .sck, .ss_n, .mosi, .miso, .cfg,
    .mem_req(spi_req), .mem_we(spi_we), .mem_syn(spi_syn), .mem_neur_addr(spi_naddr),
    .mem_syn_addr(spi_saddr), .mem_byte(spi_byte), .mem_wbyte(spi_wbyte),
    .mem_wmask(spi_wmask), .mem_rbyte(spi_rbyte)
  );

  // ---------------- controller ----------------
  logic            c_nm_en, c_nm_we, c_sm_en;
  logic [AN-1:0]   c_nm_addr;
  logic [BWN-1:0]  c_nm_wmask, c_nm_wdata, nm_rdata;
  logic [AM-1:0]   c_sm_addr;
  logic [31:0]     sm_rdata;
  logic            out_ready, out_send;
  logic [ANO-1:0]  out_addr;

  controller #(.N(N), .N_OUT(N_OUT), .BN(BN), .BS(BS), .BL(BL),
               .LEAK_MODE(LEAK_MODE), .RESET_MODE(RESET_MODE)) u_ctrl (
    .clk, .rst, .cfg,
    .sched_empty, .sched_head, .sched_pop, .loc_push, .loc_pkt,
    .nm_en(c_nm_en), .nm_we(c_nm_we), .nm_addr(c_nm_addr), .nm_wmask(c_nm_wmask),
    .nm_wdata(c_nm_wdata), .nm_rdata,
    .sm_en(c_sm_en), .sm_addr(c_sm_addr), .sm_rdata,
    .out_ready, .out_send, .out_addr, .busy, .spike_fired
  );

  // ---------------- memories, SPI has the ports when it requests ----------------
  logic            nm_en, nm_we, sm_en, sm_we;
  logic [AN-1:0]   nm_addr;
  logic [BWN-1:0]  nm_wmask, nm_wdata;
  logic [AM-1:0]   sm_addr;
  logic [31:0]     sm_wmask, sm_wdata;
  logic            spi_rd_syn;
  logic [3:0]      spi_rd_byte;

  always_comb begin
    nm_en = c_nm_en; nm_we = c_nm_we; nm_addr = c_nm_addr;
    nm_wmask = c_nm_wmask; nm_wdata = c_nm_wdata;
    sm_en = c_sm_en; sm_we = 1'b0; sm_addr = c_sm_addr;
    sm_wmask = '0; sm_wdata = '0;
    if (spi_req && !rst) begin            // no SPI access during reset
      nm_en = !spi_syn; nm_we = spi_we; nm_addr = spi_naddr;
      nm_wmask = BWN'({8'b0, ~spi_wmask}) << (8 * spi_byte);
      nm_wdata = BWN'({8'b0, spi_wbyte}) << (8 * spi_byte);
      sm_en = spi_syn; sm_we = spi_we; sm_addr = spi_saddr;
      sm_wmask = 32'(~spi_wmask) << (8 * spi_byte[1:0]);
      sm_wdata = 32'(spi_wbyte) << (8 * spi_byte[1:0]);
    end
  end

  neuron_memory #(.N(N), .W(BWN)) u_nmem (
    .clk, .en(nm_en), .we(nm_we), .addr(nm_addr), .wmask(nm_wmask), .wdata(nm_wdata),
    .rdata(nm_rdata)
  );

  synapse_memory #(.DEPTH(MP), .W(32)) u_smem (
    .clk, .en(sm_en), .we(sm_we), .addr(sm_addr), .wmask(sm_wmask), .wdata(sm_wdata),
    .rdata(sm_rdata)
  );

  // SPI read data: the byte of the word read in the previous cycle.
  always_ff @(posedge clk) begin
    spi_rd_syn  <= spi_syn;
    spi_rd_byte <= spi_byte;
  end
  assign spi_rbyte = spi_rd_syn ? sm_rdata[8*spi_rd_byte[1:0] +: 8]
                                : 8'(nm_rdata >> (8 * spi_rd_byte));

  // ---------------- AER output ----------------
  aer_output #(.W(ANO)) u_aer_out (
    .clk, .rst, .send(out_send), .addr_in(out_addr), .ready(out_ready),
    .aer_req(aer_out_req), .aer_ack(aer_out_ack), .aer_addr(aer_out_addr)
  );

endmodule
