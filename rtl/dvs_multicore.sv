// dvs_multicore: the four-core vision (DVS) configuration as a tree.
//
// NCORES identical leaf cores (default four cores of 640 neurons, 5-bit
// neurons, 2-bit weights) each take one quadrant of the input image on
// their own AER input. Their AER outputs are merged by a round-robin
// arbiter and passed to a virtual (interface-only) output core at the root
// of the tree, which keeps only the neuron address within a core, so the
// four sub-networks' output spikes for the same class leave on the same
// output address. All leaf cores share SCK and MOSI and have one active-low
// select each; a core that is not selected drives MISO low, so the MISO
// lines are simply ORed. This two-level tree is the configuration the
// document deploys; deeper trees are not generated here.
module dvs_multicore
  import snn_pkg::*;
#(
  parameter int unsigned NCORES     = 4,
  parameter int unsigned N          = 640,
  parameter int unsigned N_OUT      = 640,
  parameter int unsigned BN         = 5,
  parameter int unsigned BS         = 2,
  parameter int unsigned BL         = 3,
  parameter int unsigned FIFO_D     = 128,
  parameter int unsigned LEAK_MODE  = 0,
  parameter int unsigned RESET_MODE = 0,
  parameter int unsigned B_SPI      = 32,
  // derived
  parameter int unsigned AAER = aer_in_w(N, BS),
  parameter int unsigned ANO  = addr_w(N_OUT)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NCORES-1:0]            aer_in_req,
  input  logic [NCORES-1:0][AAER-1:0]  aer_in_addr,
  output logic [NCORES-1:0]            aer_in_ack,
  output logic                         aer_out_req,
  output logic [ANO-1:0]               aer_out_addr,
  input  logic                         aer_out_ack,
  input  logic                         sck,
  input  logic [NCORES-1:0]            ss_n,
  input  logic                         mosi,
  output logic                         miso,
  output logic [NCORES-1:0]            sched_overflow,
  output logic [NCORES-1:0]            spike_fired,
  output logic [NCORES-1:0]            busy
);
  localparam int unsigned AW = ANO + addr_w(NCORES);

  logic [NCORES-1:0]           c_out_req, c_out_ack, c_miso;
  logic [NCORES-1:0][ANO-1:0]  c_out_addr;
  logic                        arb_req, arb_ack;
  logic [AW-1:0]               arb_addr;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    snn_core #(.N(N), .N_OUT(N_OUT), .BN(BN), .BS(BS), .BL(BL), .FIFO_D(FIFO_D),
               .LEAK_MODE(LEAK_MODE), .RESET_MODE(RESET_MODE), .B_SPI(B_SPI)) u_core (
      .clk, .rst,
      .aer_in_req(aer_in_req[c]), .aer_in_addr(aer_in_addr[c]), .aer_in_ack(aer_in_ack[c]),
      .aer_out_req(c_out_req[c]), .aer_out_addr(c_out_addr[c]), .aer_out_ack(c_out_ack[c]),
      .sck, .ss_n(ss_n[c]), .mosi, .miso(c_miso[c]),
      .sched_overflow(sched_overflow[c]), .spike_fired(spike_fired[c]), .busy(busy[c])
    );
  end

  assign miso = |c_miso;

  aer_arbiter #(.L(NCORES), .A_MAX(ANO), .EXT_AER(1'b0)) u_arb (
    .clk, .rst, .in_req(c_out_req), .in_addr(c_out_addr), .in_ack(c_out_ack),
    .out_req(arb_req), .out_addr(arb_addr), .out_ack(arb_ack)
  );

  virtual_core #(.W_IN(AW), .W_OUT(ANO)) u_root (
    .clk, .rst, .in_req(arb_req), .in_addr(arb_addr), .in_ack(arb_ack),
    .out_req(aer_out_req), .out_addr(aer_out_addr), .out_ack(aer_out_ack)
  );

endmodule
