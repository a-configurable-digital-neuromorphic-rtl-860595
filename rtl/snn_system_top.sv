// snn_system_top: the hand-gesture recognition hardware as deployed.
//
// Two independent neuromorphic processors stand side by side:
//  * the vision processor (dvs_multicore): four 640-neuron cores with 2-bit
//    weights, one per 20x20 image quadrant, merged by an arbiter into a
//    virtual output core. Its four AER inputs are reached through one
//    14-bit AER port whose two top bits pick the core (aer_input_demux).
//  * the EMG processor: a single 128-neuron core with 7-bit neurons, 4-bit
//    weights and 32-bit neuron words, with its own 9-bit AER input and 7-bit
//    AER output.
// A parallel request port (gpio_spi_master) drives one SPI bus shared by
// all five cores; spi_sel (0-3 vision cores, 4 EMG core) chooses the
// chip-select that is pulled low during a transfer. MISO is the OR of the
// cores' MISO lines. Widths are those printed for the two processors: vision
// AER in 4 x [11:0], out [9:0]; EMG AER in [8:0], out [6:0]. The sensor
// fusion output layer, which would join both processors, is not part of it.
module snn_system_top
  import snn_pkg::*;
#(
  parameter int unsigned B_SPI   = 32,
  parameter int unsigned SCK_DIV = 5,
  // vision processor
  parameter int unsigned DVS_N   = 640,
  parameter int unsigned DVS_BN  = 5,
  parameter int unsigned DVS_BS  = 2,
  parameter int unsigned DVS_BL  = 3,
  // EMG processor
  parameter int unsigned EMG_N   = 128,
  parameter int unsigned EMG_BN  = 7,
  parameter int unsigned EMG_BS  = 4,
  parameter int unsigned EMG_BL  = 8,
  parameter int unsigned FIFO_D  = 128,
  // derived
  parameter int unsigned DVS_AAER = aer_in_w(DVS_N, DVS_BS),
  parameter int unsigned DVS_ANO  = addr_w(DVS_N),
  parameter int unsigned EMG_AAER = aer_in_w(EMG_N, EMG_BS),
  parameter int unsigned EMG_ANO  = addr_w(EMG_N)
) (
  input  logic                  clk,
  input  logic                  rst,
  // parallel configuration port
  input  logic                  spi_wreq,
  input  logic                  spi_rreq,
  output logic                  spi_wack,
  output logic                  spi_rack,
  input  logic [2:0]            spi_sel,
  input  logic [B_SPI-1:0]      spi_a,
  input  logic [B_SPI-1:0]      spi_d_w,
  output logic [B_SPI-1:0]      spi_d_r,
  // vision AER input (two top bits select the core) and output
  input  logic                  dvs_in_req,
  input  logic [DVS_AAER+1:0]   dvs_in_addr,
  output logic                  dvs_in_ack,
  output logic                  dvs_out_req,
  output logic [DVS_ANO-1:0]    dvs_out_addr,
  input  logic                  dvs_out_ack,
  // EMG AER input and output
  input  logic                  emg_in_req,
  input  logic [EMG_AAER-1:0]   emg_in_addr,
  output logic                  emg_in_ack,
  output logic                  emg_out_req,
  output logic [EMG_ANO-1:0]    emg_out_addr,
  input  logic                  emg_out_ack,
  // status
  output logic [4:0]            sched_overflow,
  output logic [4:0]            spike_fired,
  output logic [4:0]            busy
);
  logic       sck, ss_n, mosi, miso, dvs_miso, emg_miso;
  logic [4:0] ss_vec;

  gpio_spi_master #(.B_SPI(B_SPI), .SCK_DIV(SCK_DIV)) u_gpio_spi (
    .clk, .rst, .wreq(spi_wreq), .rreq(spi_rreq), .wack(spi_wack), .rack(spi_rack),
    .a(spi_a), .d_w(spi_d_w), .d_r(spi_d_r), .sck, .ss_n, .mosi, .miso
  );

  always_comb begin
    ss_vec = '1;
    if (spi_sel <= 3'd4) ss_vec[spi_sel] = ss_n;
  end
  assign miso = dvs_miso | emg_miso;

  // vision processor
  logic [3:0]                dvs_req, dvs_ack;
  logic [3:0][DVS_AAER-1:0]  dvs_addr;

  aer_input_demux #(.NOUT(4), .W(DVS_AAER)) u_demux (
    .in_req(dvs_in_req), .in_addr(dvs_in_addr), .in_ack(dvs_in_ack),
    .out_req(dvs_req), .out_addr(dvs_addr), .out_ack(dvs_ack)
  );

  dvs_multicore #(.NCORES(4), .N(DVS_N), .N_OUT(DVS_N), .BN(DVS_BN), .BS(DVS_BS),
                  .BL(DVS_BL), .FIFO_D(FIFO_D), .B_SPI(B_SPI)) u_dvs (
    .clk, .rst,
    .aer_in_req(dvs_req), .aer_in_addr(dvs_addr), .aer_in_ack(dvs_ack),
    .aer_out_req(dvs_out_req), .aer_out_addr(dvs_out_addr), .aer_out_ack(dvs_out_ack),
    .sck, .ss_n(ss_vec[3:0]), .mosi, .miso(dvs_miso),
    .sched_overflow(sched_overflow[3:0]), .spike_fired(spike_fired[3:0]), .busy(busy[3:0])
  );

  // EMG processor
  snn_core #(.N(EMG_N), .N_OUT(EMG_N), .BN(EMG_BN), .BS(EMG_BS), .BL(EMG_BL),
             .FIFO_D(FIFO_D), .B_SPI(B_SPI)) u_emg (
    .clk, .rst,
    .aer_in_req(emg_in_req), .aer_in_addr(emg_in_addr), .aer_in_ack(emg_in_ack),
    .aer_out_req(emg_out_req), .aer_out_addr(emg_out_addr), .aer_out_ack(emg_out_ack),
    .sck, .ss_n(ss_vec[4]), .mosi, .miso(emg_miso),
    .sched_overflow(sched_overflow[4]), .spike_fired(spike_fired[4]), .busy(busy[4])
  );

endmodule
