// spi_slave: SPI configuration port of one core.
//
// Every transfer is 2*B_SPI bits long while ss_n is low: a B_SPI-bit address
// field a, most significant bit first, then a B_SPI-bit data field d. The
// address field is a = {R, W, cmd[1:0], addr[B_SPI-5:0]}:
//   cmd 00  write configuration register conf_addr = addr with d
//           (0 SPI_GATE_ACTIVITY, 1 SPI_OPEN_LOOP, 2 SPI_AER_SRC_CTRL_nNEUR,
//            3 SPI_MAX_NEUR; this numbering is this design's choice)
//   cmd 01  neuron memory byte access, addr = {byte_addr, word_addr}
//   cmd 10  synapse memory byte access, addr = {byte_addr, word_addr}
// with R=1 for a read and W=1 for a write. A write sends
// d = {.., mask[7:0], byte[7:0]}; a mask bit of 1 keeps the stored bit.
// A read returns d = {0.., byte[7:0]} on miso during the data field.
// The field layout and the global registers follow the document.
//
// SCK, SS_n and MOSI are sampled by the system clock through two-flop
// synchronisers, so SCK must be several times slower than clk (each SCK
// phase at least two clk cycles). MOSI is taken on the rising SCK edge and
// MISO changes on the falling edge. miso is 0 whenever the core is not
// selected, so the MISO lines of several cores can be ORed.
//
// Memory requests are issued as a one-cycle mem_req pulse, only while
// SPI_GATE_ACTIVITY is set. For a read the core must return the addressed
// byte on mem_rbyte in the cycle after mem_req; it is
// captured at the end of that cycle.
module spi_slave
  import snn_pkg::*;
#(
  parameter int unsigned B_SPI = 32,
  parameter int unsigned AN    = 10,   // neuron word address width
  parameter int unsigned ABN   = 1,    // neuron byte address width
  parameter int unsigned AM    = 15,   // synapse word address width
  parameter int unsigned ABS   = 2,    // synapse byte address width
  parameter int unsigned N     = 640   // number of neurons (reset of MAX_NEUR)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sck,
  input  logic            ss_n,
  input  logic            mosi,
  output logic            miso,
  output core_cfg_t       cfg,
  // memory access
  output logic            mem_req,
  output logic            mem_we,
  output logic            mem_syn,     // 0 neuron memory, 1 synapse memory
  output logic [AN-1:0]   mem_neur_addr,
  output logic [AM-1:0]   mem_syn_addr,
  output logic [3:0]      mem_byte,
  output logic [7:0]      mem_wbyte,
  output logic [7:0]      mem_wmask,
  input  logic [7:0]      mem_rbyte
);
  localparam int unsigned CW = $clog2(2*B_SPI + 1);

  logic [2:0]       sck_sync, mosi_sync, ss_sync;
  logic             sck_rise, sck_fall, sel, mosi_s;
  logic [CW-1:0]    cnt;
  logic [B_SPI-1:0] sh_in, addr_reg, miso_sh, a_next, d_next;
  logic             rd_wait;
  spi_cmd_e         cmd;

  assign sel      = !ss_sync[1];
  assign mosi_s   = mosi_sync[1];
  assign sck_rise = sck_sync[1] && !sck_sync[2];
  assign sck_fall = !sck_sync[1] && sck_sync[2];
  assign a_next   = {sh_in[B_SPI-2:0], mosi_s};
  assign d_next   = a_next;
  assign cmd      = spi_cmd_e'(addr_reg[B_SPI-3 -: 2]);
  assign miso     = sel && miso_sh[B_SPI-1];

  // Address decoding of the registered address field.
  assign mem_neur_addr = addr_reg[AN-1:0];
  assign mem_syn_addr  = addr_reg[AM-1:0];
  assign mem_syn       = (cmd == SPI_CMD_SYN);
  assign mem_byte      = mem_syn ? 4'(addr_reg[AM +: ABS]) : 4'(addr_reg[AN +: ABN]);

  always_ff @(posedge clk) begin
    if (rst) begin
      sck_sync  <= '0;
      mosi_sync <= '0;
      ss_sync   <= '1;
      cnt       <= '0;
      sh_in     <= '0;
      addr_reg  <= '0;
      miso_sh   <= '0;
      rd_wait   <= 1'b0;
      mem_req   <= 1'b0;
      mem_we    <= 1'b0;
      mem_wbyte <= '0;
      mem_wmask <= '0;
      cfg.gate_activity <= 1'b1;
      cfg.open_loop     <= 1'b0;
      cfg.aer_src_ctrl  <= 1'b0;
      cfg.max_neur      <= MAX_AN'(N - 1);
    end else begin
      sck_sync  <= {sck_sync[1:0], sck};
      mosi_sync <= {mosi_sync[1:0], mosi};
      ss_sync   <= {ss_sync[1:0], ss_n};
      mem_req   <= 1'b0;
      rd_wait   <= mem_req && !mem_we;
      if (rd_wait) miso_sh <= {{(B_SPI-8){1'b0}}, mem_rbyte};
      if (!sel) begin
        cnt     <= '0;
        miso_sh <= '0;
      end else begin
        if (sck_rise) begin
          sh_in <= a_next;
          cnt   <= cnt + 1'b1;
          if (cnt == CW'(B_SPI - 1)) begin
            // address field complete
            addr_reg <= a_next;
            if (a_next[B_SPI-1] && cfg.gate_activity &&
                (a_next[B_SPI-3 -: 2] == SPI_CMD_NEUR || a_next[B_SPI-3 -: 2] == SPI_CMD_SYN)) begin
              mem_req <= 1'b1;
              mem_we  <= 1'b0;
            end
          end else if (cnt == CW'(2*B_SPI - 1)) begin
            // data field complete
            if (cmd == SPI_CMD_CONF) begin
              unique case (addr_reg[B_SPI-5:0])
                (B_SPI-4)'(CONF_GATE_ACTIVITY): cfg.gate_activity <= d_next[0];
                (B_SPI-4)'(CONF_OPEN_LOOP):     cfg.open_loop     <= d_next[0];
                (B_SPI-4)'(CONF_AER_SRC_CTRL):  cfg.aer_src_ctrl  <= d_next[0];
                (B_SPI-4)'(CONF_MAX_NEUR):      cfg.max_neur      <= d_next[MAX_AN-1:0];
                default: ;
              endcase
            end else if (addr_reg[B_SPI-2] && cfg.gate_activity &&
                         (cmd == SPI_CMD_NEUR || cmd == SPI_CMD_SYN)) begin
              mem_req   <= 1'b1;
              mem_we    <= 1'b1;
              mem_wbyte <= d_next[7:0];
              mem_wmask <= d_next[15:8];
            end
          end
        end
        if (sck_fall && cnt > CW'(B_SPI)) miso_sh <= {miso_sh[B_SPI-2:0], 1'b0};
      end
    end
  end

endmodule
