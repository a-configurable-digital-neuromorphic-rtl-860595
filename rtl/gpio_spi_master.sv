// gpio_spi_master: bridge from a parallel request port to the SPI bus.
//
// On the FPGA board the cores are configured by a processor through
// general-purpose I/O; this block turns one parallel request into one SPI
// transfer of 2*B_SPI bits: the address field a, then the data field d_w,
// each most significant bit first, with ss_n held low for the whole
// transfer. wreq starts a write, rreq a read; for a read the data field
// sent on MOSI is zero and the B_SPI bits returned on MISO during the data
// field are collected in d_r. When the last bit has been transferred ss_n
// rises and wack (write) or rack (read) is raised; it stays high until the
// request is withdrawn (this four-phase request/acknowledge is this design's
// choice; the signal names are the document's).
//
// SCK is generated from clk: one SCK period is SCK_DIV clk cycles, low for
// SCK_DIV - SCK_DIV/2 cycles and high for SCK_DIV/2 (25 MHz clk and 5 MHz
// SCK on the board give SCK_DIV = 5). MOSI changes while SCK is low; MISO
// is sampled in the last clk cycle of the SCK high phase, which leaves the
// slave time to update it after the falling edge.
module gpio_spi_master #(
  parameter int unsigned B_SPI   = 32,
  parameter int unsigned SCK_DIV = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wreq,
  input  logic             rreq,
  output logic             wack,
  output logic             rack,
  input  logic [B_SPI-1:0] a,
  input  logic [B_SPI-1:0] d_w,
  output logic [B_SPI-1:0] d_r,
  output logic             sck,
  output logic             ss_n,
  output logic             mosi,
  input  logic             miso
);
  localparam int unsigned HI = SCK_DIV / 2;
  localparam int unsigned LO = SCK_DIV - HI;

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_DONE} state_e;
  state_e                   state;
  logic [2*B_SPI-1:0]       sh;
  logic [$clog2(2*B_SPI+1)-1:0] nbit;
  logic [$clog2(SCK_DIV+1)-1:0] tick;
  logic                     is_read;

  assign mosi = sh[2*B_SPI-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      sh      <= '0;
      nbit    <= '0;
      tick    <= '0;
      is_read <= 1'b0;
      sck     <= 1'b0;
      ss_n    <= 1'b1;
      wack    <= 1'b0;
      rack    <= 1'b0;
      d_r     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (wreq || rreq) begin
          is_read <= !wreq;
          sh      <= {a, wreq ? d_w : '0};
          ss_n    <= 1'b0;
          nbit    <= '0;
          tick    <= '0;
          state   <= S_LOW;
        end
        S_LOW: begin
          if (tick == $bits(tick)'(LO - 1)) begin
            tick  <= '0;
            sck   <= 1'b1;
            state <= S_HIGH;
          end else tick <= tick + 1'b1;
        end
        S_HIGH: begin
          if (tick == $bits(tick)'(HI - 1)) begin
            tick <= '0;
            sck  <= 1'b0;
            sh   <= {sh[2*B_SPI-2:0], 1'b0};
            if (nbit >= $bits(nbit)'(B_SPI)) d_r <= {d_r[B_SPI-2:0], miso};
            nbit <= nbit + 1'b1;
            if (nbit == $bits(nbit)'(2*B_SPI - 1)) begin
              ss_n  <= 1'b1;
              state <= S_DONE;
              if (is_read) rack <= 1'b1; else wack <= 1'b1;
            end else state <= S_LOW;
          end else tick <= tick + 1'b1;
        end
        S_DONE: if (!wreq && !rreq) begin
          wack  <= 1'b0;
          rack  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
