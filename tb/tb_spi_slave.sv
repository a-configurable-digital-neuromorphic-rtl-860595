// tb_spi_slave: an SPI master task in the testbench sends 2*B_SPI-bit
// transfers (SCK period 6 clk cycles). Checks configuration register writes,
// the decoding of neuron and synapse byte writes (address, byte index, data,
// mask), that memory access is refused while SPI_GATE_ACTIVITY is clear,
// and that a read returns on MISO the byte the memory model supplies.
module tb_spi_slave;
  import snn_pkg::*;
  localparam int B = 32, AN = 10, ABN = 1, AM = 15, ABS = 2;
  logic clk = 0, rst = 1;
  logic sck = 0, ss_n = 1, mosi = 0, miso;
  core_cfg_t cfg;
  logic mem_req, mem_we, mem_syn;
  logic [AN-1:0] mem_neur_addr;
  logic [AM-1:0] mem_syn_addr;
  logic [3:0] mem_byte;
  logic [7:0] mem_wbyte, mem_wmask, mem_rbyte = '0;
  int checks = 0, failures = 0, nreq = 0;
  logic last_we, last_syn;
  logic [AN-1:0] last_na;
  logic [AM-1:0] last_sa;
  logic [3:0] last_byte;
  logic [7:0] last_wb, last_wm;

  spi_slave #(.B_SPI(B), .AN(AN), .ABN(ABN), .AM(AM), .ABS(ABS), .N(640)) dut (.*);
  always #5 clk = ~clk;

  // memory model: answers a read with a byte derived from the address
  always @(posedge clk) begin
    if (mem_req && !rst) begin
      nreq++;
      last_we = mem_we; last_syn = mem_syn; last_na = mem_neur_addr; last_sa = mem_syn_addr;
      last_byte = mem_byte; last_wb = mem_wbyte; last_wm = mem_wmask;
      mem_rbyte <= 8'(mem_syn ? (mem_syn_addr * 3 + mem_byte) : (mem_neur_addr + mem_byte * 16));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [B-1:0] a, input logic [B-1:0] d, output logic [B-1:0] rd);
    logic [2*B-1:0] sh;
    sh = {a, d};
    rd = '0;
    @(negedge clk); ss_n = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 2 * B; i++) begin
      mosi = sh[2*B-1-i];
      repeat (3) @(negedge clk);
      sck = 1;
      if (i >= B) rd = {rd[B-2:0], miso};
      repeat (3) @(negedge clk);
      sck = 0;
    end
    repeat (4) @(negedge clk);
    ss_n = 1;
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [B-1:0] addr(input bit r, input bit w, input logic [1:0] cmd, input int f);
    return {r, w, cmd, 28'(f)};
  endfunction

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [B-1:0] rd;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(cfg.gate_activity && !cfg.open_loop && !cfg.aer_src_ctrl && cfg.max_neur == 639, "reset values");
    xfer(addr(0, 0, 2'b00, 3), 32'd123, rd);
    check(cfg.max_neur == 123, $sformatf("MAX_NEUR %0d", cfg.max_neur));
    xfer(addr(0, 0, 2'b00, 1), 32'd1, rd);
    check(cfg.open_loop, "OPEN_LOOP set");
    xfer(addr(0, 0, 2'b00, 2), 32'd1, rd);
    check(cfg.aer_src_ctrl, "AER_SRC_CTRL set");
    // neuron write: byte 1 of word 517
    xfer(addr(0, 1, 2'b01, (1 << AN) | 517), {16'h0, 8'h0F, 8'hA6}, rd);
    check(nreq == 1 && last_we && !last_syn && last_na == 517 && last_byte == 1 &&
          last_wb == 8'hA6 && last_wm == 8'h0F, "neuron write decoded");
    // synapse write: byte 3 of word 25000
    xfer(addr(0, 1, 2'b10, (3 << AM) | 25000), {16'h0, 8'h00, 8'h5C}, rd);
    check(nreq == 2 && last_we && last_syn && last_sa == 25000 && last_byte == 3 &&
          last_wb == 8'h5C && last_wm == 8'h00, "synapse write decoded");
    // synapse read: byte 2 of word 1234
    xfer(addr(1, 0, 2'b10, (2 << AM) | 1234), 32'h0, rd);
    check(nreq == 3 && !last_we && last_syn && last_sa == 1234, "synapse read decoded");
    check(rd == 32'(8'(1234 * 3 + 2)), $sformatf("synapse read data %h", rd));
    // neuron read: byte 0 of word 77
    xfer(addr(1, 0, 2'b01, 77), 32'h0, rd);
    check(rd == 32'(8'(77)), $sformatf("neuron read data %h", rd));
    // open the gate: memory requests are refused
    xfer(addr(0, 0, 2'b00, 0), 32'd0, rd);
    check(!cfg.gate_activity, "gate cleared");
    xfer(addr(0, 1, 2'b01, 5), {16'h0, 8'h00, 8'h11}, rd);
    check(nreq == 4, $sformatf("no access while gate clear (%0d)", nreq));
    check(miso == 0, "MISO low when not selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
