// tb_gpio_spi_master: a behavioural SPI slave in the testbench records the
// 2*B_SPI bits seen on MOSI at rising SCK edges while SS_n is low and
// drives a known word on MISO during the data field (changing on falling
// edges). Checks the frame contents for writes and reads, the returned
// read data, the SCK period of SCK_DIV clk cycles and the acknowledges.
module tb_gpio_spi_master;
  localparam int B = 32, DIV = 5;
  logic clk = 0, rst = 1;
  logic wreq = 0, rreq = 0, wack, rack, sck, ss_n, mosi, miso;
  logic [B-1:0] a = '0, d_w = '0, d_r;
  int checks = 0, failures = 0;
  logic [2*B-1:0] frame;
  int nbits, nclk_rise;
  logic [B-1:0] miso_word = 32'hC3A5_0F96;
  int last_rise, period;

  gpio_spi_master #(.B_SPI(B), .SCK_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slave model
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge sck) if (!ss_n) begin
    frame = {frame[2*B-2:0], mosi};
    nbits++;
    if (nbits > 1) period = cyc - last_rise;
    last_rise = cyc;
  end
  always @(negedge sck) if (!ss_n) begin
    if (nbits >= B && nbits < 2 * B) miso = miso_word[2*B - 1 - nbits];
    else miso = 0;
  end
  always @(negedge ss_n) begin nbits = 0; miso = 0; end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    miso = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // write
    @(negedge clk);
    a = 32'h4123_4567; d_w = 32'h0000_F0A5; wreq = 1;
    while (!wack) @(negedge clk);
    check(frame == {32'h4123_4567, 32'h0000_F0A5}, $sformatf("write frame %h", frame));
    check(nbits == 2 * B, $sformatf("write bits %0d", nbits));
    check(period == DIV, $sformatf("SCK period %0d", period));
    check(ss_n, "SS_n released");
    wreq = 0;
    @(negedge clk);
    check(!wack, "wack released");
    // read
    @(negedge clk);
    a = 32'h8000_0123; rreq = 1;
    while (!rack) @(negedge clk);
    check(frame == {32'h8000_0123, 32'h0}, $sformatf("read frame %h", frame));
    check(d_r == miso_word, $sformatf("read data %h", d_r));
    rreq = 0;
    @(negedge clk);
    check(!rack, "rack released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
