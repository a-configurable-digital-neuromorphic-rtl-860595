// tb_aer_output: sends events through the AER sender to a receiver model
// with random acknowledge delays and checks addresses, the four-phase order
// (REQ held until ACK, ACK released only after REQ falls) and ready.
module tb_aer_output;
  localparam int W = 10;
  logic clk = 0, rst = 1;
  logic send = 0, ready, aer_req, aer_ack = 0;
  logic [W-1:0] addr_in = '0, aer_addr;
  int checks = 0, failures = 0;
  logic [W-1:0] got[$];

  aer_output #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receiver model
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (aer_req && !aer_ack) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        check(aer_req, "REQ held until ACK");
        got.push_back(aer_addr);
        aer_ack <= 1;
        while (aer_req) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        aer_ack <= 0;
      end
    end
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int e = 0; e < 30; e++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      send = 1; addr_in = W'(e * 29 + 5);
      @(negedge clk);
      send = 0;
      check(!ready && aer_req && aer_addr == W'(e * 29 + 5), "request raised");
    end
    @(negedge clk);
    while (!ready) @(negedge clk);
    check(got.size() == 30, $sformatf("received %0d", got.size()));
    for (int e = 0; e < got.size(); e++) check(got[e] == W'(e * 29 + 5), $sformatf("address %0d: %0d", e, got[e]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
