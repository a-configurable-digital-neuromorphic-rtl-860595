// tb_aer_input: drives four-phase AER transfers into the receiver, with the
// scheduler side sometimes not ready, and checks that each packet is pushed
// exactly once, that ACK follows REQ through all four phases, and that the
// push comes one cycle after the synchronised request (three clk edges
// after REQ rises).
module tb_aer_input;
  localparam int W = 12;
  logic clk = 0, rst = 1;
  logic aer_req = 0, aer_ack, push, push_ready = 1;
  logic [W-1:0] aer_addr = '0, pkt;
  int checks = 0, failures = 0, pushes = 0;
  logic [W-1:0] got[$];

  aer_input #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (push) begin pushes++; got.push_back(pkt); end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int e = 0; e < 20; e++) begin
      @(negedge clk);
      push_ready = (e % 4 != 3);
      aer_addr = W'(e * 37 + 1);
      aer_req = 1;
      lat = 0;
      while (!aer_ack) begin
        @(negedge clk); lat++;
        if (e % 4 == 3 && lat == 6) push_ready = 1;
      end
      if (e % 4 != 3) check(lat == 3, $sformatf("ack latency %0d", lat));
      aer_req = 0;
      lat = 0;
      while (aer_ack) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("ack release latency %0d", lat));
    end
    repeat (5) @(posedge clk);
    check(pushes == 20, $sformatf("pushes %0d", pushes));
    for (int e = 0; e < 20 && e < got.size(); e++)
      check(got[e] == W'(e * 37 + 1), "packet value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
