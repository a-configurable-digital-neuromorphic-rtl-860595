// tb_virtual_core: sends {core index, address} packets into the virtual
// output core and checks that only the lower address field comes out, in
// order, with both four-phase handshakes completing.
module tb_virtual_core;
  localparam int W_IN = 12, W_OUT = 10;
  logic clk = 0, rst = 1;
  logic in_req = 0, in_ack, out_req, out_ack = 0;
  logic [W_IN-1:0] in_addr = '0;
  logic [W_OUT-1:0] out_addr;
  int checks = 0, failures = 0;
  logic [W_OUT-1:0] got[$];

  virtual_core #(.W_IN(W_IN), .W_OUT(W_OUT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (out_req && !out_ack) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        got.push_back(out_addr);
        out_ack <= 1;
        while (out_req) @(posedge clk);
        out_ack <= 0;
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
    for (int e = 0; e < 20; e++) begin
      @(negedge clk);
      in_addr = {2'(e % 4), W_OUT'(e * 41 + 7)};
      in_req = 1;
      while (!in_ack) @(negedge clk);
      in_req = 0;
      while (in_ack) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (got.size() != 20) begin failures++; $display("FAIL: got %0d", got.size()); end
    for (int e = 0; e < got.size(); e++) begin
      checks++;
      if (got[e] != W_OUT'(e * 41 + 7)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
