// tb_aer_input_demux: checks that the two top packet bits route the request
// to one core only, that the lower bits reach every core, and that the
// selected core's acknowledge is the one returned.
module tb_aer_input_demux;
  localparam int NOUT = 4, W = 12;
  logic in_req, in_ack;
  logic [W+1:0] in_addr;
  logic [NOUT-1:0] out_req, out_ack;
  logic [NOUT-1:0][W-1:0] out_addr;
  int checks = 0, failures = 0;

  aer_input_demux #(.NOUT(NOUT), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      int d;
      d = $urandom_range(0, 3);
      in_addr = {2'(d), W'($urandom)};
      in_req = $urandom_range(0, 1);
      out_ack = 4'($urandom);
      #1;
      checks++;
      if (out_req != (in_req ? (4'b1 << d) : 4'b0)) failures++;
      checks++;
      if (in_ack != out_ack[d]) failures++;
      for (int k = 0; k < NOUT; k++) begin
        checks++;
        if (out_addr[k] != in_addr[W-1:0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
