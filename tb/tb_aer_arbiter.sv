// tb_aer_arbiter: four child senders with random gaps push packets into the
// arbiter while a slow receiver acknowledges the output. Checks that every
// packet leaves exactly once as {input index, address}, that each input's
// packets keep their order, that under constant load the grants rotate in
// round-robin order (a model of the priority pointer checks every grant), and that the FIFO-full path (WAIT_FIFO) is exercised.
// A second instance with an external input checks that external packets
// are forwarded without the index.
module tb_aer_arbiter;
  localparam int L = 4, A = 10, K = 25;
  localparam int OW = A + 2;
  logic clk = 0, rst = 1;
  logic [L-1:0] in_req = '0, in_ack;
  logic [L-1:0][A-1:0] in_addr = '0;
  logic out_req, out_ack = 0;
  logic [OW-1:0] out_addr;
  int checks = 0, failures = 0, wait_fifo = 0;
  logic [OW-1:0] got[$];
  int slow = 1;

  aer_arbiter #(.L(L), .A_MAX(A)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (dut.ist == dut.I_WAIT_FIFO) wait_fifo++;
  // every grant must go to the first synchronised request at or after the
  // input following the previous grant
  int rr_ptr = 0, rr_bad = 0, rr_grants = 0;
  always @(posedge clk) if (!rst && dut.ist == dut.I_IDLE && dut.any_req) begin
    int e;
    e = -1;
    for (int k = L - 1; k >= 0; k--) if (dut.req_s[(rr_ptr + k) % L]) e = (rr_ptr + k) % L;
    if (int'(dut.grant) != e) rr_bad++;
    rr_grants++;
    rr_ptr = (int'(dut.grant) + 1) % L;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // senders
  for (genvar i = 0; i < L; i++) begin : g_snd
    initial begin
      wait (!rst);
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        in_addr[i] = A'(i * 100 + k);
        in_req[i] = 1;
        while (!in_ack[i]) @(negedge clk);
        in_req[i] = 0;
        while (in_ack[i]) @(negedge clk);
        if (i == 3) repeat ($urandom_range(0, 6)) @(negedge clk);
      end
    end
  end

  // receiver
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (out_req && !out_ack) begin
        if (slow) repeat ($urandom_range(2, 10)) @(posedge clk);
        got.push_back(out_addr);
        out_ack <= 1;
        while (out_req) @(posedge clk);
        out_ack <= 0;
      end
    end
  end

  // second instance: three inputs, the last one external
  logic [2:0] e_req = '0, e_ack;
  logic [2:0][A-1:0] e_addr = '0;
  logic e_oreq, e_oack = 0;
  logic [A+1:0] e_oaddr;
  aer_arbiter #(.L(3), .A_MAX(A), .EXT_AER(1'b1)) dut_ext (
    .clk, .rst, .in_req(e_req), .in_addr(e_addr), .in_ack(e_ack),
    .out_req(e_oreq), .out_addr(e_oaddr), .out_ack(e_oack));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int next[L];
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (got.size() == L * K);
    repeat (50) @(posedge clk);
    check(got.size() == L * K, $sformatf("received %0d", got.size()));
    for (int i = 0; i < L; i++) next[i] = 0;
    foreach (got[n]) begin
      int src, a;
      src = int'(got[n][OW-1:A]);
      a = int'(got[n][A-1:0]);
      check(a == src * 100 + next[src], $sformatf("packet %0d from %0d: %0d", n, src, a));
      next[src]++;
    end
    // while inputs 0..2 are all loaded the first 12 grants rotate 0,1,2,...
    for (int n = 1; n < 9; n++)
      check(got[n][OW-1:A] != got[n-1][OW-1:A], "round robin alternates");
    check(wait_fifo > 0, "FIFO-full wait exercised");
    check(rr_bad == 0 && rr_grants >= L * K, $sformatf("round-robin order of %0d grants (%0d wrong)", rr_grants, rr_bad));
    // external input of the second instance
    @(negedge clk);
    e_addr[2] = 10'h2A5; e_req[2] = 1;
    while (!e_ack[2]) @(negedge clk);
    e_req[2] = 0;
    while (!e_oreq) @(negedge clk);
    check(e_oaddr == 12'h2A5, $sformatf("external packet raw %h", e_oaddr));
    e_oack = 1; while (e_oreq) @(negedge clk); e_oack = 0;
    e_addr[1] = 10'h015; e_req[1] = 1;
    while (!e_ack[1]) @(negedge clk);
    e_req[1] = 0;
    while (!e_oreq) @(negedge clk);
    check(e_oaddr == {2'd1, 10'h015}, $sformatf("child packet indexed %h", e_oaddr));
    e_oack = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
