// tb_fifo: self-checking test of the event FIFO at its default size.
// Fills it completely with a known sequence (checking full and that a push
// when full is ignored), drains it checking order and empty, then runs
// simultaneous push and pop against a reference queue.
module tb_fifo;
  localparam int unsigned W = 12, D = 128;
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  fifo #(.W(W), .D(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(empty && !full, "empty after reset");
    for (int i = 0; i < D; i++) begin
      push <= 1; din <= W'(i * 7 + 3);
      @(posedge clk);
    end
    push <= 1; din <= 12'hABC;   // ignored: full
    @(posedge clk);
    push <= 0;
    @(negedge clk);
    check(full && count == D, "full after D pushes");
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      check(dout == W'(i * 7 + 3), $sformatf("order %0d: %h", i, dout));
      pop = 1;
      @(posedge clk); #1 pop = 0;
    end
    @(negedge clk);
    check(empty, "empty after draining");
    // random traffic against a model
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (!empty) check(q.size() > 0 && dout == q[0], "random head");
      push = $urandom_range(0, 1);
      pop  = $urandom_range(0, 1);
      din  = W'($urandom);
      if (pop && !empty) void'(q.pop_front());
      if (push && !full) q.push_back(din);
      @(posedge clk); #1;
      check(count == q.size(), "count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
