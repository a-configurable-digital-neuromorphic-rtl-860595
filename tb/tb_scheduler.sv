// tb_scheduler: pushes AER and local events into the scheduler, checks
// that local spikes take precedence in a shared cycle (AER side sees
// ext_ready low), that order is preserved, and that a local spike arriving
// when the FIFO is full raises overflow and is dropped.
module tb_scheduler;
  localparam int W = 12, D = 128;
  logic clk = 0, rst = 1;
  logic ext_push = 0, ext_ready, loc_push = 0, pop = 0, empty, overflow;
  logic [W-1:0] ext_pkt = '0, loc_pkt = '0, head;
  int checks = 0, failures = 0, ovf = 0;
  logic [W-1:0] q[$];

  scheduler #(.W(W), .D(D)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (overflow) ovf++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // both sources in the same cycle: local first, external must wait
    @(negedge clk);
    ext_push = 1; ext_pkt = 12'h111; loc_push = 1; loc_pkt = 12'h022;
    #1 check(!ext_ready, "ext_ready low while a local spike is pushed");
    @(negedge clk);
    loc_push = 0;
    #1 check(ext_ready, "ext_ready high again");
    @(negedge clk);
    ext_push = 0;
    check(head == 12'h022, "local event first");
    pop = 1; @(negedge clk); pop = 0;
    check(head == 12'h111, "external event second");
    pop = 1; @(negedge clk); pop = 0;
    check(empty, "empty");
    // fill up with external events, then a local spike overflows
    for (int i = 0; i < D; i++) begin
      ext_push = 1; ext_pkt = W'(i); @(negedge clk);
    end
    ext_push = 0;
    check(!ext_ready, "full: ext_ready low");
    loc_push = 1; loc_pkt = 12'hFFF;
    #1 check(overflow, "overflow flagged");
    @(negedge clk);
    loc_push = 0;
    check(ovf == 1, "one overflow");
    for (int i = 0; i < D; i++) begin
      check(head == W'(i), "order after fill");
      pop = 1; @(negedge clk); pop = 0;
    end
    check(empty, "dropped spike not stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
