// tb_synapse_memory: writes every word of a default-size synapse memory,
// rewrites single bytes through the bit mask, and reads everything back
// against a reference array, checking the one-cycle read latency and that
// rdata holds between reads.
module tb_synapse_memory;
  localparam int N = 25600, W = 32;
  logic clk = 0, en = 0, we = 0;
  logic [$clog2(N)-1:0] addr = '0;
  logic [W-1:0] wmask = '0, wdata = '0, rdata;
  logic [W-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  synapse_memory #(.DEPTH(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = i[$clog2(N)-1:0]; wmask = '1; wdata = W'($urandom);
      ref_mem[i] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      int a; logic [W-1:0] m;
      @(negedge clk);
      a = $urandom_range(0, N - 1);
      m = W'(8'hFF) << (8 * $urandom_range(0, 3));
      m = m & W'($urandom);
      en = 1; we = 1; addr = a[$clog2(N)-1:0]; wmask = m; wdata = W'($urandom);
      ref_mem[a] = (ref_mem[a] & ~m) | (wdata & m);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      en = 1; we = 0; addr = i[$clog2(N)-1:0];
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %h exp %h", i, rdata, ref_mem[i]);
      end
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[i]) failures++;   // held while not read
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
