// tb_dvs_multicore: four 32-neuron cores behind the round-robin arbiter and
// the root virtual core. Each core's memories are preloaded so that an
// input spike from pre-synaptic neuron p makes exactly one neuron,
// (p + 7c) mod 32 in core c, fire and send an output event. Four AER
// senders drive all cores at the same time and the output receiver
// acknowledges slowly, so several cores compete and the arbiter's FIFO
// fills (its input FSM reaches WAIT_FIFO). The received addresses must be
// the expected multiset. The SPI path is
// checked by releasing each core's gate through its own select line and by
// reading a neuron byte of core 2 back over the shared (ORed) MISO line.
module tb_dvs_multicore;
  import snn_pkg::*;
  localparam int NC = 4, N = 32, BN = 5, BL = 3, BS = 2, AN = 5, AAER = 7, ANO = 5, B = 32;
  logic clk = 0, rst = 1;
  logic [NC-1:0] aer_in_req = '0, aer_in_ack;
  logic [NC-1:0][AAER-1:0] aer_in_addr = '0;
  logic aer_out_req, aer_out_ack = 0;
  logic [ANO-1:0] aer_out_addr;
  logic sck = 0, mosi = 0, miso;
  logic [NC-1:0] ss_n = '1;
  logic [NC-1:0] sched_overflow, spike_fired, busy;
  int checks = 0, failures = 0;

  dvs_multicore #(.NCORES(NC), .N(N), .N_OUT(N), .BN(BN), .BS(BS), .BL(BL), .FIFO_D(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int target(input int c, input int p);
    return (p + 7 * c) % N;
  endfunction

  // preload: threshold 1, state 0, output enabled; row p has a single +1
  for (genvar c = 0; c < NC; c++) begin : g_pre
    initial begin
      for (int j = 0; j < N; j++)
        dut.g_core[c].u_core.u_nmem.mem[j] = {1'b0, 1'b1, 1'b0, 3'd0, 5'd1, 5'd0};
      for (int p = 0; p < N; p++)
        for (int k = 0; k < 2; k++) begin
          logic [31:0] x;
          x = '0;
          for (int s = 0; s < 16; s++) if (k * 16 + s == target(c, p)) x[2*s +: 2] = 2'b01;
          dut.g_core[c].u_core.u_smem.mem[p * 2 + k] = x;
        end
    end
  end

  task automatic xfer(input int c, input logic [B-1:0] a, input logic [B-1:0] d, output logic [B-1:0] rd);
    logic [2*B-1:0] sh;
    sh = {a, d};
    rd = '0;
    @(negedge clk); ss_n[c] = 0;
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
    ss_n[c] = 1;
    repeat (4) @(negedge clk);
  endtask

  // one four-phase sender per core
  int sent[NC];
  int exp_q[NC][$];
  for (genvar c = 0; c < NC; c++) begin : g_send
    task automatic send(input int p);
      @(negedge clk);
      aer_in_addr[c] = {2'b00, AN'(p)}; aer_in_req[c] = 1;
      wait (aer_in_ack[c]); @(negedge clk);
      aer_in_req[c] = 0;
      wait (!aer_in_ack[c]); @(negedge clk);
      sent[c]++;
    endtask
  end

  // slow receiver
  int outs[$];
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (aer_out_req && !aer_out_ack) begin
        outs.push_back(int'(aer_out_addr));
        repeat ($urandom_range(20, 60)) @(posedge clk);
        aer_out_ack <= 1;
        while (aer_out_req) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        aer_out_ack <= 0;
      end
    end
  end
  int wait_fifo = 0;
  always @(posedge clk) if (dut.u_arb.ist == 2'd1) wait_fifo++;

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam int EV = 6;
  int pre[NC][EV];
  initial begin
    logic [B-1:0] rd;
    int expected[$], got[$];
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    // read core 2 neuron 5 byte 1 (threshold bits 9:5 -> bits 1:0 of byte 1)
    xfer(2, {2'b10, 2'b01, 28'((1 << AN) | 5)}, '0, rd);
    check(rd[7:0] == 8'h40 && rd[31:8] == 0, $sformatf("SPI read through ORed MISO: %h", rd));
    for (int c = 0; c < NC; c++) xfer(c, {2'b01, 2'b00, 28'd1}, 32'd1, rd);   // open loop
    for (int c = 0; c < NC; c++) xfer(c, {2'b01, 2'b00, 28'd0}, 32'd0, rd);   // release gate
    for (int c = 0; c < NC; c++)
      for (int e = 0; e < EV; e++) begin
        pre[c][e] = $urandom_range(0, N - 1);
        expected.push_back(target(c, pre[c][e]));
      end
    fork
      for (int e = 0; e < EV; e++) g_send[0].send(pre[0][e]);
      for (int e = 0; e < EV; e++) g_send[1].send(pre[1][e]);
      for (int e = 0; e < EV; e++) g_send[2].send(pre[2][e]);
      for (int e = 0; e < EV; e++) g_send[3].send(pre[3][e]);
    join
    do repeat (200) @(negedge clk);
    while (busy != 0 || outs.size() < NC * EV && $time < 15000000);
    repeat (2000) @(negedge clk);
    expected.sort();
    got = outs;
    got.sort();
    check(got == expected, $sformatf("merged output events (%0d of %0d)", outs.size(), expected.size()));
    check(wait_fifo > 0, "arbiter FIFO full: input FSM waited");
    check(!aer_out_req && !aer_out_ack, "output handshake idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
