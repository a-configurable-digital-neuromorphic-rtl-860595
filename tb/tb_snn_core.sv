// tb_snn_core: one core with 32 neurons (5-bit state, 2-bit weights, 3-bit
// leak) and a 4-entry scheduler FIFO, driven only through its pins: an SPI
// master task for configuration, a four-phase AER sender and an AER
// receiver with random acknowledge delays.
//  1. The neuron and synapse memories are written over SPI while
//     SPI_GATE_ACTIVITY is set, then a sample of bytes is read back.
//  2. AER events sent while the core is gated must wait; clearing the gate
//     starts them.
//  3. Random spike, leak and virtual events in open loop are compared with a
//     reference model (states, read back over SPI, and output spikes).
//  4. A closed-loop event makes 31 neurons fire at once: four rescheduled
//     spikes fit in the FIFO and the rest raise sched_overflow.
//     Each event's cycles from its push into the scheduler to the end of
//     its last write-back are checked: 2(SPI_MAX_NEUR+1)+1 for spike and
//     all-neuron leak events, 3 for virtual and single-neuron leak events,
//     plus any cycles spent waiting on a busy AER output.
//  5. With SPI_AER_SRC_CTRL_nNEUR set, each spike event is forwarded.
module tb_snn_core;
  import snn_pkg::*;
  localparam int N = 32, BN = 5, BS = 2, BL = 3, BWN = 16, MWS = 16, NWS = 2;
  localparam int AN = 5, AM = 6, AAER = 7, ANO = 5, B = 32;
  logic clk = 0, rst = 1;
  logic aer_in_req = 0, aer_in_ack, aer_out_req, aer_out_ack = 0;
  logic [AAER-1:0] aer_in_addr = '0;
  logic [ANO-1:0] aer_out_addr;
  logic sck = 0, ss_n = 1, mosi = 0, miso;
  logic sched_overflow, spike_fired, busy;
  int checks = 0, failures = 0;

  snn_core #(.N(N), .N_OUT(N), .BN(BN), .BS(BS), .BL(BL), .FIFO_D(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [B-1:0] a, input logic [B-1:0] d, output logic [B-1:0] rd);
    logic [2*B-1:0] sh;
    sh = {a, d};
    rd = '0;
    @(negedge clk); ss_n = 0;
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
    ss_n = 1;
    repeat (4) @(negedge clk);
  endtask
  task automatic conf(input int ad, input int val);
    logic [B-1:0] rd;
    xfer({2'b01, 2'b00, 28'(ad)}, B'(val), rd);
  endtask
  task automatic wr_neur(input int j, input logic [BWN-1:0] word);
    logic [B-1:0] rd;
    for (int b = 0; b < 2; b++) xfer({2'b01, 2'b01, 28'((b << AN) | j)}, {16'h0, 8'h00, word[8*b +: 8]}, rd);
  endtask
  task automatic rd_byte(input logic [1:0] cmd, input int a, output logic [7:0] v);
    logic [B-1:0] rd;
    xfer({2'b10, cmd, 28'(a)}, '0, rd);
    v = rd[7:0];
  endtask
  task automatic wr_syn(input int a, input logic [31:0] word);
    logic [B-1:0] rd;
    for (int b = 0; b < 4; b++) xfer({2'b01, 2'b10, 28'((b << AM) | a)}, {16'h0, 8'h00, word[8*b +: 8]}, rd);
  endtask

  // AER sender (four-phase)
  int sent = 0;
  task automatic aer_send(input logic [AAER-1:0] p);
    @(negedge clk);
    aer_in_addr = p; aer_in_req = 1;
    wait (aer_in_ack); @(negedge clk);
    aer_in_req = 0;
    wait (!aer_in_ack); @(negedge clk);
    sent++;
  endtask

  // AER receiver with random delays
  int outs[$];
  int ovf = 0;
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (aer_out_req && !aer_out_ack) begin
        outs.push_back(int'(aer_out_addr));
        repeat ($urandom_range(0, 8)) @(posedge clk);
        aer_out_ack <= 1;
        while (aer_out_req) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        aer_out_ack <= 0;
      end
    end
  end
  // latency from the cycle an input event is pushed into an empty scheduler
  // of an idle core to the first idle cycle after its last write-back
  longint cyc_n = 0, push_cyc = -1;
  int lat = -1, lat_ok = 0;
  bit busy_q = 0;
  always @(posedge clk) begin
    cyc_n <= cyc_n + 1;
    busy_q <= busy;
    if (dut.in_push && !busy && dut.sched_empty) push_cyc <= cyc_n;
    if (busy_q && !busy && push_cyc >= 0) begin lat <= int'(cyc_n - push_cyc); push_cyc <= -1; end
  end
  int stall_cycles = 0;
  always @(posedge clk) begin
    if (sched_overflow) ovf++;
    if (dut.u_ctrl.stall) stall_cycles++;
  end

  // reference model
  int st[N], th[N], lk[N];
  bit dis[N], ou[N], rs[N];
  int w[N][N];
  int exp_out[$];
  function automatic int sat(input int v);
    return (v > 15) ? 15 : (v < -16) ? -16 : v;
  endfunction
  function automatic void integ(input int j, input int wt);
    int v;
    if (dis[j]) return;
    v = sat(st[j] + wt);
    if (v >= th[j]) begin st[j] = 0; if (ou[j]) exp_out.push_back(j); end
    else st[j] = v;
  endfunction
  function automatic void leak(input int j);
    if (dis[j]) return;
    if (st[j] > 0) st[j] = (st[j] - lk[j] < 0) ? 0 : st[j] - lk[j];
    else if (st[j] < 0) st[j] = (st[j] + lk[j] > 0) ? 0 : st[j] + lk[j];
  endfunction
  function automatic logic [BWN-1:0] nword(input int j);
    return {dis[j], ou[j], rs[j], BL'(lk[j]), BN'(th[j]), BN'(st[j])};
  endfunction
  function automatic logic [31:0] sword(input int i, input int k);
    logic [31:0] x;
    for (int s = 0; s < MWS; s++) x[s*BS +: BS] = BS'(w[i][k*MWS + s]);
    return x;
  endfunction

  task automatic wait_idle();
    do repeat (40) @(negedge clk);
    while (busy || !dut.sched_empty || aer_out_req || aer_out_ack);
  endtask
  task automatic compare_states(input string tag);
    int bad = 0;
    for (int j = 0; j < N; j++) if (dut.u_nmem.mem[j][BN-1:0] != BN'(st[j])) bad++;
    check(bad == 0, $sformatf("%s: %0d states differ", tag, bad));
  endtask

  initial begin
    #40000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] v;
    int bad, busy_seen;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    // 1. programming over SPI (gate is set after reset)
    for (int j = 0; j < N; j++) begin
      st[j] = $urandom_range(0, 16) - 8; th[j] = $urandom_range(2, 8);
      lk[j] = $urandom_range(0, 7); dis[j] = ($urandom_range(0, 9) == 0);
      ou[j] = ($urandom_range(0, 2) != 0); rs[j] = 1'b0;
      for (int i = 0; i < N; i++) w[j][i] = $urandom_range(0, 3) - 2;
      wr_neur(j, nword(j));
    end
    for (int i = 0; i < N; i++) for (int k = 0; k < NWS; k++) wr_syn(i * NWS + k, sword(i, k));
    bad = 0;
    for (int j = 0; j < N; j++) if (dut.u_nmem.mem[j] != nword(j)) bad++;
    check(bad == 0, $sformatf("neuron memory written over SPI (%0d bad)", bad));
    bad = 0;
    for (int i = 0; i < N * NWS; i++) if (dut.u_smem.mem[i] != sword(i / NWS, i % NWS)) bad++;
    check(bad == 0, $sformatf("synapse memory written over SPI (%0d bad)", bad));
    for (int t = 0; t < 6; t++) begin
      int j, b, i;
      j = $urandom_range(0, N - 1); b = $urandom_range(0, 1);
      rd_byte(2'b01, (b << AN) | j, v);
      check(v == nword(j)[8*b +: 8], $sformatf("SPI read neuron %0d byte %0d", j, b));
      i = $urandom_range(0, N * NWS - 1); b = $urandom_range(0, 3);
      rd_byte(2'b10, (b << AM) | i, v);
      check(v == sword(i / NWS, i % NWS)[8*b +: 8], $sformatf("SPI read synapse word %0d byte %0d", i, b));
    end
    // 2. gated core holds events
    conf(1, 1);                                  // open loop
    aer_send({2'b00, 5'd3});
    repeat (50) @(negedge clk);
    check(!busy && !dut.sched_empty, "event waits while SPI_GATE_ACTIVITY is set");
    for (int j = 0; j < N; j++) integ(j, w[3][j]);
    conf(0, 0);
    wait_idle();
    compare_states("first event after gate release");
    // 3. random open-loop traffic
    for (int e = 0; e < 30; e++) begin
      int k, x, want, st0;
      k = $urandom_range(0, 9);
      want = (k < 6 || k == 8) ? 2 * N + 1 : 3;
      lat = -1;
      st0 = stall_cycles;
      if (k < 6) begin
        x = $urandom_range(0, N - 1);
        for (int j = 0; j < N; j++) integ(j, w[x][j]);
        aer_send({2'b00, AN'(x)});
      end else if (k < 8) begin
        x = $urandom_range(0, 7);               // virtual: 3-bit neuron field
        integ(x, 1);
        aer_send({2'b10, 2'b01, 3'(x)});
      end else if (k == 8) begin
        for (int j = 0; j < N; j++) leak(j);
        aer_send({2'b01, 5'h1F});
      end else begin
        x = $urandom_range(0, N - 2);
        leak(x);
        aer_send({2'b01, AN'(x)});
      end
      wait_idle();
      want += stall_cycles - st0;            // waiting on the AER output adds cycles
      if (lat == want) lat_ok++;
      else check(0, $sformatf("event kind %0d took %0d cycles from push, expected %0d", k, lat, want));
    end
    check(lat_ok == 30, "event latencies: 2(SPI_MAX_NEUR+1)+1 for spike and leak-all, 3 for virtual and single leak");
    compare_states("random open-loop traffic");
    check(outs == exp_out, $sformatf("output spikes %0d vs %0d", outs.size(), exp_out.size()));
    bad = 0;
    conf(0, 1);
    for (int j = 0; j < N; j += 5) begin
      rd_byte(2'b01, j, v);
      if (v[BN-1:0] != BN'(st[j])) bad++;
    end
    check(bad == 0, "potentials read back over SPI");
    // 4. closed loop and overflow
    for (int j = 0; j < N; j++) begin
      st[j] = 0; th[j] = 1; lk[j] = 0; dis[j] = 0; ou[j] = 1; rs[j] = (j != 3);
      for (int i = 0; i < N; i++) w[j][i] = (j == 3) ? 1 : 0;
      wr_neur(j, nword(j));
    end
    for (int i = 0; i < N; i++) for (int k = 0; k < NWS; k++) wr_syn(i * NWS + k, sword(i, k));
    conf(1, 0);
    conf(0, 0);
    outs.delete(); ovf = 0; busy_seen = 0;
    aer_send({2'b00, 5'd3});
    wait_idle();
    check(outs.size() == N, $sformatf("closed loop: %0d output spikes", outs.size()));
    check(ovf == N - 1 - 4, $sformatf("closed loop: %0d overflow drops", ovf));
    // a neuron fires every 2 cycles here, faster than any handshake, so the
    // controller must have stalled on its AER output by now
    check(stall_cycles > 0, "controller waited on a busy AER output");
    // 5. controller-sourced output
    conf(2, 1);
    outs.delete();
    aer_send({2'b00, 5'd9});
    aer_send({2'b00, 5'd17});
    wait_idle();
    check(outs.size() == 2 && outs[0] == 9 && outs[1] == 17, "SPI_AER_SRC_CTRL_nNEUR forwards spike events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
