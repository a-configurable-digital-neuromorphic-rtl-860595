// tb_controller: the controller at its default size (640 neurons, 5-bit
// neurons, 2-bit weights) with real neuron and synapse memories, a queue
// model of the scheduler and an AER output model that is sometimes busy.
// A reference model in the testbench applies each event to its own copy
// of the neuron states and predicts output and rescheduled spikes; after
// every event the whole neuron memory is compared. Cycle counts are checked
// against 2(SPI_MAX_NEUR+1) for spike and all-neuron leak events and 2 for
// virtual and single-neuron leak events.
module tb_controller;
  import snn_pkg::*;
  localparam int N = 640, BN = 5, BS = 2, BL = 3, BWN = 16, MWS = 16, NWS = 40;
  localparam int MP = NWS * N, AN = 10, AM = 15, AAER = 12, ANO = 10;
  logic clk = 0, rst = 1;
  core_cfg_t cfg;
  logic sched_empty, sched_pop, loc_push;
  logic [AAER-1:0] sched_head, loc_pkt;
  logic nm_en, nm_we, sm_en;
  logic [AN-1:0] nm_addr;
  logic [BWN-1:0] nm_wmask, nm_wdata, nm_rdata;
  logic [AM-1:0] sm_addr;
  logic [31:0] sm_rdata;
  logic out_ready, out_send, busy, spike_fired;
  logic [ANO-1:0] out_addr;
  int checks = 0, failures = 0;

  controller dut (.*);
  neuron_memory #(.N(N), .W(BWN)) nm (.clk, .en(nm_en), .we(nm_we), .addr(nm_addr),
    .wmask(nm_wmask), .wdata(nm_wdata), .rdata(nm_rdata));
  synapse_memory #(.DEPTH(MP), .W(32)) sm (.clk, .en(sm_en), .we(1'b0), .addr(sm_addr),
    .wmask(32'h0), .wdata(32'h0), .rdata(sm_rdata));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // scheduler model
  // (array with head/tail indices so that the outputs follow every change)
  logic [AAER-1:0] qa[4096];
  int qh = 0, qt = 0;
  assign sched_empty = (qh == qt);
  assign sched_head  = qa[qh % 4096];
  task automatic qpush(input logic [AAER-1:0] p);
    qa[qt % 4096] = p; qt = qt + 1;
  endtask
  int resched[$], outs[$];
  always @(posedge clk) begin
    if (sched_pop && qh != qt) qh <= qh + 1;
    if (loc_push) begin resched.push_back(int'(loc_pkt[AN-1:0])); qa[qt % 4096] <= loc_pkt; qt <= qt + 1; end
    if (out_send) outs.push_back(int'(out_addr));
  end

  // AER output model: busy for a few cycles after each send
  int busy_cnt = 0, stalls = 0;
  assign out_ready = (busy_cnt == 0);
  always @(posedge clk) begin
    if (out_send) busy_cnt <= $urandom_range(1, 6);
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (dut.stall) stalls++;
  end

  // reference model
  int st[N], th[N], lk[N];
  bit dis[N], ou[N], rs[N];
  int w[N][N];
  int exp_out[$], exp_rs[$];

  function automatic int sat(input int v);
    return (v > 15) ? 15 : (v < -16) ? -16 : v;
  endfunction
  function automatic void integ(input int j, input int wt, input bit src_ctrl, input bit open_loop);
    int v;
    if (dis[j]) return;
    v = sat(st[j] + wt);
    if (v >= th[j]) begin
      st[j] = 0;
      if (ou[j] && !src_ctrl) exp_out.push_back(j);
      if (rs[j] && !open_loop) exp_rs.push_back(j);
    end else st[j] = v;
  endfunction
  function automatic void leak(input int j);
    if (dis[j]) return;
    if (st[j] > 0) st[j] = (st[j] - lk[j] < 0) ? 0 : st[j] - lk[j];
    else if (st[j] < 0) st[j] = (st[j] + lk[j] > 0) ? 0 : st[j] + lk[j];
  endfunction

  task automatic load_memories();
    for (int j = 0; j < N; j++) begin
      st[j] = $urandom_range(0, 20) - 10;
      th[j] = $urandom_range(3, 12);
      lk[j] = $urandom_range(0, 7);
      dis[j] = ($urandom_range(0, 15) == 0);
      ou[j] = ($urandom_range(0, 1) == 1);
      rs[j] = ($urandom_range(0, 3) == 0);
      nm.mem[j] = {dis[j], ou[j], rs[j], BL'(lk[j]), BN'(th[j]), BN'(st[j])};
    end
    for (int i = 0; i < N; i++)
      for (int k = 0; k < NWS; k++) begin
        logic [31:0] word;
        for (int s = 0; s < MWS; s++) begin
          int v;
          v = $urandom_range(0, 3) - 2;    // -2..1
          word[s*BS +: BS] = BS'(v);
          if (k * MWS + s < N) w[i][k * MWS + s] = v;
        end
        sm.mem[i * NWS + k] = word;
      end
  endtask

  task automatic compare_states(input string tag);
    int bad;
    bad = 0;
    for (int j = 0; j < N; j++)
      if (nm.mem[j][BN-1:0] != BN'(st[j])) begin bad++; if (bad == 1) $display("  n%0d mem=%0d model=%0d th=%0d dis=%0d", j, $signed(nm.mem[j][BN-1:0]), st[j], th[j], dis[j]); end
    check(bad == 0, $sformatf("%s: %0d neuron states differ", tag, bad));
  endtask

  // run one event already placed in q; returns cycles from pop to idle
  task automatic run_event(output int cycles);
    cycles = 0;
    #1;
    while (!(sched_pop)) @(negedge clk);
    do begin
      @(negedge clk); cycles++;
    end while (busy);
  endtask

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int spikes_seen = 0;
  always @(posedge clk) if (spike_fired) spikes_seen++;

  initial begin
    int cyc, maxn;
    cfg = '{gate_activity: 1'b1, open_loop: 1'b0, aer_src_ctrl: 1'b0, max_neur: 16'(N - 1)};
    load_memories();
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    cfg.gate_activity = 1'b0;
    // neuron spike events, full crossbar, closed loop
    for (int e = 0; e < 6; e++) begin
      int pre;
      pre = $urandom_range(0, N - 1);
      exp_out.delete(); exp_rs.delete(); outs.delete(); resched.delete();
      cfg.open_loop = 1'b1;         // keep the queue to this event only
      for (int j = 0; j < N; j++) integ(j, w[pre][j], 1'b0, 1'b1);
      qpush({2'b00, AN'(pre)});
      run_event(cyc);
      compare_states($sformatf("spike event %0d", e));
      check(outs == exp_out, $sformatf("output spikes of event %0d (%0d vs %0d)", e, outs.size(), exp_out.size()));
      check(resched.size() == 0, "open loop: nothing rescheduled");
    end
    // closed loop: rescheduled spikes enter the queue
    cfg.open_loop = 1'b0;
    begin
      int pre;
      pre = 5;
      exp_out.delete(); exp_rs.delete(); outs.delete(); resched.delete();
      for (int j = 0; j < N; j++) integ(j, w[pre][j], 1'b0, 1'b0);
      qpush({2'b00, AN'(pre)});
      run_event(cyc);
      check(resched == exp_rs, $sformatf("rescheduled spikes %0d vs %0d", resched.size(), exp_rs.size()));
      qh = qt;
      compare_states("closed loop event");
    end
    // cycle count with a smaller crossbar and no output traffic
    for (int j = 0; j < N; j++) begin ou[j] = 0; nm.mem[j][BWN-2] = 1'b0; end
    cfg.open_loop = 1'b1;
    maxn = 99;
    cfg.max_neur = 16'(maxn);
    for (int j = 0; j <= maxn; j++) integ(j, w[7][j], 1'b0, 1'b1);
    qpush({2'b00, AN'(7)});
    run_event(cyc);
    check(cyc == 2 * (maxn + 1), $sformatf("spike event cycles %0d", cyc));
    compare_states("SPI_MAX_NEUR limited event");
    // all-neuron leak
    for (int j = 0; j <= maxn; j++) leak(j);
    qpush({2'b01, 10'h3FF});
    run_event(cyc);
    check(cyc == 2 * (maxn + 1), $sformatf("all-neuron leak cycles %0d", cyc));
    compare_states("all-neuron leak");
    // single-neuron leak
    leak(300);
    qpush({2'b01, AN'(300)});
    run_event(cyc);
    check(cyc == 2, $sformatf("single leak cycles %0d", cyc));
    compare_states("single leak");
    // virtual event: neuron 200 gets weight +1 (neur field is 8 bits)
    integ(200, 1, 1'b0, 1'b1);
    qpush({2'b10, 2'b01, 8'd200});
    run_event(cyc);
    check(cyc == 2, $sformatf("virtual event cycles %0d", cyc));
    compare_states("virtual event");
    // unused opcode is dropped
    qpush({2'b11, 10'd4});
    repeat (4) @(negedge clk);
    check(qh == qt && !busy, "unused opcode dropped");
    compare_states("unused opcode");
    // controller-sourced output: the popped event's address goes out
    cfg.aer_src_ctrl = 1'b1;
    outs.delete();
    for (int j = 0; j <= maxn; j++) integ(j, w[321][j], 1'b1, 1'b1);
    qpush({2'b00, AN'(321)});
    run_event(cyc);
    repeat (10) @(negedge clk);
    check(outs.size() == 1 && outs[0] == 321, "controller-sourced output event");
    compare_states("controller-sourced mode");
    check(stalls > 0, "AER output stall exercised");
    check(spikes_seen > 0, "neurons fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
