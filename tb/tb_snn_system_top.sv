// tb_snn_system_top: end-to-end test of the full-size system (default
// parameters: four 640-neuron vision cores and one 128-neuron EMG core).
// Everything the processor would do goes through the parallel SPI request
// port and the two AER ports. Only the bulk memory contents are preloaded
// directly into the memories at time zero, because writing 400 KB over a
// 5 MHz SPI link would take far too long in simulation; SPI writes and reads
// of individual bytes are exercised on both processors.
//
// Vision processor: neuron p of every core projects onto a single neuron
// (p + 97c) mod 640 of core c with threshold 1, so each input spike gives
// one known output event. Events for all four cores are sent back to back
// through the input demultiplexer, the output receiver is slow, so the
// arbiter's FIFO fills and the cores wait on their AER outputs. A first
// fixed burst (neurons 5 and 6 of every core, receiver holding its ack for
// 3000 cycles) makes the FIFO-full wait happen for every random seed. The merged
// output addresses must match. An all-neuron leak is timed (2*640 cycles)
// and SPI_MAX_NEUR is lowered on one core to check that neurons above it
// are skipped and that the event is shorter.
//
// EMG processor: random neuron and synapse contents checked against a
// reference model for spike, virtual, single and all-neuron leak events in
// open loop, states read back over SPI; then a closed-loop burst in which
// 127 neurons fire into a scheduler already holding 10 events, so 118
// rescheduled spikes are queued and 9 are dropped with sched_overflow, and
// whose 127 output events, acknowledged slowly, make the controller wait; and
// finally controller-sourced output (SPI_AER_SRC_CTRL_nNEUR).
// Each mechanism's count is printed and must be non-zero.
module tb_snn_system_top;
  import snn_pkg::*;
  localparam int B = 32;
  localparam int DN = 640, DAN = 10;
  localparam int EN = 128, EAN = 7, EMWS = 8, ENWS = 16;
  logic clk = 0, rst = 1;
  logic spi_wreq = 0, spi_rreq = 0, spi_wack, spi_rack;
  logic [2:0] spi_sel = '0;
  logic [B-1:0] spi_a = '0, spi_d_w = '0, spi_d_r;
  logic dvs_in_req = 0, dvs_in_ack, dvs_out_req, dvs_out_ack = 0;
  logic [13:0] dvs_in_addr = '0;
  logic [9:0] dvs_out_addr;
  logic emg_in_req = 0, emg_in_ack, emg_out_req, emg_out_ack = 0;
  logic [8:0] emg_in_addr = '0;
  logic [6:0] emg_out_addr;
  logic [4:0] sched_overflow, spike_fired, busy;
  int checks = 0, failures = 0;

  snn_system_top dut (.*);
  always #20 clk = ~clk;                 // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_spi_w = 0, n_spi_r = 0, n_gate = 0, n_mode = 0, n_maxneur = 0;
  int n_spike_ev = 0, n_virt_ev = 0, n_leak_ev = 0, n_srcctrl = 0;
  int n_stall = 0, n_ovf = 0, n_resched = 0, n_arb_wait = 0, n_dvs_out = 0, n_emg_out = 0;
  // length of the last busy period of each core, in clk cycles
  int busy_cnt[5], busy_len[5];
  always @(posedge clk)
    for (int c = 0; c < 5; c++)
      if (busy[c]) busy_cnt[c] <= busy_cnt[c] + 1;
      else if (busy_cnt[c] != 0) begin busy_len[c] <= busy_cnt[c]; busy_cnt[c] <= 0; end
  always @(posedge clk) begin
    n_ovf <= n_ovf + $countones(sched_overflow);
    if (dut.u_emg.u_ctrl.loc_push) n_resched <= n_resched + 1;
    if (dut.u_dvs.u_arb.ist == 2'd1) n_arb_wait <= n_arb_wait + 1;
    if (dut.u_emg.u_ctrl.stall || dut.u_dvs.g_core[0].u_core.u_ctrl.stall ||
        dut.u_dvs.g_core[1].u_core.u_ctrl.stall || dut.u_dvs.g_core[2].u_core.u_ctrl.stall ||
        dut.u_dvs.g_core[3].u_core.u_ctrl.stall) n_stall <= n_stall + 1;
  end

  // ---------------- parallel SPI port ----------------
  task automatic spi_w(input int sel, input logic [1:0] cmd, input int a, input int d);
    @(negedge clk);
    spi_sel = 3'(sel); spi_a = {2'b01, cmd, 28'(a)}; spi_d_w = B'(d); spi_wreq = 1;
    wait (spi_wack); @(negedge clk);
    spi_wreq = 0;
    wait (!spi_wack); @(negedge clk);
    n_spi_w++;
  endtask
  task automatic spi_r(input int sel, input logic [1:0] cmd, input int a, output logic [7:0] v);
    @(negedge clk);
    spi_sel = 3'(sel); spi_a = {2'b10, cmd, 28'(a)}; spi_d_w = '0; spi_rreq = 1;
    wait (spi_rack); @(negedge clk);
    v = spi_d_r[7:0];
    check(spi_d_r[B-1:8] == 0, "SPI read upper bits zero");
    spi_rreq = 0;
    wait (!spi_rack); @(negedge clk);
    n_spi_r++;
  endtask
  task automatic conf(input int sel, input int ad, input int val);
    spi_w(sel, 2'b00, ad, val);
    if (ad == 0) n_gate++;
    else if (ad == 3) n_maxneur++;
    else n_mode++;
  endtask

  // ---------------- AER ports ----------------
  task automatic dvs_send(input int core, input logic [1:0] op, input int a);
    @(negedge clk);
    dvs_in_addr = {2'(core), op, 10'(a)}; dvs_in_req = 1;
    wait (dvs_in_ack); @(negedge clk);
    dvs_in_req = 0;
    wait (!dvs_in_ack); @(negedge clk);
    if (op == 2'b00) n_spike_ev++; else if (op == 2'b01) n_leak_ev++; else n_virt_ev++;
  endtask
  task automatic emg_send(input logic [8:0] p);
    @(negedge clk);
    emg_in_addr = p; emg_in_req = 1;
    wait (emg_in_ack); @(negedge clk);
    emg_in_req = 0;
    wait (!emg_in_ack); @(negedge clk);
    if (p[8:7] == 2'b00) n_spike_ev++; else if (p[8:7] == 2'b01) n_leak_ev++; else n_virt_ev++;
  endtask

  int dvs_outs[$], emg_outs[$];
  int dvs_ack_min = 200, dvs_ack_max = 400;
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (dvs_out_req && !dvs_out_ack) begin
        dvs_outs.push_back(int'(dvs_out_addr)); n_dvs_out++;
        repeat ($urandom_range(dvs_ack_min, dvs_ack_max)) @(posedge clk);
        dvs_out_ack <= 1;
        while (dvs_out_req) @(posedge clk);
        dvs_out_ack <= 0;
      end
    end
  end
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (emg_out_req && !emg_out_ack) begin
        emg_outs.push_back(int'(emg_out_addr)); n_emg_out++;
        repeat ($urandom_range(0, 40)) @(posedge clk);
        emg_out_ack <= 1;
        while (emg_out_req) @(posedge clk);
        repeat ($urandom_range(0, 2)) @(posedge clk);
        emg_out_ack <= 0;
      end
    end
  end

  // ---------------- vision preload ----------------
  function automatic int target(input int c, input int p);
    return (p + 97 * c) % DN;
  endfunction
  for (genvar c = 0; c < 4; c++) begin : g_pre
    initial begin
      for (int j = 0; j < DN; j++)
        dut.u_dvs.g_core[c].u_core.u_nmem.mem[j] = {1'b0, 1'b1, 1'b0, 3'd2, 5'd1, 5'd0};
      for (int i = 0; i < DN * 40; i++) dut.u_dvs.g_core[c].u_core.u_smem.mem[i] = '0;
      for (int p = 0; p < DN; p++) begin
        int t;
        t = target(c, p);
        dut.u_dvs.g_core[c].u_core.u_smem.mem[p * 40 + t / 16][2 * (t % 16) +: 2] = 2'b01;
      end
    end
  end

  // ---------------- EMG reference model ----------------
  int st[EN], th[EN], lk[EN], w[EN][EN];
  bit dis[EN], ou[EN], rs[EN];
  int exp_emg[$];
  function automatic int sat(input int v);
    return (v > 63) ? 63 : (v < -64) ? -64 : v;
  endfunction
  function automatic void integ(input int j, input int wt);
    int v;
    if (dis[j]) return;
    v = sat(st[j] + wt);
    if (v >= th[j]) begin st[j] = 0; if (ou[j]) exp_emg.push_back(j); end
    else st[j] = v;
  endfunction
  function automatic void leak(input int j);
    if (dis[j]) return;
    if (st[j] > 0) st[j] = (st[j] - lk[j] < 0) ? 0 : st[j] - lk[j];
    else if (st[j] < 0) st[j] = (st[j] + lk[j] > 0) ? 0 : st[j] + lk[j];
  endfunction
  task automatic emg_load();
    for (int j = 0; j < EN; j++)
      dut.u_emg.u_nmem.mem[j] = {dis[j], ou[j], rs[j], 7'd0, 8'(lk[j]), 7'(th[j]), 7'(st[j])};
    for (int i = 0; i < EN; i++)
      for (int k = 0; k < ENWS; k++) begin
        logic [31:0] x;
        for (int s = 0; s < EMWS; s++) x[4*s +: 4] = 4'(w[i][k * EMWS + s]);
        dut.u_emg.u_smem.mem[i * ENWS + k] = x;
      end
  endtask
  task automatic emg_compare(input string tag);
    int bad = 0;
    for (int j = 0; j < EN; j++) if (dut.u_emg.u_nmem.mem[j][6:0] != 7'(st[j])) bad++;
    check(bad == 0, $sformatf("%s: %0d EMG states differ", tag, bad));
  endtask
  task automatic emg_idle();
    do repeat (50) @(negedge clk);
    while (busy[4] || !dut.u_emg.sched_empty || emg_out_req || emg_out_ack);
  endtask

  initial begin
    #80ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] v;
    int cyc, bad;
    int expected[$], got[$];
    for (int j = 0; j < EN; j++) begin
      st[j] = $urandom_range(0, 80) - 40; th[j] = $urandom_range(8, 50);
      lk[j] = $urandom_range(0, 255); dis[j] = ($urandom_range(0, 15) == 0);
      ou[j] = ($urandom_range(0, 3) == 0); rs[j] = 0;
      for (int i = 0; i < EN; i++) w[j][i] = $urandom_range(0, 15) - 8;
    end
    emg_load();
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);

    // ---- SPI byte access on both processors (gates are set after reset)
    spi_w(4, 2'b01, (2 << EAN) | 9, 32'h00AB);          // EMG neuron 9 byte 2 = 0xAB
    spi_r(4, 2'b01, (2 << EAN) | 9, v);
    check(v == 8'hAB, "EMG neuron byte write/read over SPI");
    begin
      logic [31:0] word;
      word = dut.u_emg.u_nmem.mem[9];
      lk[9] = int'(word[21:14]); th[9] = $signed(word[13:7]);
      dis[9] = word[31]; ou[9] = word[30]; rs[9] = word[29];
    end
    spi_r(1, 2'b01, (1 << DAN) | 33, v);                 // vision core 1, neuron 33, byte 1
    check(v == 8'h48, $sformatf("vision neuron byte read over SPI: %h", v));
    spi_w(2, 2'b10, (3 << 15) | 40, 32'h0000F0_5A);     // synapse byte, upper nibble kept
    spi_r(2, 2'b10, (3 << 15) | 40, v);
    check(v == 8'h0A, $sformatf("vision synapse masked write: %h", v));
    spi_w(2, 2'b10, (3 << 15) | 40, 32'h000000_00);      // restore
    for (int c = 0; c < 4; c++) conf(c, 1, 1);         // open loop
    for (int c = 0; c < 4; c++) conf(c, 0, 0);         // release the gates
    conf(4, 1, 1);
    conf(4, 0, 0);

    // ---- vision: back-to-back events to all cores, slow receiver
    // first two events per core that fire neurons 5 and 6 of every core while
    // the receiver holds its first ack for 3000 cycles: the virtual core, the
    // arbiter output and its 2-deep FIFO take four outputs, so the fifth
    // (second round, about 2*DN cycles later) finds the FIFO full
    dvs_ack_min = 3000; dvs_ack_max = 3000;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) begin
        int p;
        p = (5 + r - 97 * c + 4 * DN) % DN;
        expected.push_back(target(c, p));
        dvs_send(c, 2'b00, p);
      end
    repeat (100) @(negedge clk);
    dvs_ack_min = 200; dvs_ack_max = 400;
    for (int e = 0; e < 8; e++)
      for (int c = 0; c < 4; c++) begin
        int p;
        p = $urandom_range(0, DN - 1);
        expected.push_back(target(c, p));
        dvs_send(c, 2'b00, p);
      end
    // ---- EMG random open-loop traffic runs meanwhile
    for (int e = 0; e < 24; e++) begin
      int k, x;
      k = $urandom_range(0, 9);
      if (k < 5) begin
        x = $urandom_range(0, EN - 1);
        for (int j = 0; j < EN; j++) integ(j, w[x][j]);
        emg_send({2'b00, 7'(x)});
      end else if (k < 8) begin
        int wt;
        x = $urandom_range(0, 7); wt = $urandom_range(0, 15) - 8;
        integ(x, wt);
        emg_send({2'b10, 4'(wt), 3'(x)});
      end else if (k == 8) begin
        for (int j = 0; j < EN; j++) leak(j);
        emg_send({2'b01, 7'h7F});
      end else begin
        x = $urandom_range(0, EN - 2);
        leak(x);
        emg_send({2'b01, 7'(x)});
      end
      emg_idle();
    end
    emg_compare("EMG open-loop traffic");
    check(emg_outs == exp_emg, $sformatf("EMG output events %0d vs %0d", emg_outs.size(), exp_emg.size()));
    conf(4, 0, 1);
    bad = 0;
    for (int j = 0; j < EN; j += 9) begin
      spi_r(4, 2'b01, j, v);
      if (v[6:0] != 7'(st[j])) bad++;
    end
    check(bad == 0, "EMG potentials read back over SPI");

    wait (busy[3:0] == 0);
    repeat (4000) @(negedge clk);
    wait (!dvs_out_req && !dvs_out_ack);
    got = dvs_outs;
    got.sort(); expected.sort();
    check(got == expected, $sformatf("vision merged outputs (%0d of %0d)", dvs_outs.size(), expected.size()));

    // ---- vision: all-neuron leak timing and SPI_MAX_NEUR
    @(negedge clk);
    dvs_send(1, 2'b01, 10'h3FF);
    wait (busy[1]); wait (!busy[1]); repeat (2) @(negedge clk);
    cyc = busy_len[1] + 1;                               // plus the pop cycle
    check(cyc == 2 * DN, $sformatf("all-neuron leak busy for %0d cycles", cyc));
    conf(3, 3, 319);
    dvs_outs.delete();
    dvs_send(3, 2'b00, 500 - 97 * 3 + DN);                // target 500: skipped
    wait (busy[3]); wait (!busy[3]); repeat (2) @(negedge clk);
    cyc = busy_len[3] + 1;
    check(cyc == 2 * 320, $sformatf("SPI_MAX_NEUR=319 event busy for %0d cycles", cyc));
    dvs_send(3, 2'b00, 100 - 97 * 3 + DN);                // target 100: fires
    wait (busy[3]); wait (!busy[3]);
    repeat (200) @(negedge clk);
    check(dvs_outs.size() == 1 && dvs_outs[0] == 100, "only neurons up to SPI_MAX_NEUR are updated");

    // ---- EMG closed-loop burst with overflow
    for (int j = 0; j < EN; j++) begin
      st[j] = 0; th[j] = 1; lk[j] = 0; dis[j] = 0; ou[j] = 1; rs[j] = 1;
      for (int i = 0; i < EN; i++) w[j][i] = (j == 127 && i != 127) ? 1 : 0;
    end
    emg_load();
    conf(4, 1, 0);                                     // closed loop
    emg_send({2'b00, 7'd127});
    for (int e = 0; e < 10; e++) emg_send({2'b00, 7'(e)});
    n_ovf = 0; n_resched = 0;
    emg_outs.delete();
    conf(4, 0, 0);
    emg_idle();
    check(emg_outs.size() == 127, $sformatf("EMG burst output events: %0d", emg_outs.size()));
    check(n_resched == 127, $sformatf("EMG rescheduled spikes: %0d", n_resched));
    check(n_ovf == 9, $sformatf("EMG scheduler overflow drops: %0d", n_ovf));
    // ---- EMG controller-sourced output
    conf(4, 2, 1);
    emg_outs.delete();
    emg_send({2'b00, 7'd44});
    emg_idle();
    check(emg_outs.size() == 1 && emg_outs[0] == 44, "controller-sourced EMG output");
    n_srcctrl = emg_outs.size();

    $display("MECH spi_writes=%0d spi_reads=%0d gate_switches=%0d mode_switches=%0d max_neur_sets=%0d",
             n_spi_w, n_spi_r, n_gate, n_mode, n_maxneur);
    $display("MECH spike_events=%0d virtual_events=%0d leak_events=%0d src_ctrl_outputs=%0d",
             n_spike_ev, n_virt_ev, n_leak_ev, n_srcctrl);
    $display("MECH stall_cycles=%0d overflow_drops=%0d rescheduled=%0d arbiter_wait_fifo_cycles=%0d",
             n_stall, n_ovf, n_resched, n_arb_wait);
    $display("MECH vision_outputs=%0d emg_outputs=%0d", n_dvs_out, n_emg_out);
    check(n_spi_w > 0 && n_spi_r > 0 && n_gate > 0 && n_mode > 0 && n_maxneur > 0, "configuration mechanisms used");
    check(n_spike_ev > 0 && n_virt_ev > 0 && n_leak_ev > 0 && n_srcctrl > 0, "event kinds used");
    check(n_stall > 0, "stall seen");
    check(n_arb_wait > 0, "arbiter FIFO full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
