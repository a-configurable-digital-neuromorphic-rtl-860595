// tb_snn_workloads: runs the two mapped classifiers on the full-size system
// (default parameters) with random weights, and compares every output spike
// and every final membrane potential with an event-level reference model.
//
// Vision: each of the four cores holds a 400-210-5 network. Hidden neurons
// 0..209 (rescheduled), output neurons 210..214 (sent on AER), input rows
// 210..609 projecting onto the hidden neurons, hidden rows 0..209 onto the
// outputs; neurons 215..639 are disabled and SPI_MAX_NEUR is set to 214 so
// that each sweep covers only the used neurons.
// EMG: a 16-110-5 network on the 128-neuron core, hidden neurons 0..109,
// outputs 110..114, input rows 110..125, SPI_MAX_NEUR = 114.
// The cores run closed loop, so a hidden spike comes back as a spike event
// and sweeps that neuron's row. Inputs are sent one per core and the test
// waits until every core is idle before the next, which makes the order of
// events inside each core deterministic; the model then replays the same
// queue, including spikes dropped when the 128-entry scheduler is full.
module tb_snn_workloads;
  import snn_pkg::*;
  localparam int B = 32;
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
  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- network description, per core (0-3 vision, 4 EMG)
  localparam int NMAX = 640;
  int nn[5], hid[5], in0[5], nin[5], bmax[5], wlo[5], whi[5], thr[5];
  int st[5][NMAX];
  int w[5][NMAX][NMAX];      // w[c][pre][post]
  bit ou[5][NMAX], rs[5][NMAX], dis[5][NMAX];
  int exp_out[5][$];
  int drops[5];

  function automatic int sat(input int c, input int v);
    return (v > bmax[c]) ? bmax[c] : (v < -bmax[c] - 1) ? -bmax[c] - 1 : v;
  endfunction
  // one input event into core c, run to completion
  function automatic void model_input(input int c, input int pre);
    int q[$];
    q.push_back(pre);
    while (q.size() > 0) begin
      int i;
      i = q.pop_front();
      for (int j = 0; j <= hid[c] + 4; j++) begin
        int v;
        if (dis[c][j]) continue;
        v = sat(c, st[c][j] + w[c][i][j]);
        if (v >= thr[c]) begin
          st[c][j] = 0;
          if (ou[c][j]) exp_out[c].push_back(j);
          if (rs[c][j]) begin
            if (q.size() < 128) q.push_back(j); else drops[c]++;
          end
        end else st[c][j] = v;
      end
    end
  endfunction

  // ---------------- preload into the memories
  function automatic logic [31:0] neur_word(input int c, input int j);
    if (c < 4) return 32'({dis[c][j], ou[c][j], rs[c][j], 3'd0, 5'(thr[c]), 5'(st[c][j])});
    return {dis[c][j], ou[c][j], rs[c][j], 7'd0, 8'd0, 7'(thr[c]), 7'(st[c][j])};
  endfunction
  function automatic logic [31:0] syn_word(input int c, input int i, input int k);
    logic [31:0] x;
    int bs, m;
    bs = (c < 4) ? 2 : 4; m = 32 / bs;
    x = '0;
    for (int s = 0; s < m; s++)
      if (k * m + s < nn[c]) begin
        if (bs == 2) x[s*2 +: 2] = 2'(w[c][i][k * m + s]); else x[s*4 +: 4] = 4'(w[c][i][k * m + s]);
      end
    return x;
  endfunction

  task automatic build(input int c);
    for (int j = 0; j < nn[c]; j++) begin
      st[c][j] = 0;
      dis[c][j] = (j > hid[c] + 4);
      rs[c][j] = (j < hid[c]);
      ou[c][j] = (j >= hid[c] && j <= hid[c] + 4);
      for (int i = 0; i < nn[c]; i++) w[c][i][j] = 0;
    end
    for (int i = in0[c]; i < in0[c] + nin[c]; i++)
      for (int j = 0; j < hid[c]; j++) w[c][i][j] = $urandom_range(0, whi[c] - wlo[c]) + wlo[c];
    for (int i = 0; i < hid[c]; i++)
      for (int j = hid[c]; j < hid[c] + 5; j++) w[c][i][j] = $urandom_range(0, whi[c] - wlo[c]) + wlo[c];
  endtask

  for (genvar c = 0; c < 4; c++) begin : g_load
    task automatic load();
      for (int j = 0; j < 640; j++) dut.u_dvs.g_core[c].u_core.u_nmem.mem[j] = neur_word(c, j)[15:0];
      for (int i = 0; i < 640; i++)
        for (int k = 0; k < 40; k++) dut.u_dvs.g_core[c].u_core.u_smem.mem[i * 40 + k] = syn_word(c, i, k);
    endtask
    function automatic int state(input int j);
      return int'($signed(dut.u_dvs.g_core[c].u_core.u_nmem.mem[j][4:0]));
    endfunction
  end
  task automatic load_emg();
    for (int j = 0; j < 128; j++) dut.u_emg.u_nmem.mem[j] = neur_word(4, j);
    for (int i = 0; i < 128; i++)
      for (int k = 0; k < 16; k++) dut.u_emg.u_smem.mem[i * 16 + k] = syn_word(4, i, k);
  endtask

  // ---------------- ports
  task automatic spi_w(input int sel, input int a, input int d);
    @(negedge clk);
    spi_sel = 3'(sel); spi_a = {2'b01, 2'b00, 28'(a)}; spi_d_w = B'(d); spi_wreq = 1;
    wait (spi_wack); @(negedge clk);
    spi_wreq = 0;
    wait (!spi_wack); @(negedge clk);
  endtask
  task automatic dvs_send(input int core, input int a);
    @(negedge clk);
    dvs_in_addr = {2'(core), 2'b00, 10'(a)}; dvs_in_req = 1;
    wait (dvs_in_ack); @(negedge clk);
    dvs_in_req = 0;
    wait (!dvs_in_ack); @(negedge clk);
  endtask
  task automatic emg_send(input int a);
    @(negedge clk);
    emg_in_addr = {2'b00, 7'(a)}; emg_in_req = 1;
    wait (emg_in_ack); @(negedge clk);
    emg_in_req = 0;
    wait (!emg_in_ack); @(negedge clk);
  endtask

  int dvs_outs[$], emg_outs[$], hw_drops = 0;
  always @(posedge clk) hw_drops <= hw_drops + $countones(sched_overflow);
  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (dvs_out_req && !dvs_out_ack) begin
        dvs_outs.push_back(int'(dvs_out_addr));
        repeat ($urandom_range(0, 5)) @(posedge clk);
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
        emg_outs.push_back(int'(emg_out_addr));
        repeat ($urandom_range(0, 5)) @(posedge clk);
        emg_out_ack <= 1;
        while (emg_out_req) @(posedge clk);
        emg_out_ack <= 0;
      end
    end
  end

  task automatic all_idle();
    do repeat (100) @(negedge clk);
    while (busy != 0 || !dut.u_dvs.g_core[0].u_core.sched_empty || !dut.u_dvs.g_core[1].u_core.sched_empty ||
           !dut.u_dvs.g_core[2].u_core.sched_empty || !dut.u_dvs.g_core[3].u_core.sched_empty ||
           !dut.u_emg.sched_empty || dvs_out_req || dvs_out_ack || emg_out_req || emg_out_ack);
  endtask

  initial begin
    #400ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam int NIN = 30;
  initial begin
    int exp_all[$], got[$], bad, nspk;
    for (int c = 0; c < 4; c++) begin
      nn[c] = 640; hid[c] = 210; in0[c] = 210; nin[c] = 400; bmax[c] = 15; wlo[c] = -1; whi[c] = 1; thr[c] = 3;
    end
    nn[4] = 128; hid[4] = 110; in0[4] = 110; nin[4] = 16; bmax[4] = 63; wlo[4] = -5; whi[4] = 7; thr[4] = 12;
    for (int c = 0; c < 5; c++) build(c);
    g_load[0].load(); g_load[1].load(); g_load[2].load(); g_load[3].load();
    load_emg();
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int c = 0; c < 4; c++) spi_w(c, 3, 214);
    spi_w(4, 3, 114);
    for (int c = 0; c < 5; c++) spi_w(c, 0, 0);
    for (int n = 0; n < NIN; n++) begin
      for (int c = 0; c < 4; c++) begin
        int p;
        p = in0[c] + $urandom_range(0, nin[c] - 1);
        model_input(c, p);
        dvs_send(c, p);
      end
      begin
        int p;
        p = in0[4] + $urandom_range(0, nin[4] - 1);
        model_input(4, p);
        emg_send(p);
      end
      all_idle();
    end
    for (int c = 0; c < 4; c++) foreach (exp_out[c][k]) exp_all.push_back(exp_out[c][k]);
    exp_all.sort(); got = dvs_outs; got.sort();
    check(got == exp_all, $sformatf("vision output spikes: %0d vs %0d expected", dvs_outs.size(), exp_all.size()));
    check(emg_outs == exp_out[4], $sformatf("EMG output spikes: %0d vs %0d expected", emg_outs.size(), exp_out[4].size()));
    bad = 0;
    for (int j = 0; j < 215; j++) begin
      if (g_load[0].state(j) != st[0][j]) bad++;
      if (g_load[1].state(j) != st[1][j]) bad++;
      if (g_load[2].state(j) != st[2][j]) bad++;
      if (g_load[3].state(j) != st[3][j]) bad++;
    end
    check(bad == 0, $sformatf("vision membrane potentials (%0d differ)", bad));
    bad = 0;
    for (int j = 0; j < 115; j++) if ($signed(dut.u_emg.u_nmem.mem[j][6:0]) != st[4][j]) bad++;
    check(bad == 0, $sformatf("EMG membrane potentials (%0d differ)", bad));
    nspk = drops[0] + drops[1] + drops[2] + drops[3] + drops[4];
    check(hw_drops == nspk, $sformatf("scheduler drops %0d vs %0d expected", hw_drops, nspk));
    check(exp_all.size() > 0 && exp_out[4].size() > 0, "both classifiers produced output spikes");
    $display("vision outputs %0d, EMG outputs %0d, dropped local spikes %0d", dvs_outs.size(), emg_outs.size(), hw_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
