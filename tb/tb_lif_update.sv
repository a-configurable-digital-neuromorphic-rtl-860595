// tb_lif_update: checks the neuron update logic against a reference model
// written here (integer arithmetic with saturation, threshold, reset and
// leak toward zero), for all input combinations at small widths.
module tb_lif_update;
  import snn_pkg::*;
  localparam int BN = 5, BS = 2, BL = 3;
  lif_op_e op;
  logic signed [BN-1:0] state, threshold, state_next;
  logic [BL-1:0] leak_str;
  logic signed [BS-1:0] weight;
  logic disable_n, spike;
  logic signed [BN-1:0] state_next1;
  logic spike1;
  int checks = 0, failures = 0;

  lif_update #(.BN(BN), .BS(BS), .BL(BL), .LEAK_MODE(0), .RESET_MODE(0)) dut (.*);
  lif_update #(.BN(BN), .BS(BS), .BL(BL), .LEAK_MODE(1), .RESET_MODE(1)) dut1 (
    .op, .state, .threshold, .leak_str, .weight, .disable_n,
    .state_next(state_next1), .spike(spike1));

  task automatic model(input int lm, input int rm, output int nx, output bit sp);
    int s, t, w, l, v;
    s = state; t = threshold; w = weight; l = leak_str;
    nx = s; sp = 0;
    if (disable_n) return;
    if (op == LIF_INTEG) begin
      v = s + w;
      if (v > 15) v = 15;
      if (v < -16) v = -16;
      if (v >= t) begin
        sp = 1;
        nx = (rm == 1) ? v - t : 0;
        if (nx > 15) nx = 15;
        if (nx < -16) nx = -16;
      end else nx = v;
    end else if (op == LIF_LEAK && lm == 0) begin
      if (s > 0) nx = (s - l < 0) ? 0 : s - l;
      else if (s < 0) nx = (s + l > 0) ? 0 : s + l;
    end
  endtask

  initial begin
    int nx; bit sp;
    for (int o = 0; o < 2; o++)
      for (int s = -16; s < 16; s++)
        for (int t = -16; t < 16; t += 3)
          for (int w = -2; w < 2; w++)
            for (int l = 0; l < 8; l += 3)
              for (int d = 0; d < 2; d++) begin
                op = (o == 0) ? LIF_INTEG : LIF_LEAK;
                state = BN'(s); threshold = BN'(t); weight = BS'(w);
                leak_str = BL'(l); disable_n = d[0];
                #1;
                model(0, 0, nx, sp);
                checks++;
                if (state_next != BN'(nx) || spike != sp) begin
                  failures++;
                  if (failures < 10) $display("FAIL mode0 op=%0d s=%0d t=%0d w=%0d l=%0d d=%0d got %0d/%0d exp %0d/%0d",
                    o, s, t, w, l, d, state_next, spike, nx, sp);
                end
                model(1, 1, nx, sp);
                checks++;
                if (state_next1 != BN'(nx) || spike1 != sp) begin
                  failures++;
                  if (failures < 10) $display("FAIL mode1 op=%0d s=%0d t=%0d w=%0d", o, s, t, w);
                end
              end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
