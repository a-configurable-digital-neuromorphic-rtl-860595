// lif_update: combinational leaky integrate-and-fire neuron update logic.
//
// One physical neuron is time-multiplexed over all neurons of a core; this
// block computes the next membrane potential of whichever neuron the
// controller has just read. Two operations exist:
//  * LIF_INTEG adds a signed B_s-bit weight to the signed B_n-bit potential.
//    If the result reaches the signed threshold the neuron spikes and is reset:
//    to zero (RESET_MODE 0, the default) or by subtracting the threshold
//    (RESET_MODE 1).
//  * LIF_LEAK (time reference event) moves the potential toward zero by the
//    unsigned leak strength, stopping at zero (LEAK_MODE 0, the default, LIF).
//    With LEAK_MODE 1 (integrate-and-fire) leakage is disabled.
// Both the leak and reset behaviours and their mode parameters follow the
// document. Saturation of the sum at the signed B_n-bit limits, and leakage
// of a negative potential upward to zero, are this design's choices.
// A disabled neuron keeps its potential and never fires.
//
// Purely combinational; the controller registers nothing from it except by
// writing state_next back to the neuron memory.
module lif_update
  import snn_pkg::*;
#(
  parameter int unsigned BN         = 5,
  parameter int unsigned BS         = 2,
  parameter int unsigned BL         = 3,
  parameter int unsigned LEAK_MODE  = 0,
  parameter int unsigned RESET_MODE = 0
) (
  input  lif_op_e               op,
  input  logic signed [BN-1:0]  state,
  input  logic signed [BN-1:0]  threshold,
  input  logic        [BL-1:0]  leak_str,
  input  logic signed [BS-1:0]  weight,
  input  logic                  disable_n,   // neuron disabled
  output logic signed [BN-1:0]  state_next,
  output logic                  spike
);
  // One extra bit is enough to hold state + weight (BS < BN) and state +/- leak.
  localparam int unsigned WX = ((BN > BL) ? BN : BL) + 2;
  localparam logic signed [WX-1:0] SMAX = WX'(  (2**(BN-1)) - 1);
  localparam logic signed [WX-1:0] SMIN = WX'(-(2**(BN-1)));

  logic signed [WX-1:0] sum, leaked, rst_val;

  always_comb begin
    state_next = state;
    spike      = 1'b0;
    sum        = WX'(state) + WX'(weight);
    leaked     = WX'(state);
    rst_val    = '0;
    if (!disable_n) begin
      unique case (op)
        LIF_INTEG: begin
          if (sum > SMAX) sum = SMAX;
          if (sum < SMIN) sum = SMIN;
          if (sum >= WX'(threshold)) begin
            spike   = 1'b1;
            rst_val = (RESET_MODE == 1) ? (sum - WX'(threshold)) : '0;
            if (rst_val > SMAX) rst_val = SMAX;
            if (rst_val < SMIN) rst_val = SMIN;
            state_next = BN'(rst_val);
          end else begin
            state_next = BN'(sum);
          end
        end
        LIF_LEAK: begin
          if (LEAK_MODE == 0) begin
            if (state > 0) begin
              leaked = WX'(state) - WX'({1'b0, leak_str});
              if (leaked < 0) leaked = '0;
            end else if (state < 0) begin
              leaked = WX'(state) + WX'({1'b0, leak_str});
              if (leaked > 0) leaked = '0;
            end
            state_next = BN'(leaked);
          end
        end
        default: ;
      endcase
    end
  end

endmodule
