// scheduler: event queue of a core.
//
// Events reach the scheduler from two sources: packets from the input AER
// interface, and spikes generated by neurons of this core (when their
// neur_reschedule bit is set and the core is not in open-loop mode). Both
// are queued in one FIFO of depth D, which the controller pops one event at
// a time. The FIFO and the two sources follow the document; how they share
// the single write port is this design's choice: a local spike is always
// taken first and the AER input is told to wait (ext_ready low) in that
// cycle. A local spike that finds the FIFO full cannot wait (the controller
// must continue its sweep), so it is dropped and overflow pulses for one
// cycle.
//
// Timing: an event pushed at one edge is visible on head at the next.
module scheduler #(
  parameter int unsigned W = 12,
  parameter int unsigned D = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ext_push,
  input  logic [W-1:0] ext_pkt,
  output logic         ext_ready,
  input  logic         loc_push,
  input  logic [W-1:0] loc_pkt,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         overflow
);
  logic         full;
  logic         push;
  logic [W-1:0] din;
  logic [$clog2(D+1)-1:0] count;

  assign ext_ready = !full && !loc_push;
  assign push      = loc_push ? !full : (ext_push && !full);
  assign din       = loc_push ? loc_pkt : ext_pkt;
  assign overflow  = loc_push && full;

  fifo #(.W(W), .D(D)) u_fifo (
    .clk, .rst, .push, .din, .pop, .dout(head), .full, .empty, .count
  );

endmodule
