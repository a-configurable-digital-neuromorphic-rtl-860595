// snn_pkg: types and constants shared by the neuromorphic core, the arbiter
// and the top level.
//
// The input AER packet of a core carries a 2-bit operation code in its two
// most significant bits (virtual event, time reference event, neuron spike
// event), followed by a neuron address or, for a virtual event, a weight and
// a neuron address. The codes below follow the packet table of the core.
// The neuron update logic is told whether it integrates a weight or applies
// leakage through lif_op_e. Configuration registers written over SPI are
// bundled in core_cfg_t.
package snn_pkg;

  // Opcode in ADDR<A_AER-1:A_AER-2> of an input AER packet.
  typedef enum logic [1:0] {
    OP_SPIKE   = 2'b00,  // neuron spike event from pre_neur
    OP_TREF    = 2'b01,  // time reference (leak) event, single or all neurons
    OP_VIRTUAL = 2'b10,  // virtual event: weight carried in the packet
    OP_UNUSED  = 2'b11
  } aer_op_e;

  // Operation applied by the neuron update logic.
  typedef enum logic [1:0] {
    LIF_NOP   = 2'b00,
    LIF_INTEG = 2'b01,  // add a signed weight, check threshold
    LIF_LEAK  = 2'b10   // move the potential toward zero by leak_str
  } lif_op_e;

  // SPI command field a<B_SPI-3:B_SPI-4>.
  typedef enum logic [1:0] {
    SPI_CMD_CONF = 2'b00,
    SPI_CMD_NEUR = 2'b01,
    SPI_CMD_SYN  = 2'b10,
    SPI_CMD_NONE = 2'b11
  } spi_cmd_e;

  // Configuration register addresses (conf_addr) of the global parameters.
  localparam int unsigned CONF_GATE_ACTIVITY = 0;
  localparam int unsigned CONF_OPEN_LOOP     = 1;
  localparam int unsigned CONF_AER_SRC_CTRL  = 2;
  localparam int unsigned CONF_MAX_NEUR      = 3;

  // Widest neuron address supported by the configuration bundle.
  localparam int unsigned MAX_AN = 16;

  typedef struct packed {
    logic              gate_activity;   // SPI owns the memories, network halted
    logic              open_loop;       // local spikes do not enter the scheduler
    logic              aer_src_ctrl;    // 1: output events sent by the controller
    logic [MAX_AN-1:0] max_neur;        // highest neuron index processed
  } core_cfg_t;

  // A(n) = ceil(log2 n), at least 1 so that it can size a port.
  function automatic int unsigned addr_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Neuron word width: B_wordN = ceil((2B_n + B_l + 3) / lineScale) * lineScale.
  function automatic int unsigned neuron_word_w(input int unsigned bn, input int unsigned bl);
    return ((2*bn + bl + 3 + 7) / 8) * 8;
  endfunction

  // Input AER packet width: A_AER = max(A_n + 2, B_s + 4).
  function automatic int unsigned aer_in_w(input int unsigned n, input int unsigned bs);
    return ((addr_w(n) + 2) > (bs + 4)) ? (addr_w(n) + 2) : (bs + 4);
  endfunction

endpackage
