`timescale 1ns/1ps
// gapla_pkg: sizes and configuration types shared by the GALS programmable
// logic array. Each asynchronous island holds one synchronous logic block
// and four asynchronous wrappers; each wrapper has 8 input and 8 output port
// controllers that share 128 bidirectional I/O data registers, and no port
// may own more than 64 of them. The logic block is cut into 16 clock
// distribution units that each pick one of the island's 4 local clocks.
// Adjacent islands are joined by direct links of 8 handshake pairs and 64
// data wires; the global channels carry 32 pairs and 256 data wires. These
// numbers are the architecture's own. The configuration record layouts
// below are this implementation's choice.
package gapla_pkg;

  localparam int unsigned N_IN_PORTS    = 8;    // input port controllers per wrapper
  localparam int unsigned N_OUT_PORTS   = 8;    // output port controllers per wrapper
  localparam int unsigned N_IO_REGS     = 128;  // I/O data registers per wrapper
  localparam int unsigned MAX_PORT_BITS = 64;   // registers one port may control
  localparam int unsigned N_WRAPPERS    = 4;    // wrappers (and local clocks) per island
  localparam int unsigned N_CDU         = 16;   // clock distribution units per island
  localparam int unsigned DIRECT_PAIRS  = 8;    // handshake pairs of a direct link
  localparam int unsigned DIRECT_BITS   = 64;   // data wires of a direct link
  localparam int unsigned CHAN_PAIRS    = 32;   // handshake pairs of a global channel
  localparam int unsigned CHAN_BITS     = 256;  // data wires of a global channel
  localparam int unsigned N_SIDES       = 4;    // north, east, south, west

  // Wrapper / side numbering used everywhere: 0 north, 1 east, 2 south, 3 west.
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // One entry of the data-register enable distribution matrix: which port
  // controller drives the enable of one bidirectional I/O data register.
  typedef struct packed {
    logic       used;     // register is attached to a port
    logic       dir_out;  // 1: attached to an output port, 0: to an input port
    logic [2:0] port;     // port index within its direction
  } io_reg_cfg_t;

  // One output of a disjoint data switch box: which other side feeds it.
  typedef struct packed {
    logic       en;
    logic [1:0] from;     // side_e of the source
  } lrsb_cfg_t;

endpackage
