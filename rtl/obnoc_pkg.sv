// obnoc_pkg: types and constants shared by the obfuscated-interconnect RTL.
//
// A router link is modelled as a streaming bundle in the style of the
// Avalon-ST router ports of the obfuscated SoCs (valid, start/end of packet,
// data forward; ready backward). The forward part travels through the
// programmable MUX network as one struct, the ready bit is routed back along
// the same path. The switch radix (4 links per switch, 2 select bits per MUX)
// and the 32-bit per-router activation package follow the document's example
// of one obfuscated router with four neighbours; the 32-bit data width and
// the exact bundle fields are choices of this design.
package obnoc_pkg;

  // Links per MUX-DEMUX switch (4x1 MUXes, Fig. 1/2 example).
  localparam int unsigned NPORT = 4;
  // Select bits per 4x1 MUX.
  localparam int unsigned SEL_W = $clog2(NPORT);
  // Select bits for one stage of NPORT MUXes.
  localparam int unsigned STAGE_SEL_W = NPORT * SEL_W;          // 8
  // Select bits for one two-stage MUX-DEMUX switch.
  localparam int unsigned SWITCH_SEL_W = 2 * STAGE_SEL_W;       // 16
  // Activation package of one router: output switch + input switch.
  localparam int unsigned ROUTER_AP_W = 2 * SWITCH_SEL_W;       // 32
  // Payload width of a link.
  localparam int unsigned DATA_W = 32;

  // Forward part of a link.
  typedef struct packed {
    logic              valid;
    logic              sop;
    logic              eop;
    logic [DATA_W-1:0] data;
  } link_fwd_t;

  localparam int unsigned LINK_FWD_W = $bits(link_fwd_t);

endpackage
