// obf_router_ports: the complete obfuscation of one router, i.e. everything
// inserted between the router's four link ports and its four neighbours.
//
// Two MUX-DEMUX switches, sixteen 4x1 MUXes in all, as in the obfuscated
// router of the benchmark SoC:
//   * output switch: router output port j -> neighbour link d (the links the
//     router drives, e.g. R1 -> R3/R4/R5/IP6 in the document's example);
//   * input switch:  neighbour link d -> router input port j (the links that
//     drive the router).
// The 32-bit activation package of the router is split as
//   ap[15:0]  output switch (ap[7:0] stage 1, ap[15:8] stage 2),
//   ap[31:16] input switch  (ap[23:16] stage 1, ap[31:24] stage 2),
// two select bits per MUX, MUX k of a stage at bits [2k+1:2k] of its byte.
// The 16-MUX / 32-bit count is the document's; the byte layout is this
// design's choice. With the correct package both directions reproduce the
// intended neighbour wiring; with any other package of per-byte permutations
// the router still has exactly one link to each neighbour in each direction,
// only to a different one.
//
// Timing: combinational from link inputs and ap to link outputs.
module obf_router_ports
  import obnoc_pkg::*;
(
  input  logic [ROUTER_AP_W-1:0] ap,

  // router output ports -> fabric
  input  link_fwd_t [NPORT-1:0]  rtr_out_fwd,
  output logic      [NPORT-1:0]  rtr_out_ready,
  output link_fwd_t [NPORT-1:0]  fab_out_fwd,
  input  logic      [NPORT-1:0]  fab_out_ready,

  // fabric -> router input ports
  input  link_fwd_t [NPORT-1:0]  fab_in_fwd,
  output logic      [NPORT-1:0]  fab_in_ready,
  output link_fwd_t [NPORT-1:0]  rtr_in_fwd,
  input  logic      [NPORT-1:0]  rtr_in_ready
);

  mux_demux_switch u_out_switch (
    .src_fwd   (rtr_out_fwd),
    .src_ready (rtr_out_ready),
    .dst_fwd   (fab_out_fwd),
    .dst_ready (fab_out_ready),
    .sel       (ap[0 +: SWITCH_SEL_W])
  );

  mux_demux_switch u_in_switch (
    .src_fwd   (fab_in_fwd),
    .src_ready (fab_in_ready),
    .dst_fwd   (rtr_in_fwd),
    .dst_ready (rtr_in_ready),
    .sel       (ap[SWITCH_SEL_W +: SWITCH_SEL_W])
  );

endmodule
