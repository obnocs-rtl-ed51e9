// obnoc_interconnect: the obfuscated part of a NoC interconnect, with the
// activation package loader.
//
// For each of NUM_OBF_ROUTERS obfuscated routers the module holds the
// sixteen-MUX link switch (obf_router_ports) that sits between the router's
// four link ports and its four neighbours. One activation package load
// register (ap_load_reg) of 32 bits per obfuscated router drives all MUX
// selects: router r takes bits [32r+31:32r]. The package enters serially on
// ap_in while load_en is high, least significant bit first: the bit sent
// first ends in bit 0 of router 0. Once load_en falls the selects hold and
// the routers are wired into the topology the package encodes.
//
// The routers and the IP blocks are not part of this module: their link
// ports are brought out, router side (rtr_*) and neighbour side (fab_*), so
// the module drops in between the generated routers of an existing
// interconnect. NUM_OBF_ROUTERS = 1 is the document's worked example (router
// R1 of a five-router tree, 32-bit package); its obfuscation levels I to IV
// use 2, 4, 8 and 16 routers.
//
// Timing: the link paths are combinational (two MUX levels each way); the
// load takes 32*NUM_OBF_ROUTERS cycles with load_en high.
module obnoc_interconnect
  import obnoc_pkg::*;
#(
  parameter int unsigned NUM_OBF_ROUTERS = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic load_en,
  input  logic ap_in,

  input  link_fwd_t [NUM_OBF_ROUTERS-1:0][NPORT-1:0] rtr_out_fwd,
  output logic      [NUM_OBF_ROUTERS-1:0][NPORT-1:0] rtr_out_ready,
  output link_fwd_t [NUM_OBF_ROUTERS-1:0][NPORT-1:0] fab_out_fwd,
  input  logic      [NUM_OBF_ROUTERS-1:0][NPORT-1:0] fab_out_ready,

  input  link_fwd_t [NUM_OBF_ROUTERS-1:0][NPORT-1:0] fab_in_fwd,
  output logic      [NUM_OBF_ROUTERS-1:0][NPORT-1:0] fab_in_ready,
  output link_fwd_t [NUM_OBF_ROUTERS-1:0][NPORT-1:0] rtr_in_fwd,
  input  logic      [NUM_OBF_ROUTERS-1:0][NPORT-1:0] rtr_in_ready
);

  localparam int unsigned AP_W = ROUTER_AP_W * NUM_OBF_ROUTERS;

  logic [AP_W-1:0] ap_q;

  ap_load_reg #(.LEN(AP_W)) u_ap_load_reg (
    .clk     (clk),
    .rst     (rst),
    .load_en (load_en),
    .ap_in   (ap_in),
    .ap_q    (ap_q)
  );

  for (genvar r = 0; r < NUM_OBF_ROUTERS; r++) begin : g_router
    obf_router_ports u_obf (
      .ap            (ap_q[r*ROUTER_AP_W +: ROUTER_AP_W]),
      .rtr_out_fwd   (rtr_out_fwd[r]),
      .rtr_out_ready (rtr_out_ready[r]),
      .fab_out_fwd   (fab_out_fwd[r]),
      .fab_out_ready (fab_out_ready[r]),
      .fab_in_fwd    (fab_in_fwd[r]),
      .fab_in_ready  (fab_in_ready[r]),
      .rtr_in_fwd    (rtr_in_fwd[r]),
      .rtr_in_ready  (rtr_in_ready[r])
    );
  end

endmodule
