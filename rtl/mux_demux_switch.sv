// mux_demux_switch: two-stage programmable switch that replaces the direct
// wiring between NPORT link sources and NPORT link destinations.
//
// Stage 1 (the "DEMUX" stage) is a row of NPORT 4x1 MUXes, each of which sees
// every source; stage 2 (the "MUX" stage) is a second row of NPORT 4x1 MUXes,
// each of which sees every stage-1 output and drives one destination. With the
// select bits of a correct activation package the switch realises the
// intended source->destination wiring; any select pattern whose two stages
// are each a permutation gives another complete one-to-one wiring (a legal
// topology); a pattern with a repeated select in a stage copies one source to
// several destinations and leaves another source unconnected (non-functional).
//
// Wiring inside (fixed at design time, the "randomised connections"): all
// MUXes of a stage see the previous row in the same scrambled order, input i
// of every MUX being connected to signal IN_ORDER[2i+1:2i] of the previous
// row. With the default order (3,0,1,2), selecting input k is not selecting
// signal k: the straight wiring needs the selects (1,2,3,0), byte 8'h39, per
// stage. Because every MUX of a stage shares one order, a stage is one-to-one
// exactly when its four selects are distinct.
//
// Select layout: sel[2m+1:2m] drives stage-1 MUX m, sel[8+2d+1:8+2d] drives
// stage-2 MUX d (for NPORT = 4). The layout is this design's choice.
//
// The ready bit travels the other way: a source is ready when at least one
// destination is connected to it and every destination connected to it is
// ready; a source that no destination selects sees ready low. The document
// describes the forward MUX network only; this reverse path is added so that a
// handshaked link keeps working through the switch.
//
// Timing: purely combinational, two MUX levels forward and a small compare
// tree backward; no clock.
module mux_demux_switch
  import obnoc_pkg::*;
#(
  // Input order shared by all MUXes: input i <- previous-row signal
  // IN_ORDER[2i+1:2i]. Must be a permutation of 0..NPORT-1.
  parameter logic [STAGE_SEL_W-1:0] IN_ORDER = 8'h93
) (
  input  link_fwd_t [NPORT-1:0]        src_fwd,
  output logic      [NPORT-1:0]        src_ready,
  output link_fwd_t [NPORT-1:0]        dst_fwd,
  input  logic      [NPORT-1:0]        dst_ready,
  input  logic      [SWITCH_SEL_W-1:0] sel
);

  typedef logic [SEL_W-1:0] idx_t;

  link_fwd_t [NPORT-1:0] stage1;

  // Index of the source reached by destination d.
  idx_t [NPORT-1:0] path;

  for (genvar m = 0; m < NPORT; m++) begin : g_stage1
    logic [NPORT-1:0][LINK_FWD_W-1:0] mux_in;
    for (genvar i = 0; i < NPORT; i++) begin : g_in
      assign mux_in[i] = src_fwd[IN_ORDER[i*SEL_W +: SEL_W]];
    end
    mux4x1 #(.WIDTH(LINK_FWD_W), .NIN(NPORT)) u_mux (
      .in  (mux_in),
      .sel (sel[m*SEL_W +: SEL_W]),
      .out (stage1[m])
    );
  end

  for (genvar d = 0; d < NPORT; d++) begin : g_stage2
    logic [NPORT-1:0][LINK_FWD_W-1:0] mux_in;
    for (genvar i = 0; i < NPORT; i++) begin : g_in
      assign mux_in[i] = stage1[IN_ORDER[i*SEL_W +: SEL_W]];
    end
    mux4x1 #(.WIDTH(LINK_FWD_W), .NIN(NPORT)) u_mux (
      .in  (mux_in),
      .sel (sel[STAGE_SEL_W + d*SEL_W +: SEL_W]),
      .out (dst_fwd[d])
    );
  end

  function automatic bit order_is_permutation(logic [STAGE_SEL_W-1:0] ord);
    logic [NPORT-1:0] seen;
    seen = '0;
    for (int unsigned i = 0; i < NPORT; i++) seen[ord[i*SEL_W +: SEL_W]] = 1'b1;
    return &seen;
  endfunction

  if (!order_is_permutation(IN_ORDER)) begin : g_bad_order
    $error("mux_demux_switch: IN_ORDER must be a permutation of 0..NPORT-1");
  end

  function automatic idx_t order(idx_t i);
    return IN_ORDER[i*SEL_W +: SEL_W];
  endfunction

  // Reverse path: work out which source each destination is connected to.
  always_comb begin
    for (int unsigned d = 0; d < NPORT; d++) begin
      idx_t m;
      m       = order(sel[STAGE_SEL_W + d*SEL_W +: SEL_W]);
      path[d] = order(sel[m*SEL_W +: SEL_W]);
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < NPORT; j++) begin
      logic used, all_ready;
      used      = 1'b0;
      all_ready = 1'b1;
      for (int unsigned d = 0; d < NPORT; d++) begin
        if (path[d] == idx_t'(j)) begin
          used      = 1'b1;
          all_ready = all_ready & dst_ready[d];
        end
      end
      src_ready[j] = used & all_ready;
    end
  end

endmodule
