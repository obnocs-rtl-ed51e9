// tb_obf_router_ports: nine copies of one obfuscated router's link switch,
// each given a different 32-bit activation package, driven with the same
// traffic (the nine-DUT comparison experiment). The packages are
//   R          e4e4e46c   the correct package,
//   W1..W6     six wrong packages whose bytes are all permutations,
//   IL1, IL2   two wrong packages with a repeated select in some byte.
// Checks, for every copy and many random traffic words:
//   * each neighbour link and each router input carries the word the
//     reference walk of the package predicts, and the ready bits follow;
//   * R and W1..W6 connect the router one-to-one to its neighbours in both
//     directions (legal topologies), IL1 and IL2 do not (non-functional);
//   * every W1..W6 topology differs from the one R gives, so only one copy
//     reproduces the intended wiring.
module tb_obf_router_ports;
  import obnoc_pkg::*;
  import tb_obnoc_ref_pkg::*;

  localparam int NDUT = 9;
  localparam logic [7:0] ORDER = 8'h93;
  localparam logic [NDUT-1:0][31:0] KEYS = {
    32'hcda332d4, 32'hcdd432a3,                                     // IL2, IL1
    32'he4e1e46c, 32'hd8e4e46c, 32'he4e4276c, 32'he4e4e463,         // W6..W3
    32'hb4e4276c, 32'hb427e46c,                                     // W2, W1
    32'he4e4e46c};                                                  // R
  localparam string NAMES [NDUT] = '{"R", "W1", "W2", "W3", "W4", "W5", "W6", "IL1", "IL2"};

  link_fwd_t [NPORT-1:0] rtr_out_fwd, fab_in_fwd;
  logic      [NPORT-1:0] fab_out_ready, rtr_in_ready;
  link_fwd_t [NDUT-1:0][NPORT-1:0] fab_out_fwd, rtr_in_fwd;
  logic      [NDUT-1:0][NPORT-1:0] rtr_out_ready, fab_in_ready;

  int checks = 0, failures = 0;

  for (genvar k = 0; k < NDUT; k++) begin : g_dut
    obf_router_ports dut (
      .ap(KEYS[k]),
      .rtr_out_fwd(rtr_out_fwd), .rtr_out_ready(rtr_out_ready[k]),
      .fab_out_fwd(fab_out_fwd[k]), .fab_out_ready(fab_out_ready),
      .fab_in_fwd(fab_in_fwd), .fab_in_ready(fab_in_ready[k]),
      .rtr_in_fwd(rtr_in_fwd[k]), .rtr_in_ready(rtr_in_ready));
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  function automatic bit ready_ref(logic [15:0] sel, int unsigned j, logic [3:0] rdy);
    bit used, all;
    used = 0; all = 1;
    for (int unsigned d = 0; d < 4; d++)
      if (src_of(sel, ORDER, d) == j) begin used = 1; all &= rdy[d]; end
    return used & all;
  endfunction

  initial begin
    int n_legal = 0, n_nonfunc = 0, n_other = 0;
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < NPORT; j++) begin
        rtr_out_fwd[j] = '{valid: 1'($urandom()), sop: 1'($urandom()), eop: 1'($urandom()),
                           data: {8'(j), 24'($urandom())}};
        fab_in_fwd[j]  = '{valid: 1'($urandom()), sop: 1'($urandom()), eop: 1'($urandom()),
                           data: {8'(j + 16), 24'($urandom())}};
      end
      fab_out_ready = 4'($urandom());
      rtr_in_ready  = 4'($urandom());
      #1;
      for (int k = 0; k < NDUT; k++) begin
        for (int d = 0; d < NPORT; d++) begin
          check(fab_out_fwd[k][d] == rtr_out_fwd[src_of(KEYS[k][15:0], ORDER, d)],
                $sformatf("%s router->neighbour %0d", NAMES[k], d));
          check(rtr_in_fwd[k][d] == fab_in_fwd[src_of(KEYS[k][31:16], ORDER, d)],
                $sformatf("%s neighbour->router %0d", NAMES[k], d));
        end
        for (int j = 0; j < NPORT; j++) begin
          check(rtr_out_ready[k][j] == ready_ref(KEYS[k][15:0], j, fab_out_ready),
                $sformatf("%s rtr_out_ready %0d", NAMES[k], j));
          check(fab_in_ready[k][j] == ready_ref(KEYS[k][31:16], j, rtr_in_ready),
                $sformatf("%s fab_in_ready %0d", NAMES[k], j));
        end
      end
    end

    // Topology classification from the observed wiring (data tags).
    begin
      int unsigned topo [NDUT][2][NPORT];
      for (int k = 0; k < NDUT; k++) begin
        bit [3:0] seen_o, seen_i;
        seen_o = '0; seen_i = '0;
        for (int d = 0; d < NPORT; d++) begin
          topo[k][0][d] = fab_out_fwd[k][d].data[31:24];
          topo[k][1][d] = rtr_in_fwd[k][d].data[31:24] - 16;
          seen_o[topo[k][0][d]] = 1'b1;
          seen_i[topo[k][1][d]] = 1'b1;
        end
        if (seen_o == 4'hf && seen_i == 4'hf) begin
          n_legal++;
          check(k < 7, $sformatf("%s should be non-functional", NAMES[k]));
        end else begin
          n_nonfunc++;
          check(k >= 7, $sformatf("%s should be legal", NAMES[k]));
        end
        if (k >= 1 && k < 7) begin
          if (topo[k] != topo[0]) n_other++;
          check(topo[k] != topo[0], $sformatf("%s must differ from the intended topology", NAMES[k]));
        end
        $display("%-3s key=%h out: n0<-%0d n1<-%0d n2<-%0d n3<-%0d  in: p0<-%0d p1<-%0d p2<-%0d p3<-%0d",
                 NAMES[k], KEYS[k], topo[k][0][0], topo[k][0][1], topo[k][0][2], topo[k][0][3],
                 topo[k][1][0], topo[k][1][1], topo[k][1][2], topo[k][1][3]);
      end
    end
    $display("functional copies=%0d (of which differing from intended=%0d), non-functional=%0d",
             n_legal, n_other, n_nonfunc);
    check(n_legal == 7 && n_other == 6 && n_nonfunc == 2, "7 functional, 6 unintended, 2 non-functional");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
