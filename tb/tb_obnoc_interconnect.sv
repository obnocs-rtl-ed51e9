// tb_obnoc_interconnect: end-to-end test of the obfuscated interconnect at
// its default size (one obfuscated router, 32-bit activation package), the
// worked example of a router R1 with four neighbours.
//
// The testbench plays the router (four output links that send packets, four
// input links that accept them) and the four neighbours (four sinks, four
// sources). Every packet is three beats long, framed by sop/eop, and each
// beat carries {source tag, packet number, beat number}. Sinks apply random
// backpressure. The sequence is:
//   1. reset; the all-zeros package is in place;
//   2. serial load of the correct package e4e4e46c, paused half way with
//      load_en low; traffic in both directions, every beat checked against
//      the source the package connects (reference walk), in order, with no
//      loss or duplication;
//   3. serial load of a wrong but legal package (e4e4e463): traffic still
//      flows one-to-one, to neighbours other than the intended ones;
//   4. serial load of a non-functional package (cdd432a3): some source is
//      copied to two destinations and some source is never accepted;
//   5. reset: the register clears.
// Each mechanism (load, load pause, backpressure stall, intended topology,
// unintended legal topology, duplicated source, starved source, reset) is
// counted and a failure is counted for one that never happens. An assertion
// checks that a beat stalled at a sink is held unchanged until accepted.
module tb_obnoc_interconnect;
  import obnoc_pkg::*;
  import tb_obnoc_ref_pkg::*;

  localparam int NR = 1;                 // the top's default NUM_OBF_ROUTERS
  localparam logic [7:0] ORDER = 8'h93;  // the switch's default input order
  localparam int PKT_BEATS = 3;

  logic clk = 0, rst, load_en, ap_in;
  link_fwd_t [NR-1:0][NPORT-1:0] rtr_out_fwd, fab_out_fwd, fab_in_fwd, rtr_in_fwd;
  logic      [NR-1:0][NPORT-1:0] rtr_out_ready, fab_out_ready, fab_in_ready, rtr_in_ready;

  obnoc_interconnect dut (
    .clk(clk), .rst(rst), .load_en(load_en), .ap_in(ap_in),
    .rtr_out_fwd(rtr_out_fwd), .rtr_out_ready(rtr_out_ready),
    .fab_out_fwd(fab_out_fwd), .fab_out_ready(fab_out_ready),
    .fab_in_fwd(fab_in_fwd),   .fab_in_ready(fab_in_ready),
    .rtr_in_fwd(rtr_in_fwd),   .rtr_in_ready(rtr_in_ready));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL @%0d %s", cycle, what); end
  endtask

  // Mechanism counters.
  int n_load = 0, n_load_pause = 0, n_stall = 0, n_intended = 0, n_unintended = 0;
  int n_dup = 0, n_starved = 0, n_reset = 0, n_hold_checked = 0;

  // ---------------------------------------------------------------- traffic
  // dir 0: router output links -> neighbours; dir 1: neighbours -> router.
  bit traffic_on = 0;
  logic [31:0] cur_key;
  int unsigned pkt [2][NPORT];   // packet number being sent by each source
  int unsigned beat [2][NPORT];  // beat within that packet
  // expected next {packet, beat} at each sink, per source feeding it
  int unsigned exp_pkt [2][NPORT];
  int unsigned exp_beat [2][NPORT];
  int unsigned beats_rx [2][NPORT];

  function automatic link_fwd_t make_beat(int dir, int j);
    link_fwd_t b;
    b.valid = traffic_on;
    b.sop   = (beat[dir][j] == 0);
    b.eop   = (beat[dir][j] == PKT_BEATS - 1);
    b.data  = {8'(dir * 16 + j), 16'(pkt[dir][j]), 8'(beat[dir][j])};
    return b;
  endfunction

  task automatic reset_tracking();
    for (int dir = 0; dir < 2; dir++)
      for (int j = 0; j < NPORT; j++) begin
        pkt[dir][j] = 0; beat[dir][j] = 0;
        exp_pkt[dir][j] = 0; exp_beat[dir][j] = 0; beats_rx[dir][j] = 0;
      end
  endtask

  // Drive sources and sink readies on the falling edge.
  always @(negedge clk) begin
    for (int j = 0; j < NPORT; j++) begin
      rtr_out_fwd[0][j] <= make_beat(0, j);
      fab_in_fwd[0][j]  <= make_beat(1, j);
    end
    fab_out_ready[0] <= 4'($urandom()) | 4'($urandom());
    rtr_in_ready[0]  <= 4'($urandom()) | 4'($urandom());
  end

  // Sample handshakes on the rising edge.
  always @(posedge clk) begin
    if (traffic_on) begin
      for (int dir = 0; dir < 2; dir++) begin
        link_fwd_t [NPORT-1:0] src, dst;
        logic [NPORT-1:0] srdy, drdy;
        logic [15:0] sel;
        src  = dir == 0 ? rtr_out_fwd[0] : fab_in_fwd[0];
        dst  = dir == 0 ? fab_out_fwd[0] : rtr_in_fwd[0];
        srdy = dir == 0 ? rtr_out_ready[0] : fab_in_ready[0];
        drdy = dir == 0 ? fab_out_ready[0] : rtr_in_ready[0];
        sel  = dir == 0 ? cur_key[15:0] : cur_key[31:16];
        // sinks
        for (int d = 0; d < NPORT; d++) begin
          if (dst[d].valid && drdy[d]) begin
            int unsigned s;
            s = src_of(sel, ORDER, d);
            check(dst[d].data[31:24] == 8'(dir * 16 + s),
                  $sformatf("dir%0d sink %0d got tag %0d, want source %0d", dir, d, dst[d].data[31:24], s));
            if (is_bijection(sel, ORDER)) begin
              check(dst[d].data[23:8] == 16'(exp_pkt[dir][d]) && dst[d].data[7:0] == 8'(exp_beat[dir][d]),
                    $sformatf("dir%0d sink %0d order", dir, d));
              check(dst[d].sop == (exp_beat[dir][d] == 0) && dst[d].eop == (exp_beat[dir][d] == PKT_BEATS - 1),
                    $sformatf("dir%0d sink %0d framing", dir, d));
              if (exp_beat[dir][d] == PKT_BEATS - 1) begin exp_beat[dir][d] = 0; exp_pkt[dir][d]++; end
              else exp_beat[dir][d]++;
            end
            beats_rx[dir][d]++;
          end
          if (dst[d].valid && !drdy[d]) n_hold_checked++;   // checked by g_hold
        end
        // sources
        for (int j = 0; j < NPORT; j++) begin
          if (src[j].valid && !srdy[j]) n_stall++;
          if (src[j].valid && srdy[j]) begin
            if (beat[dir][j] == PKT_BEATS - 1) begin beat[dir][j] = 0; pkt[dir][j]++; end
            else beat[dir][j]++;
          end
        end
      end
    end
  end

  // Stream rule across the switch: a beat offered to a sink that is not
  // ready is still there, unchanged, on the next edge (for every package,
  // since a source only advances when all its sinks are ready).
  for (genvar d = 0; d < NPORT; d++) begin : g_hold
    a_out_hold: assert property (@(posedge clk) disable iff (!traffic_on)
        (fab_out_fwd[0][d].valid && !fab_out_ready[0][d]) |=> $stable(fab_out_fwd[0][d]))
      else begin failures++; $display("FAIL @%0d neighbour link %0d changed while stalled", cycle, d); end
    a_in_hold: assert property (@(posedge clk) disable iff (!traffic_on)
        (rtr_in_fwd[0][d].valid && !rtr_in_ready[0][d]) |=> $stable(rtr_in_fwd[0][d]))
      else begin failures++; $display("FAIL @%0d router input %0d changed while stalled", cycle, d); end
  end

  // ------------------------------------------------------------ AP loading
  task automatic load_package(logic [31:0] key, bit pause);
    int start, enabled;
    @(negedge clk);
    start = cycle; enabled = 0;
    for (int b = 0; b < 32; b++) begin
      if (pause && b == 16) begin
        load_en = 0;
        ap_in = ~key[b];
        repeat (5) @(negedge clk);
        check(dut.ap_q[31:16] == key[15:0], "load pauses with load_en low");
        n_load_pause++;
      end
      load_en = 1;
      ap_in = key[b];
      @(negedge clk);
      enabled++;
    end
    load_en = 0;
    ap_in = 0;
    check(enabled == 32, "package takes 32 enabled cycles");
    check(dut.ap_q == key, $sformatf("package %h loaded", key));
    n_load++;
  endtask

  task automatic run_traffic(logic [31:0] key, int ncycles);
    cur_key = key;
    reset_tracking();
    traffic_on = 1;
    repeat (ncycles) @(negedge clk);
    traffic_on = 0;
    @(negedge clk); @(negedge clk);
  endtask

  initial begin
    int unsigned intended_src [2][NPORT];
    rst = 1; load_en = 0; ap_in = 0;
    cur_key = '0;
    reset_tracking();
    repeat (3) @(negedge clk);
    check(dut.ap_q == '0, "reset clears the package");
    rst = 0;

    // 2. correct package
    load_package(32'he4e4e46c, 1);
    run_traffic(32'he4e4e46c, 400);
    for (int dir = 0; dir < 2; dir++)
      for (int d = 0; d < NPORT; d++) begin
        intended_src[dir][d] = src_of(dir == 0 ? cur_key[15:0] : cur_key[31:16], ORDER, d);
        check(beats_rx[dir][d] > 20, $sformatf("dir%0d sink %0d receives traffic", dir, d));
      end
    n_intended++;

    // 3. wrong but legal package
    load_package(32'he4e4e463, 0);
    run_traffic(32'he4e4e463, 400);
    begin
      bit differs = 0;
      for (int dir = 0; dir < 2; dir++)
        for (int d = 0; d < NPORT; d++) begin
          check(beats_rx[dir][d] > 20, $sformatf("legal: dir%0d sink %0d receives traffic", dir, d));
          if (src_of(dir == 0 ? cur_key[15:0] : cur_key[31:16], ORDER, d) != intended_src[dir][d]) differs = 1;
        end
      check(differs, "wrong legal package changes the topology");
      if (differs) n_unintended++;
    end

    // 4. non-functional package
    load_package(32'hcdd432a3, 0);
    run_traffic(32'hcdd432a3, 200);
    for (int dir = 0; dir < 2; dir++) begin
      logic [15:0] sel;
      int unsigned fanout [NPORT];
      sel = dir == 0 ? cur_key[15:0] : cur_key[31:16];
      for (int j = 0; j < NPORT; j++) fanout[j] = 0;
      for (int d = 0; d < NPORT; d++) fanout[src_of(sel, ORDER, d)]++;
      for (int j = 0; j < NPORT; j++) begin
        if (fanout[j] > 1) n_dup++;
        if (fanout[j] == 0) begin
          n_starved++;
          check(pkt[dir][j] == 0 && beat[dir][j] == 0, $sformatf("dir%0d source %0d never accepted", dir, j));
        end
      end
    end

    // 5. reset
    rst = 1;
    @(negedge clk);
    check(dut.ap_q == '0, "reset clears a loaded package");
    n_reset++;
    rst = 0;

    $display("stalled beats seen held: %0d", n_hold_checked);
    $display("mechanisms: load=%0d load_pause=%0d stall=%0d intended=%0d unintended_legal=%0d duplicated=%0d starved=%0d reset=%0d",
             n_load, n_load_pause, n_stall, n_intended, n_unintended, n_dup, n_starved, n_reset);
    check(n_load > 0, "load happened");
    check(n_load_pause > 0, "load pause happened");
    check(n_stall > 0, "backpressure stall happened");
    check(n_hold_checked > 0, "stalled beats held");
    checks += n_hold_checked;
    check(n_intended > 0, "intended topology ran");
    check(n_unintended > 0, "unintended legal topology ran");
    check(n_dup > 0, "duplicated source seen");
    check(n_starved > 0, "starved source seen");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
