// tb_mux_demux_switch: sweeps all 65536 select patterns of the two-stage
// MUX-DEMUX switch. For each pattern it drives random, distinct source links
// and random destination ready bits, and checks
//   * every destination carries the source the reference walk predicts;
//   * every source sees the ready the reference predicts (ready only when it
//     is connected and all its destinations are ready);
//   * the wiring is one-to-one exactly when both select bytes are
//     permutations (legal topology), and the count of such patterns is
//     4! * 4! = 576;
//   * the pattern 3939 is the straight wiring (destination d <- source d).
module tb_mux_demux_switch;
  import obnoc_pkg::*;
  import tb_obnoc_ref_pkg::*;

  localparam logic [7:0] ORDER = 8'h93;

  link_fwd_t [NPORT-1:0] src_fwd, dst_fwd;
  logic      [NPORT-1:0] src_ready, dst_ready;
  logic      [15:0]      sel;
  int checks = 0, failures = 0;
  int legal_count = 0;

  mux_demux_switch #(.IN_ORDER(ORDER)) dut (
    .src_fwd(src_fwd), .src_ready(src_ready),
    .dst_fwd(dst_fwd), .dst_ready(dst_ready), .sel(sel));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL sel=%h: %s", sel, what);
    end
  endtask

  initial begin
    for (int p = 0; p < 65536; p++) begin
      sel = 16'(p);
      for (int j = 0; j < NPORT; j++) begin
        src_fwd[j].valid = 1'($urandom());
        src_fwd[j].sop   = 1'($urandom());
        src_fwd[j].eop   = 1'($urandom());
        src_fwd[j].data  = {8'(j), 24'($urandom())};
      end
      dst_ready = 4'($urandom());
      #1;
      for (int d = 0; d < NPORT; d++)
        check(dst_fwd[d] == src_fwd[src_of(sel, ORDER, d)], "forward data");
      for (int j = 0; j < NPORT; j++) begin
        bit used, rdy;
        used = 0; rdy = 1;
        for (int d = 0; d < NPORT; d++)
          if (src_of(sel, ORDER, d) == j) begin used = 1; rdy &= dst_ready[d]; end
        check(src_ready[j] == (used & rdy), "ready");
      end
      if (sel == 16'h3939)
        for (int d = 0; d < NPORT; d++) check(dst_fwd[d] == src_fwd[d], "3939 is the straight wiring");
      begin
        bit bij;
        bit [3:0] seen;
        seen = '0;
        for (int d = 0; d < NPORT; d++) seen[dst_fwd[d].data[31:24]] = 1'b1;
        bij = (seen == 4'hf);
        check(bij == bytes_are_perms(sel), "legal iff both bytes are permutations");
        if (bij) legal_count++;
      end
    end
    check(legal_count == 576, "576 legal patterns");
    $display("legal patterns: %0d of 65536", legal_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
