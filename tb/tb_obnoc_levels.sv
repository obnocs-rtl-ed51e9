// tb_obnoc_levels: the obfuscation levels I to IV (2, 4, 8 and 16 obfuscated
// routers). One interconnect per level is built side by side, each loaded
// serially with a random package in which every byte is a permutation
// (a legal topology for every router), with load_en dropped for a few cycles
// part way. For every router of every level the test then drives tagged
// words on all links and checks each neighbour and each router input against
// the reference walk of that router's 32-bit slice, and checks that the load
// took exactly 32 enabled cycles per router.
module tb_obnoc_levels;
  import obnoc_pkg::*;
  import tb_obnoc_ref_pkg::*;

  localparam logic [7:0] ORDER = 8'h93;
  localparam int NLEV = 4;
  localparam int LEV_N [NLEV] = '{2, 4, 8, 16};
  localparam int MAXN = 16;

  logic clk = 0, rst;
  logic [NLEV-1:0] load_en, ap_in;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // Random byte whose four 2-bit fields are a permutation of 0..3.
  function automatic logic [7:0] rand_perm_byte();
    int unsigned p [4] = '{0, 1, 2, 3};
    for (int i = 3; i > 0; i--) begin
      int unsigned k, t;
      k = $urandom_range(i, 0);
      t = p[i]; p[i] = p[k]; p[k] = t;
    end
    return {2'(p[3]), 2'(p[2]), 2'(p[1]), 2'(p[0])};
  endfunction

  logic [MAXN*32-1:0] keys [NLEV];
  link_fwd_t [MAXN-1:0][NPORT-1:0] rtr_out_fwd, fab_in_fwd;
  link_fwd_t [NLEV-1:0][MAXN-1:0][NPORT-1:0] fab_out_fwd, rtr_in_fwd;
  logic      [NLEV-1:0][MAXN-1:0][NPORT-1:0] rtr_out_ready, fab_in_ready;
  logic      [MAXN-1:0][NPORT-1:0] fab_out_ready, rtr_in_ready;

  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    localparam int N = LEV_N[l];
    obnoc_interconnect #(.NUM_OBF_ROUTERS(N)) dut (
      .clk(clk), .rst(rst), .load_en(load_en[l]), .ap_in(ap_in[l]),
      .rtr_out_fwd(rtr_out_fwd[N-1:0]), .rtr_out_ready(rtr_out_ready[l][N-1:0]),
      .fab_out_fwd(fab_out_fwd[l][N-1:0]), .fab_out_ready(fab_out_ready[N-1:0]),
      .fab_in_fwd(fab_in_fwd[N-1:0]), .fab_in_ready(fab_in_ready[l][N-1:0]),
      .rtr_in_fwd(rtr_in_fwd[l][N-1:0]), .rtr_in_ready(rtr_in_ready[N-1:0]));
    if (N < MAXN) begin : g_pad
      assign fab_out_fwd[l][MAXN-1:N]   = '0;
      assign rtr_in_fwd[l][MAXN-1:N]    = '0;
      assign rtr_out_ready[l][MAXN-1:N] = '0;
      assign fab_in_ready[l][MAXN-1:N]  = '0;
    end
  end

  initial begin
    int enabled [NLEV];
    rst = 1; load_en = '0; ap_in = '0;
    fab_out_ready = '1; rtr_in_ready = '1;
    for (int l = 0; l < NLEV; l++) begin
      keys[l] = '0;
      for (int b = 0; b < LEV_N[l] * 4; b++) keys[l][8*b +: 8] = rand_perm_byte();
      enabled[l] = 0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    // Load all levels in parallel, each as long as its own package.
    for (int c = 0; c < MAXN * 32 + 8; c++) begin
      for (int l = 0; l < NLEV; l++) begin
        if (c >= 20 && c < 24) begin
          load_en[l] = 0;                 // pause
          ap_in[l]   = 1'($urandom());
        end else begin
          int b;
          b = c < 20 ? c : c - 4;
          load_en[l] = b < LEV_N[l] * 32;
          ap_in[l]   = load_en[l] ? keys[l][b] : 1'b0;
          if (load_en[l]) enabled[l]++;
        end
      end
      @(negedge clk);
    end
    load_en = '0;
    for (int l = 0; l < NLEV; l++)
      check(enabled[l] == LEV_N[l] * 32, $sformatf("level %0d load length", l + 1));

    for (int t = 0; t < 50; t++) begin
      for (int r = 0; r < MAXN; r++)
        for (int j = 0; j < NPORT; j++) begin
          rtr_out_fwd[r][j] = '{valid: 1'b1, sop: 1'b0, eop: 1'b0, data: {8'(r), 8'(j), 16'($urandom())}};
          fab_in_fwd[r][j]  = '{valid: 1'b1, sop: 1'b1, eop: 1'b1, data: {8'(r), 8'(j + 16), 16'($urandom())}};
        end
      fab_out_ready = {MAXN{4'($urandom())}};
      rtr_in_ready  = {MAXN{4'($urandom())}};
      #1;
      for (int l = 0; l < NLEV; l++)
        for (int r = 0; r < LEV_N[l]; r++) begin
          logic [31:0] k;
          k = keys[l][32*r +: 32];
          for (int d = 0; d < NPORT; d++) begin
            check(fab_out_fwd[l][r][d] == rtr_out_fwd[r][src_of(k[15:0], ORDER, d)],
                  $sformatf("level %0d router %0d out link %0d", l + 1, r, d));
            check(rtr_in_fwd[l][r][d] == fab_in_fwd[r][src_of(k[31:16], ORDER, d)],
                  $sformatf("level %0d router %0d in link %0d", l + 1, r, d));
          end
          // legal package: every source ready exactly when its one sink is
          for (int d = 0; d < NPORT; d++) begin
            check(rtr_out_ready[l][r][src_of(k[15:0], ORDER, d)] == fab_out_ready[r][d],
                  $sformatf("level %0d router %0d out ready %0d", l + 1, r, d));
            check(fab_in_ready[l][r][src_of(k[31:16], ORDER, d)] == rtr_in_ready[r][d],
                  $sformatf("level %0d router %0d in ready %0d", l + 1, r, d));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
