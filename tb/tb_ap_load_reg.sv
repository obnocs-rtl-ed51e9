// tb_ap_load_reg: shifts random 32-bit packages into the activation package
// load register least significant bit first and checks
//   * the parallel output equals the package after exactly 32 enabled cycles;
//   * with load_en low the register holds whatever ap_in does;
//   * a partially loaded register shows the bits sent so far at the top;
//   * reset clears the register.
module tb_ap_load_reg;
  localparam int unsigned LEN = 32;
  logic clk = 0, rst, load_en, ap_in;
  logic [LEN-1:0] ap_q;
  int checks = 0, failures = 0;
  int cycles = 0;

  ap_load_reg #(.LEN(LEN)) dut (.clk(clk), .rst(rst), .load_en(load_en), .ap_in(ap_in), .ap_q(ap_q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s ap_q=%h", what, ap_q); end
  endtask

  initial begin
    logic [LEN-1:0] pkg;
    int start;
    rst = 1; load_en = 0; ap_in = 0;
    @(posedge clk); @(posedge clk);
    #1 check(ap_q == '0, "reset value");
    rst = 0;
    for (int t = 0; t < 50; t++) begin
      pkg = $urandom();
      @(negedge clk);
      start = cycles;
      load_en = 1;
      for (int b = 0; b < LEN; b++) begin
        ap_in = pkg[b];
        @(negedge clk);
        if (b == 7) check(ap_q[LEN-1 -: 8] == pkg[7:0], "partial load at top");
      end
      load_en = 0;
      check(cycles - start == LEN, "load takes LEN cycles");
      check(ap_q == pkg, "package loaded");
      // hold with load_en low
      for (int h = 0; h < 10; h++) begin
        ap_in = 1'($urandom());
        @(negedge clk);
      end
      check(ap_q == pkg, "hold while load_en low");
    end
    rst = 1;
    @(negedge clk);
    check(ap_q == '0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
