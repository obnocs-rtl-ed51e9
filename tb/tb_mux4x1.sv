// tb_mux4x1: exhaustive select sweep of the 4x1 programmable MUX with random
// input words; each output is compared with the input the select names.
module tb_mux4x1;
  localparam int unsigned W = 35;
  logic [3:0][W-1:0] in;
  logic [1:0]        sel;
  logic [W-1:0]      out;
  int checks = 0, failures = 0;

  mux4x1 #(.WIDTH(W), .NIN(4)) dut (.in(in), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) in[i] = W'({$urandom(), $urandom()});
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (out !== in[s]) begin
          failures++;
          $display("mismatch sel=%0d out=%h want=%h", s, out, in[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
