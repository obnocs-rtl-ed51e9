// mux4x1: the programmable 4-to-1 multiplexer that the obfuscation inserts on
// router links (the "mux_4x1" cells drawn around the obfuscated router).
//
// Purely combinational: out = in[sel]. The select comes from the parallel
// outputs of the activation package load register, so after the package is
// loaded it is constant. WIDTH is the width of the bundle carried, which for a
// router link is the whole forward part of the link (valid, packet framing and
// data). The document gives the function and the 4x1 size; the generic width
// and the packed-array port style are this design's choice.
module mux4x1 #(
  parameter int unsigned WIDTH = 35,
  parameter int unsigned NIN   = 4
) (
  input  logic [NIN-1:0][WIDTH-1:0] in,
  input  logic [$clog2(NIN)-1:0]    sel,
  output logic [WIDTH-1:0]          out
);

  always_comb begin
    out = in[sel];
  end

endmodule
