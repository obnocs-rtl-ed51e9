// tb_obnoc_ref_pkg: reference model used by the testbenches of the
// obfuscated-interconnect RTL. It works out, from a select pattern, which
// source link each destination of a two-stage MUX-DEMUX switch is connected
// to, by walking the two MUX stages one select at a time, and says whether a
// pattern gives a one-to-one (legal) wiring.
package tb_obnoc_ref_pkg;

  typedef int unsigned path_t [4];

  // Input order shared by all MUXes of a stage (the switch's default).
  function automatic int unsigned wire_of(logic [7:0] order, int unsigned i);
    return int'(order[2*i +: 2]);
  endfunction

  function automatic int unsigned sel_of(logic [15:0] sel, int unsigned stage, int unsigned k);
    return int'(sel[8*stage + 2*k +: 2]);
  endfunction

  // Source index that destination d receives.
  function automatic int unsigned src_of(logic [15:0] sel, logic [7:0] order, int unsigned d);
    int unsigned s1mux;
    s1mux = wire_of(order, sel_of(sel, 1, d));
    return wire_of(order, sel_of(sel, 0, s1mux));
  endfunction

  // True when every destination receives a different source.
  function automatic bit is_bijection(logic [15:0] sel, logic [7:0] order);
    bit [3:0] seen;
    seen = '0;
    for (int unsigned d = 0; d < 4; d++) seen[src_of(sel, order, d)] = 1'b1;
    return seen == 4'hf;
  endfunction

  // True when each byte holds four distinct 2-bit selects.
  function automatic bit bytes_are_perms(logic [15:0] sel);
    for (int unsigned st = 0; st < 2; st++) begin
      bit [3:0] seen;
      seen = '0;
      for (int unsigned k = 0; k < 4; k++) seen[sel_of(sel, st, k)] = 1'b1;
      if (seen != 4'hf) return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
