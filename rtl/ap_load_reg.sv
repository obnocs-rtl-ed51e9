// ap_load_reg: activation package load register (AP_LOAD_REG), a serial-in
// parallel-out shift register that holds the select bits of every
// programmable MUX in the interconnect.
//
// After fabrication the package is shifted in one bit per clock on ap_in
// while load_en is high; when load_en is low the register holds, and its
// parallel outputs stay on the MUX select lines. Bits enter at the top and
// move towards bit 0, so the bit sent first ends in ap_q[0] after LEN shifts:
// send the package least significant bit first. rst clears the register
// (synchronous, active high), which selects input 0 on every MUX.
//
// The document gates the clock with LOAD_en; this design uses load_en as a
// clock enable on an ungated clock, which has the same effect on the register
// contents. The shift direction and the reset are this design's choices.
//
// Timing: one bit per rising clock edge with load_en high; a LEN-bit package
// takes LEN cycles.
module ap_load_reg #(
  parameter int unsigned LEN = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           load_en,
  input  logic           ap_in,
  output logic [LEN-1:0] ap_q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      ap_q <= '0;
    end else if (load_en) begin
      ap_q <= LEN'({ap_in, ap_q} >> 1);
    end
  end

endmodule
