// dr_to_36: dual-rail to 3-of-6 converter for one 4-bit symbol.
//
// The four incoming dual-rail bits are watched by a dual-rail completion
// detector (dr_cd). Only when all four have arrived does the converter drive
// the 3-of-6 codeword of their value onto its six outputs; while any bit is
// still missing, and during the spacer, all six outputs stay low. So the link
// never carries a partial or wrong codeword, and the receiver's 3-of-6
// detector fires only on the complete symbol. The value-to-codeword map is
// CODE36 in async_cd_pkg (this design's choice). Combinational, no clock.
module dr_to_36
  import async_cd_pkg::*;
(
  input  dr_bit_t [SYM_BITS-1:0] din,
  output code36_t                code
);
  logic                done;
  logic [SYM_BITS-1:0] val;

  dr_cd #(.W(SYM_BITS)) u_cd (.din(din), .done(done));

  always_comb begin
    for (int i = 0; i < int'(SYM_BITS); i++) val[i] = din[i].t;
    code = done ? enc36(val) : '0;
  end
endmodule
