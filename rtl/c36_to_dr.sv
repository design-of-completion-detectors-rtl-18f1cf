// c36_to_dr: 3-of-6 to dual-rail converter for one 4-bit symbol.
//
// A 3-of-6 completion detector (cd36) watches the six link wires. When exactly
// three are high and they form one of the 16 used codewords, the converter
// raises one rail of each of its four dual-rail output bits with the decoded
// value; otherwise (spacer, wires still arriving, or one of the four unused
// codewords) all eight output rails stay low. done is the detector's output
// and count its ones-count (0..6), brought out for observation. Combinational.
module c36_to_dr
  import async_cd_pkg::*;
(
  input  code36_t                code,
  output dr_bit_t [SYM_BITS-1:0] dout,
  output logic [2:0]             count,
  output logic                   done
);
  logic                hit;
  logic [SYM_BITS-1:0] val;

  cd36 u_cd (.code(code), .count(count), .done(done));

  always_comb begin
    dec36(code, hit, val);
    for (int i = 0; i < int'(SYM_BITS); i++) begin
      dout[i].t = done & hit &  val[i];
      dout[i].f = done & hit & ~val[i];
    end
  end
endmodule
