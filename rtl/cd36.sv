// cd36: 3-of-6 completion detector built on the sum-adder principle.
//
// A 3-of-6 codeword has arrived when exactly three of its six wires are high.
// The detector counts the high wires with adders and compares the count with
// three: two full adders each reduce three wires to a two-bit partial count,
// a half adder (a full adder with its carry-in tied low) adds the two
// weight-1 bits and a third full adder adds the two weight-2 carries and the
// half adder's carry, giving a three-bit count 0..6. done = (count == 3).
// count is brought out as well; during four-phase signalling it rises from 0
// to 3 as wires arrive and falls back to 0 in the spacer.
//
// Counting with adders follows the source design; the exact adder tree is
// this design's own arrangement. Combinational, no clock.
module cd36
  import async_cd_pkg::*;
(
  input  code36_t     code,
  output logic [2:0]  count,
  output logic        done
);
  logic s0, k0, s1, k1, c0, w1, w2;

  full_adder u_fa0 (.a(code[0]), .b(code[1]), .ci(code[2]), .s(s0), .co(k0));
  full_adder u_fa1 (.a(code[3]), .b(code[4]), .ci(code[5]), .s(s1), .co(k1));
  full_adder u_ha  (.a(s0),      .b(s1),      .ci(1'b0),    .s(count[0]), .co(c0));
  full_adder u_fa2 (.a(k0),      .b(k1),      .ci(c0),      .s(w1), .co(w2));

  assign count[1] = w1;
  assign count[2] = w2;

  always_comb done = (count == 3'(CODE36_M));
endmodule
