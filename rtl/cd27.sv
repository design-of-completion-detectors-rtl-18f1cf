// cd27: 2-of-7 completion detector built on the sum-adder principle.
//
// A 2-of-7 codeword has arrived when exactly two of its seven wires are high.
// A seven-to-three ones-counter of four full adders counts the high wires:
// two full adders reduce wires 0..5, a third adds their sum bits and wire 6
// (weight 1), the fourth adds the three weight-2 carries. done = (count == 2).
//
// Counting with adders follows the source design; the adder tree is this
// design's own arrangement. Combinational, no clock.
module cd27
  import async_cd_pkg::*;
(
  input  logic [CODE27_W-1:0] code,
  output logic [2:0]          count,
  output logic                done
);
  logic s0, k0, s1, k1, k2;

  full_adder u_fa0 (.a(code[0]), .b(code[1]), .ci(code[2]), .s(s0), .co(k0));
  full_adder u_fa1 (.a(code[3]), .b(code[4]), .ci(code[5]), .s(s1), .co(k1));
  full_adder u_fa2 (.a(s0),      .b(s1),      .ci(code[6]), .s(count[0]), .co(k2));
  full_adder u_fa3 (.a(k0),      .b(k1),      .ci(k2),      .s(count[1]), .co(count[2]));

  always_comb done = (count == 3'(CODE27_M));
endmodule
