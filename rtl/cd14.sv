// cd14: 1-of-4 completion detector built on the sum-adder principle.
//
// A 1-of-4 codeword has arrived when exactly one of its four wires is high.
// A full adder reduces wires 0..2, a half adder (full adder, carry-in low)
// adds its sum bit and wire 3, and a second half adder adds the two weight-2
// carries, giving a three-bit count 0..4. done = (count == 1).
//
// Counting with adders follows the source design; the adder tree is this
// design's own arrangement. Combinational, no clock.
module cd14
  import async_cd_pkg::*;
(
  input  logic [CODE14_W-1:0] code,
  output logic [2:0]          count,
  output logic                done
);
  logic s0, k0, k1;

  full_adder u_fa0 (.a(code[0]), .b(code[1]), .ci(code[2]), .s(s0), .co(k0));
  full_adder u_ha0 (.a(s0),      .b(code[3]), .ci(1'b0),    .s(count[0]), .co(k1));
  full_adder u_ha1 (.a(k0),      .b(k1),      .ci(1'b0),    .s(count[1]), .co(count[2]));

  always_comb done = (count == 3'(CODE14_M));
endmodule
