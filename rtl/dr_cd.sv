// dr_cd: dual-rail completion detector for a W-bit word.
//
// A dual-rail bit has arrived when exactly one of its two rails is high, which
// one XOR gate detects; the word is complete when every bit has arrived, so
// the per-bit XORs are combined by an AND tree. done is high while a full
// codeword is on the wires and low during the spacer and while bits are still
// arriving or leaving. A pair with both rails high is illegal and counts as
// not arrived.
//
// The per-bit XOR follows the source design; combining the bits with a plain
// AND (rather than a state-holding C-element tree) is this design's choice,
// so done falls as soon as the first rail of a word returns to zero.
// Combinational, no clock.
module dr_cd
  import async_cd_pkg::*;
#(
  parameter int unsigned W = 4  // dual-rail bits checked
) (
  input  dr_bit_t [W-1:0] din,
  output logic            done
);
  logic [W-1:0] arrived;

  always_comb begin
    for (int i = 0; i < W; i++) arrived[i] = din[i].t ^ din[i].f;
    done = &arrived;
  end
endmodule
