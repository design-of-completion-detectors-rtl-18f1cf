// dr2sr: dual-rail to single-rail converter, the exit of the link.
//
// A dual-rail completion detector (dr_cd) watches the incoming word; when all
// W bits have arrived, valid rises and data shows the true rails. While the
// word is incomplete or in the spacer, valid is low and data is zero. valid is
// the receiver's completion signal and serves as the acknowledge of the
// four-phase handshake. Combinational, no clock.
module dr2sr
  import async_cd_pkg::*;
#(
  parameter int unsigned W = 8  // data bits
) (
  input  dr_bit_t [W-1:0] din,
  output logic [W-1:0]    data,
  output logic            valid
);
  dr_cd #(.W(W)) u_cd (.din(din), .done(valid));

  always_comb begin
    for (int i = 0; i < W; i++) data[i] = valid & din[i].t;
  end
endmodule
