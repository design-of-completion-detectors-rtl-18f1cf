// sr2dr: single-rail to dual-rail converter, the entry of the link.
//
// While valid is high each data bit drives one rail of its pair: a one raises
// t, a zero raises f. While valid is low all rails are low, which is the
// spacer of four-phase return-to-zero signalling. valid plays the role of the
// request of a bundled-data sender: data must be stable before valid rises
// and while it stays high. Combinational, no clock.
module sr2dr
  import async_cd_pkg::*;
#(
  parameter int unsigned W = 8  // data bits
) (
  input  logic [W-1:0]    data,
  input  logic            valid,
  output dr_bit_t [W-1:0] dout
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      dout[i].t = valid &  data[i];
      dout[i].f = valid & ~data[i];
    end
  end
endmodule
