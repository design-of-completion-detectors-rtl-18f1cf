// async_comm_top: delay-insensitive on-chip link from single rail to dual rail
// to 3-of-6 code and back, plus the 2-of-7 and 1-of-4 completion detectors.
//
// Path: data_in/req_in (single rail, bundled) -> sr2dr -> per 4-bit group
// dr_to_36 -> link (NSYM groups of six wires, 3-of-6 code) -> c36_to_dr ->
// dr2sr -> data_out/ack_out. ack_out is the receiver's dual-rail completion:
// it rises once every symbol has been detected and decoded and falls once
// the spacer has come through. A sender runs the four-phase handshake: set
// data_in, raise req_in, wait for ack_out, lower req_in, wait for ack_out low.
// sym_done and sym_count show each symbol's 3-of-6 detector and its
// ones-count.
//
// The 2-of-7 and 1-of-4 detectors are not on this path; they stand beside it
// with their own ports (code in, ones-count and done out).
// DATA_W must be a multiple of 4; its default of 8 is this design's choice.
// Everything is combinational; there is no clock and no reset. Deferred
// assertions check the link rules in simulation.
module async_comm_top
  import async_cd_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0]             data_in,
  input  logic                          req_in,
  output logic [DATA_W-1:0]             data_out,
  output logic                          ack_out,
  output logic [DATA_W/SYM_BITS*CODE36_W-1:0] link,
  output logic [DATA_W/SYM_BITS-1:0]    sym_done,
  output logic [DATA_W/SYM_BITS-1:0][2:0] sym_count,
  input  logic [CODE27_W-1:0]           cd27_code,
  output logic [2:0]                    cd27_count,
  output logic                          cd27_done,
  input  logic [CODE14_W-1:0]           cd14_code,
  output logic [2:0]                    cd14_count,
  output logic                          cd14_done
);
  localparam int unsigned NSYM = DATA_W / SYM_BITS;

  dr_bit_t [DATA_W-1:0] tx_dr;
  dr_bit_t [DATA_W-1:0] rx_dr;

  sr2dr #(.W(DATA_W)) u_sr2dr (.data(data_in), .valid(req_in), .dout(tx_dr));

  for (genvar g = 0; g < NSYM; g++) begin : g_sym
    dr_to_36 u_enc (
      .din (tx_dr[g*SYM_BITS +: SYM_BITS]),
      .code(link[g*CODE36_W +: CODE36_W])
    );
    c36_to_dr u_dec (
      .code(link[g*CODE36_W +: CODE36_W]),
      .dout(rx_dr[g*SYM_BITS +: SYM_BITS]),
      .count(sym_count[g]),
      .done(sym_done[g])
    );
  end

  // Link rules: a symbol on the link is either the spacer or a whole 3-of-6
  // codeword, never a partial one, and the receiver acknowledges only while
  // the sender requests.
  for (genvar g = 0; g < NSYM; g++) begin : g_chk
    always_comb
      assert #0 (sym_count[g] == 3'd0 || sym_count[g] == 3'(CODE36_M))
        else $error("link symbol %0d carries %0d high wires", g, sym_count[g]);
  end

  always_comb
    assert #0 (!ack_out || req_in) else $error("acknowledge without request");

  dr2sr #(.W(DATA_W)) u_dr2sr (.din(rx_dr), .data(data_out), .valid(ack_out));

  cd27 u_cd27 (.code(cd27_code), .count(cd27_count), .done(cd27_done));
  cd14 u_cd14 (.code(cd14_code), .count(cd14_count), .done(cd14_done));
endmodule
