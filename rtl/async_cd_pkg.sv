// async_cd_pkg: types and code tables shared by the delay-insensitive link.
//
// A dual-rail bit is a pair of wires {t, f}. Both low is the spacer (no data),
// t=1/f=0 carries a one, t=0/f=1 carries a zero, and both high never occurs.
// The link between transmitter and receiver carries 4-bit symbols as 3-of-6
// codewords: exactly three of six wires rise for a symbol and all six return
// to zero between symbols (four-phase, return-to-zero signalling).
//
// The 3-of-6 code has 20 codewords; 16 of them carry a 4-bit value. Which
// codeword stands for which value is this design's own choice: value v maps to
// the v-th weight-3 six-bit pattern in increasing numeric order, so values
// 0..15 use 0x07, 0x0B, 0x0D, 0x0E, 0x13, 0x15, 0x16, 0x19, 0x1A, 0x1C, 0x23,
// 0x25, 0x26, 0x29, 0x2A, 0x2C. The four patterns 0x31, 0x32, 0x34, 0x38 are
// unused. The table is built at elaboration by a constant function.
package async_cd_pkg;

  // one dual-rail bit
  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_bit_t;

  localparam int unsigned SYM_BITS  = 4;  // bits carried by one 3-of-6 symbol
  localparam int unsigned CODE36_W  = 6;  // wires of one 3-of-6 symbol
  localparam int unsigned CODE36_M  = 3;  // wires high in a 3-of-6 codeword
  localparam int unsigned CODE27_W  = 7;
  localparam int unsigned CODE27_M  = 2;
  localparam int unsigned CODE14_W  = 4;
  localparam int unsigned CODE14_M  = 1;

  typedef logic [CODE36_W-1:0] code36_t;

  // number of ones in a six-bit word
  function automatic int unsigned weight6(input logic [5:0] w);
    int unsigned n;
    n = 0;
    for (int b = 0; b < 6; b++) n += int'(w[b]);
    return n;
  endfunction

  // value -> codeword table, entry v is the v-th weight-3 pattern
  function automatic logic [15:0][5:0] build_code36();
    logic [15:0][5:0] tab;
    int unsigned k;
    tab = '0;
    k = 0;
    for (int i = 0; i < 64; i++) begin
      if (weight6(6'(i)) == CODE36_M && k < 16) begin
        tab[k] = 6'(i);
        k++;
      end
    end
    return tab;
  endfunction

  localparam logic [15:0][5:0] CODE36 = build_code36();

  // codeword of a 4-bit value
  function automatic code36_t enc36(input logic [SYM_BITS-1:0] v);
    return CODE36[v];
  endfunction

  // value of a codeword; hit is low for the spacer and the unused codewords
  function automatic void dec36(input code36_t c, output logic hit,
                                output logic [SYM_BITS-1:0] v);
    hit = 1'b0;
    v   = '0;
    for (int i = 0; i < 16; i++) begin
      if (c == CODE36[i]) begin
        hit = 1'b1;
        v   = SYM_BITS'(i);
      end
    end
  endfunction

endpackage
