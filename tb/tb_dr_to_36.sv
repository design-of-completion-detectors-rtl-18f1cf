// tb_dr_to_36: exhaustive self-check of the dual-rail to 3-of-6 converter.
//
// All 2^8 patterns of the four incoming rail pairs are applied. When all four
// pairs hold exactly one high rail, the output must be the codeword of their
// value from the table below (the link's code assignment, written out here
// by hand); in every other case the output must be all zero. The test also
// checks that each of the 16 values gives a distinct weight-3 codeword.
module tb_dr_to_36;
  import async_cd_pkg::*;

  localparam logic [5:0] EXP_CODE [16] = '{
    6'h07, 6'h0B, 6'h0D, 6'h0E, 6'h13, 6'h15, 6'h16, 6'h19,
    6'h1A, 6'h1C, 6'h23, 6'h25, 6'h26, 6'h29, 6'h2A, 6'h2C
  };

  int checks = 0;
  int failures = 0;

  dr_bit_t [3:0] din;
  code36_t       code;

  dr_to_36 dut (.din(din), .code(code));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          complete;
    logic [3:0]  v;
    logic [5:0]  exp;
    logic [63:0] seen;
    seen = '0;
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      complete = 1'b1;
      for (int b = 0; b < 4; b++) begin
        v[b] = din[b].t;
        if (din[b] != 2'b10 && din[b] != 2'b01) complete = 1'b0;
      end
      exp = complete ? EXP_CODE[v] : 6'h0;
      checks++;
      if (code !== exp) begin
        failures++;
        $display("FAIL din=%b code=%h exp=%h", din, code, exp);
      end
      if (complete) begin
        checks++;
        if ($countones(code) != 3 || seen[code]) begin
          failures++;
          $display("FAIL codeword %h not weight 3 or repeated", code);
        end
        seen[code] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
