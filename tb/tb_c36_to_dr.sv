// tb_c36_to_dr: exhaustive self-check of the 3-of-6 to dual-rail converter.
//
// All 64 patterns of the six link wires are applied. For the 16 codewords of
// the table below the output must be the value in dual rail and done high;
// for the four unused weight-3 patterns done is high but the rails stay low;
// for every other pattern done is low and all rails are low. count must be
// the number of high wires. Finally each codeword arrives wire by wire in
// random order and the output must stay the spacer until the last wire.
module tb_c36_to_dr;
  import async_cd_pkg::*;

  localparam logic [5:0] EXP_CODE [16] = '{
    6'h07, 6'h0B, 6'h0D, 6'h0E, 6'h13, 6'h15, 6'h16, 6'h19,
    6'h1A, 6'h1C, 6'h23, 6'h25, 6'h26, 6'h29, 6'h2A, 6'h2C
  };

  int checks = 0;
  int failures = 0;

  code36_t       code;
  dr_bit_t [3:0] dout;
  logic [2:0]    count;
  logic          done;

  c36_to_dr dut (.code(code), .dout(dout), .count(count), .done(done));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s code=%h dout=%b count=%0d done=%b", what, code, dout, count, done);
    end
  endtask

  function automatic logic [7:0] to_dr(input logic [3:0] v);
    logic [7:0] r;
    for (int b = 0; b < 4; b++) r[2*b +: 2] = v[b] ? 2'b10 : 2'b01;
    return r;
  endfunction

  initial begin
    int         idx;
    int         n;
    int         order [6];
    logic [5:0] target;
    for (int i = 0; i < 64; i++) begin
      code = 6'(i);
      #1;
      idx = -1;
      for (int k = 0; k < 16; k++) if (EXP_CODE[k] == code) idx = k;
      n = 0;
      for (int b = 0; b < 6; b++) if (code[b]) n++;
      check(int'(count) == n, "count");
      check(done == (n == 3), "done");
      if (idx >= 0) check(dout == to_dr(4'(idx)), "decode");
      else          check(dout == 8'h0, "no decode");
    end
    for (int k = 0; k < 16; k++) begin
      target = EXP_CODE[k];
      for (int b = 0; b < 6; b++) order[b] = b;
      order.shuffle();
      code = '0;
      for (int b = 0; b < 6; b++) begin
        if (target[order[b]]) begin
          code[order[b]] = 1'b1;
          #1;
          if (code != target) check(dout == 8'h0 && !done, "partial");
        end
      end
      check(done && dout == to_dr(4'(k)), "arrived");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
