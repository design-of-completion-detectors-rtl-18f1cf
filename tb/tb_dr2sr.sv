// tb_dr2sr: self-check of the dual-rail to single-rail converter at W = 8.
//
// For every 8-bit value the word arrives rail by rail in random order:
// valid must stay low (and data zero) until the last bit arrives, then data
// must equal the value. The rails then return to zero one by one and valid
// must drop at the first. Random patterns with illegal both-high pairs must
// never give valid.
module tb_dr2sr;
  import async_cd_pkg::*;

  int checks = 0;
  int failures = 0;

  dr_bit_t [7:0] din;
  logic [7:0]    data;
  logic          valid;

  dr2sr dut (.din(din), .data(data), .valid(valid));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s din=%h data=%h valid=%b", what, din, data, valid);
    end
  endtask

  initial begin
    int order [8];
    for (int v = 0; v < 256; v++) begin
      for (int b = 0; b < 8; b++) order[b] = b;
      order.shuffle();
      din = '0;
      #1;
      check(!valid && data == 8'h0, "spacer");
      for (int k = 0; k < 8; k++) begin
        din[order[k]].t = v[order[k]];
        din[order[k]].f = !v[order[k]];
        #1;
        if (k < 7) check(!valid && data == 8'h0, "partial");
      end
      check(valid && data == 8'(v), "complete");
      for (int k = 0; k < 8; k++) begin
        din[order[k]] = '0;
        #1;
        check(!valid, "return to zero");
      end
    end
    // an illegal pair (both rails high) never completes a word
    for (int n = 0; n < 200; n++) begin
      for (int b = 0; b < 8; b++) begin
        din[b].t = $urandom_range(0, 1) != 0;
        din[b].f = !din[b].t;
      end
      din[$urandom_range(0, 7)] = 2'b11;
      #1;
      check(!valid, "illegal pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
