// tb_dr_cd: exhaustive self-check of the dual-rail completion detector.
//
// With W = 4 bits there are 2^8 rail patterns; each is applied for 1 time
// unit and done is compared with a reference that asks, bit by bit, whether
// exactly one of the two rails is high. Then a second instance with W = 1
// (a single XOR) is checked on its four patterns.
module tb_dr_cd;
  import async_cd_pkg::*;

  int checks = 0;
  int failures = 0;

  dr_bit_t [3:0] din;
  logic          done;
  dr_bit_t [0:0] din1;
  logic          done1;

  dr_cd             dut  (.din(din),  .done(done));
  dr_cd #(.W(1)) dut1 (.din(din1), .done(done1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    int ncomplete;
    ncomplete = 0;
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      exp = 1'b1;
      for (int b = 0; b < 4; b++) begin
        if ((din[b].t + din[b].f) != 1) exp = 1'b0;
      end
      if (exp) ncomplete++;
      checks++;
      if (done !== exp) begin
        failures++;
        $display("FAIL din=%b done=%b exp=%b", din, done, exp);
      end
    end
    checks++;
    if (ncomplete != 16) failures++;
    for (int i = 0; i < 4; i++) begin
      din1 = 2'(i);
      #1;
      checks++;
      if (done1 !== (i == 1 || i == 2)) begin
        failures++;
        $display("FAIL W=1 din=%b done=%b", din1, done1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
