// tb_sr2dr: self-check of the single-rail to dual-rail converter at W = 8.
//
// For every 8-bit value, with valid low the output must be the all-zero
// spacer, and with valid high bit i must appear as t=data[i], f=~data[i].
module tb_sr2dr;
  import async_cd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]    data;
  logic          valid;
  dr_bit_t [7:0] dout;

  sr2dr dut (.data(data), .valid(valid), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int i = 0; i < 256; i++) begin
      data  = 8'(i);
      valid = 1'b0;
      #1;
      checks++;
      if (dout !== 16'h0) begin
        failures++;
        $display("FAIL spacer data=%h dout=%h", data, dout);
      end
      valid = 1'b1;
      #1;
      for (int b = 0; b < 8; b++) exp[2*b +: 2] = data[b] ? 2'b10 : 2'b01;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL data=%h dout=%h exp=%h", data, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
