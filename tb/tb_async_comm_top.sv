// tb_async_comm_top: end-to-end test of the delay-insensitive link at its
// default size (DATA_W = 8, two 3-of-6 symbols).
//
// A four-phase sender sends every 8-bit value: it sets data_in, raises
// req_in, waits for ack_out, checks data_out and the codewords on the link,
// lowers req_in and waits for ack_out to fall, checking that the link has
// returned to the spacer. Each wait is bounded; a missing acknowledge is a
// failure. The 2-of-7 and 1-of-4 detectors beside the link are driven with
// every wire pattern and compared with a bit count made here.
//
// Mechanisms counted, each of which must happen at least once: a completed
// handshake (ack rises), a return to spacer (ack falls), every one of the 16
// codewords on every link symbol, a symbol detector firing, and both done and
// not-done outcomes of the 2-of-7 and 1-of-4 detectors.
module tb_async_comm_top;
  import async_cd_pkg::*;

  localparam int DATA_W = 8;
  localparam int NSYM   = DATA_W / 4;
  localparam logic [5:0] EXP_CODE [16] = '{
    6'h07, 6'h0B, 6'h0D, 6'h0E, 6'h13, 6'h15, 6'h16, 6'h19,
    6'h1A, 6'h1C, 6'h23, 6'h25, 6'h26, 6'h29, 6'h2A, 6'h2C
  };

  int checks = 0;
  int failures = 0;

  logic [DATA_W-1:0]  data_in, data_out;
  logic               req_in, ack_out;
  logic [NSYM*6-1:0]  link;
  logic [NSYM-1:0]    sym_done;
  logic [NSYM-1:0][2:0] sym_count;
  logic [6:0]         cd27_code;
  logic [2:0]         cd27_count;
  logic               cd27_done;
  logic [3:0]         cd14_code;
  logic [2:0]         cd14_count;
  logic               cd14_done;

  async_comm_top dut (.*);

  // counts of the mechanisms
  int n_ack_rise, n_ack_fall, n_sym_done, n_cd27_done, n_cd27_idle, n_cd14_done, n_cd14_idle;
  bit seen_code [NSYM][16];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s data_in=%h data_out=%h ack=%b link=%h", what, data_in, data_out,
               ack_out, link);
    end
  endtask

  always @(ack_out) begin
    if (ack_out) n_ack_rise++;
    else         n_ack_fall++;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    n_ack_rise = 0; n_ack_fall = 0; n_sym_done = 0;
    n_cd27_done = 0; n_cd27_idle = 0; n_cd14_done = 0; n_cd14_idle = 0;
    foreach (seen_code[g, k]) seen_code[g][k] = 1'b0;
    req_in = 1'b0;
    data_in = '0;
    cd27_code = '0;
    cd14_code = '0;
    #1;
    check(!ack_out && link == '0, "idle");

    for (int v = 0; v < (1 << DATA_W); v++) begin
      data_in = DATA_W'(v);
      #1;
      req_in = 1'b1;
      t = 0;
      while (!ack_out && t < 20) begin #1; t++; end
      check(ack_out, "ack rises");
      check(data_out == data_in, "data");
      for (int g = 0; g < NSYM; g++) begin
        check(link[g*6 +: 6] == EXP_CODE[data_in[g*4 +: 4]], "link codeword");
        seen_code[g][data_in[g*4 +: 4]] = 1'b1;
        check(sym_count[g] == 3'd3, "symbol count");
        if (sym_done[g]) n_sym_done++;
      end
      req_in = 1'b0;
      t = 0;
      while (ack_out && t < 20) begin #1; t++; end
      check(!ack_out, "ack falls");
      check(link == '0 && sym_done == '0 && data_out == '0, "spacer");
    end

    for (int i = 0; i < 128; i++) begin
      cd27_code = 7'(i);
      #1;
      check(int'(cd27_count) == $countones(cd27_code), "cd27 count");
      check(cd27_done == ($countones(cd27_code) == 2), "cd27 done");
      if (cd27_done) n_cd27_done++; else n_cd27_idle++;
    end
    for (int i = 0; i < 16; i++) begin
      cd14_code = 4'(i);
      #1;
      check(int'(cd14_count) == $countones(cd14_code), "cd14 count");
      check(cd14_done == ($countones(cd14_code) == 1), "cd14 done");
      if (cd14_done) n_cd14_done++; else n_cd14_idle++;
    end

    $display("handshakes: ack rose %0d, fell %0d; symbol detections %0d", n_ack_rise,
             n_ack_fall, n_sym_done);
    $display("cd27 done %0d / not %0d; cd14 done %0d / not %0d", n_cd27_done, n_cd27_idle,
             n_cd14_done, n_cd14_idle);
    check(n_ack_rise > 0, "mechanism: acknowledge");
    check(n_ack_fall > 0, "mechanism: return to spacer");
    check(n_sym_done > 0, "mechanism: symbol detection");
    check(n_cd27_done > 0 && n_cd27_idle > 0, "mechanism: 2-of-7 detection");
    check(n_cd14_done > 0 && n_cd14_idle > 0, "mechanism: 1-of-4 detection");
    foreach (seen_code[g, k]) check(seen_code[g][k], "mechanism: every codeword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
