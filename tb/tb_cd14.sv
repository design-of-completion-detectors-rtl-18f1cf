// tb_cd14: exhaustive self-check of the 1-of-4 completion detector.
//
// Applies every one of the 2^4 wire patterns and compares count with the
// number of high wires and done with (count == 1), both worked out here by
// counting bits. It then replays four-phase transfers: for each 1-of-4
// codeword the wires rise one at a time in random order, and done must stay
// low until the last wire has arrived, then fall at the first wire that
// returns to zero. Each step waits 1 time unit.
module tb_cd14;
  localparam int N = 4;
  localparam int K = 1;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] code;
  logic [2:0]   count;
  logic         done;

  cd14 dut (.code(code), .count(count), .done(done));

  function automatic int ones(input logic [N-1:0] w);
    int n = 0;
    for (int b = 0; b < N; b++) if (w[b]) n++;
    return n;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s code=%b count=%0d done=%b", what, code, count, done);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [N];
    logic [N-1:0] target;
    int codewords;

    codewords = 0;
    // every wire pattern
    for (int i = 0; i < (1 << N); i++) begin
      code = N'(i);
      #1;
      check(int'(count) == ones(code), "count");
      check(done == (ones(code) == K), "done");
    end

    // four-phase transfers with random arrival order
    for (int i = 0; i < (1 << N); i++) begin
      target = N'(i);
      if (ones(target) != K) continue;
      codewords++;
      for (int r = 0; r < 4; r++) begin
        for (int b = 0; b < N; b++) order[b] = b;
        order.shuffle();
        code = '0;
        #1;
        check(!done, "spacer");
        for (int b = 0; b < N; b++) begin
          if (target[order[b]]) begin
            code[order[b]] = 1'b1;
            #1;
            check(done == (code == target), "arrival");
          end
        end
        check(done, "complete");
        for (int b = 0; b < N; b++) begin
          if (target[order[b]]) begin
            code[order[b]] = 1'b0;
            #1;
            check(!done, "return to zero");
          end
        end
      end
    end
    check(codewords > 0, "codewords exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
