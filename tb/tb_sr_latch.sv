`timescale 1ns/1ps
// tb_sr_latch: drives the set/reset latch through set, hold, reset, both-high
// (reset wins) and the asynchronous clear, and compares q with the expected
// state after each step.
module tb_sr_latch;
  logic rst_n = 0, s = 0, r = 0, q;
  int checks = 0, failures = 0;

  sr_latch dut (.rst_n(rst_n), .s(s), .r(r), .q(q));

  task automatic step(input logic ns, input logic nr, input logic nrst, input logic exp, input string what);
    s = ns; r = nr; rst_n = nrst;
    #1;
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s: q=%b exp=%b", what, q, exp); end
  endtask

  initial begin
    step(0, 0, 0, 0, "reset");
    step(0, 0, 1, 0, "hold low");
    step(1, 0, 1, 1, "set");
    step(0, 0, 1, 1, "hold high");
    step(0, 1, 1, 0, "reset");
    step(0, 0, 1, 0, "hold low after reset");
    step(1, 0, 1, 1, "set again");
    step(1, 1, 1, 0, "both high: reset wins");
    step(1, 0, 1, 1, "r released, s still high");
    step(0, 0, 1, 1, "hold");
    step(0, 0, 0, 0, "async clear");
    step(1, 0, 0, 0, "set blocked by clear");
    step(1, 0, 1, 1, "set after clear");
    for (int i = 0; i < 50; i++) begin
      logic ps, pr, prev;
      prev = q;
      ps = 1'($urandom); pr = 1'($urandom);
      step(ps, pr, 1, pr ? 1'b0 : (ps ? 1'b1 : prev), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
