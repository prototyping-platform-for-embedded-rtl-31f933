// tb_min_tracker: checks that the tracker keeps the strictly smallest
// score with its coordinates, that the first of equal scores wins, that
// negative scores (rounding below zero) and +infinity compare correctly,
// and that clear restarts the search.
module tb_min_tracker;
  import nssd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic   clear = 0, in_valid = 0;
  fp32_t  in_nssd = '0;
  coord_t in_u = '0, in_v = '0;
  match_t best;
  logic   found, updated;

  min_tracker dut (.clk, .rst_n, .clear, .in_valid, .in_nssd, .in_u, .in_v,
                   .best, .found, .updated);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic offer(input real x, input int u, input int v);
    @(negedge clk);
    in_valid = 1; in_nssd = r2f(x); in_u = coord_t'(u); in_v = coord_t'(v);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    real ref_min, x;
    int  ru, rv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!found && is_inf(best.nssd), "reset state");
    offer(1.5, 1, 1);
    check(found && best.u == 1 && f2r(best.nssd) == 1.5, "first score taken");
    offer(1.5, 2, 2);
    check(best.u == 1, "tie must keep the first");
    offer(2.0, 3, 3);
    check(best.u == 1, "larger ignored");
    offer(0.25, 4, 5);
    check(best.u == 4 && best.v == 5, "smaller taken");
    offer(-0.001, 6, 6);
    check(best.u == 6, "negative score smaller");
    @(negedge clk); in_valid = 1; in_nssd = FP_PINF; in_u = 7; @(negedge clk); in_valid = 0;
    check(best.u == 6, "infinity ignored");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(!found && is_inf(best.nssd), "clear");
    @(negedge clk); in_valid = 1; in_nssd = FP_PINF; in_u = 8; @(negedge clk); in_valid = 0;
    check(!found, "infinity alone is no match");
    // random sequence against a software minimum
    ref_min = 1.0e30; ru = -1; rv = -1;
    for (int k = 0; k < 300; k++) begin
      x = real'($urandom % 100000) / 1000.0;
      if (x < ref_min) begin ref_min = x; ru = k; rv = k + 1; end
      offer(x, k, k + 1);
    end
    check(found && int'(best.u) == ru && int'(best.v) == rv, $sformatf("random min at %0d got %0d", ru, best.u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
