// tb_sums_unit: checks the five window sums and the one-line-per-cycle
// rate of sums_unit.
//
// Random windows of 11 lines are streamed back to back with no idle cycle
// between them (some runs insert idle cycles inside a window, which must
// not disturb the sums).  Each result must appear exactly one cycle after
// the window's last line, with the sums worked out here from the pixels.
module tb_sums_unit;
  import nssd_pkg::*;

  localparam int NW = 60;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid = 0, in_first = 0, in_last = 0;
  pixel_t [PATCH-1:0] in_f, in_t;
  coord_t in_u = '0, in_v = '0;
  logic   out_valid;
  sums_t  out_sums;
  coord_t out_u, out_v;

  sums_unit dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_f, .in_t,
                 .in_u, .in_v, .out_valid, .out_sums, .out_u, .out_v);

  int checks = 0, failures = 0;
  sums_t exp_s [NW];
  int    last_cyc [NW];
  int    cyc = 0, n_out = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (in_valid && in_last) last_cyc[int'(in_u)] = cyc;
  always @(posedge clk) if (rst_n && out_valid) begin
    int k;
    k = int'(out_u);
    check(out_v == coord_t'(3 * k), "tag");
    check(cyc - last_cyc[k] == 1, $sformatf("latency %0d", cyc - last_cyc[k]));
    check(out_sums == exp_s[k], $sformatf("window %0d sums %h expected %h", k, out_sums, exp_s[k]));
    n_out++;
  end

  initial begin
    int a, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < NW; k++) begin
      exp_s[k] = '0;
      for (int r = 0; r < int'(PATCH); r++) begin
        // an idle cycle inside some windows
        if (k % 7 == 3 && r == 5) begin
          in_valid <= 0;
          in_f <= '1; in_t <= '1;
          @(posedge clk);
        end
        for (int c = 0; c < int'(PATCH); c++) begin
          a = (k % 11 == 0) ? 255 : $urandom % 256;
          b = (k % 11 == 0) ? 255 : $urandom % 256;
          in_f[c] <= 8'(a);
          in_t[c] <= 8'(b);
          exp_s[k].sf  += SUM1_W'(a);
          exp_s[k].st  += SUM1_W'(b);
          exp_s[k].sf2 += SUM2_W'(a * a);
          exp_s[k].st2 += SUM2_W'(b * b);
          exp_s[k].sft += SUM2_W'(a * b);
        end
        in_valid <= 1;
        in_first <= (r == 0);
        in_last  <= (r == int'(PATCH) - 1);
        in_u     <= coord_t'(k);
        in_v     <= coord_t'(3 * k);
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    check(n_out == NW, $sformatf("outputs %0d", n_out));
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
