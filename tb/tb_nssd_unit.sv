// tb_nssd_unit: checks the single-precision NSSD pipeline against a
// double-precision two-pass NSSD of the same pixels.
//
// Patches: random pairs, identical pairs (NSSD 0), affine copies t = a*f+b
// (NSSD 0, the score ignores gain and offset), inverted copies t = 255-f
// (NSSD 4), and flat patches (must score +infinity).  The window sums are
// formed here from the pixels, fed one per cycle back to back, and each
// output must arrive exactly 9 cycles after its input with its tag.
module tb_nssd_unit;
  import nssd_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 9;
  localparam int NT  = 200;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid = 0;
  sums_t  in_sums;
  coord_t in_u, in_v;
  logic   out_valid;
  fp32_t  out_nssd;
  coord_t out_u, out_v;

  nssd_unit dut (.clk, .rst_n, .in_valid, .in_sums, .in_u, .in_v,
                 .out_valid, .out_nssd, .out_u, .out_v);

  int checks = 0, failures = 0;
  real    exp_val [NT];
  int     cyc = 0, in_cyc [NT];
  int     n_out = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic sums_t make_sums(input patch_t f, input patch_t t);
    sums_t s;
    s = '0;
    for (int i = 0; i < N; i++) begin
      s.sf  += SUM1_W'(f[i]);
      s.st  += SUM1_W'(t[i]);
      s.sf2 += SUM2_W'(f[i] * f[i]);
      s.st2 += SUM2_W'(t[i] * t[i]);
      s.sft += SUM2_W'(f[i] * t[i]);
    end
    return s;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (in_valid) in_cyc[int'(in_u)] = cyc;

  always @(posedge clk) if (out_valid) begin
    int k;
    real got;
    k = int'(out_u);
    check(out_v == coord_t'(k ^ 16'h5A5A), "tag v");
    check(cyc - in_cyc[k] == LAT, $sformatf("latency %0d", cyc - in_cyc[k]));
    if (exp_val[k] < 0.0) begin
      check(is_inf(out_nssd), $sformatf("flat window %0d not +inf", k));
    end else begin
      got = f2r(out_nssd);
      check(fabs(got - exp_val[k]) <= 1.0e-2 + 1.0e-3 * exp_val[k],
            $sformatf("win %0d nssd %f expected %f", k, got, exp_val[k]));
    end
    n_out++;
  end

  initial begin
    patch_t f, t;
    int kind, a, b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < NT; k++) begin
      kind = k % 5;
      for (int i = 0; i < N; i++) f[i] = $urandom % 256;
      a = 1 + $urandom % 2; b = $urandom % 40;
      for (int i = 0; i < N; i++) begin
        case (kind)
          0, 1: t[i] = $urandom % 256;
          2:    t[i] = f[i];
          3:    t[i] = 255 - f[i];
          default: t[i] = (f[i] / 2) * a + b;
        endcase
      end
      if (k == 7)  for (int i = 0; i < N; i++) f[i] = 99;   // flat reference
      if (k == 13) for (int i = 0; i < N; i++) t[i] = 3;    // flat candidate
      exp_val[k] = nssd_ref(f, t);
      in_sums  <= make_sums(f, t);
      in_u     <= coord_t'(k);
      in_v     <= coord_t'(k ^ 16'h5A5A);
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    check(n_out == NT, $sformatf("outputs %0d", n_out));
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
