// tb_scan_ctrl: checks the window walk.
//
// For several region sizes it records every line request and every
// line_* output and compares them with the expected order: windows v-major,
// u-minor, 11 lines each, reference index r*11 and region index
// (v+r)*W+u, line controls one cycle after the request.  The scan must
// take exactly 11 cycles per window with no gap, and a region narrower or
// shorter than the patch must finish at once with no window.
module tb_scan_ctrl;
  import nssd_pkg::*;

  localparam int MAXR = 40;
  localparam int REF_IDX_W = $clog2(NPIX + 1);
  localparam int REG_IDX_W = $clog2(MAXR * MAXR + 1);

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  coord_t reg_w = '0, reg_h = '0;
  logic busy, done, rd_en, line_valid, line_first, line_last;
  logic [31:0] num_windows;
  logic [REF_IDX_W-1:0] ref_rd_idx;
  logic [REG_IDX_W-1:0] reg_rd_idx;
  coord_t line_u, line_v;

  scan_ctrl #(.MAX_REGION(MAXR)) dut (.clk, .rst_n, .start, .reg_w, .reg_h,
    .busy, .done, .num_windows, .rd_en, .ref_rd_idx, .reg_rd_idx,
    .line_valid, .line_first, .line_last, .line_u, .line_v);

  int checks = 0, failures = 0;
  int req_n, line_n, errs_req, errs_line;
  int cur_w;
  bit prev_rd;
  int prev_u, prev_v, prev_r;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // request stream: the k-th request belongs to window k/11, line k%11
  always @(posedge clk) begin
    if (rd_en) begin
      int win, r, u, v, nu;
      nu  = cur_w - int'(PATCH) + 1;
      win = req_n / int'(PATCH);
      r   = req_n % int'(PATCH);
      u   = win % nu;
      v   = win / nu;
      if (int'(ref_rd_idx) != r * int'(PATCH) || int'(reg_rd_idx) != (v + r) * cur_w + u) errs_req++;
      req_n++;
    end
    if (line_valid) begin
      int win, r, u, v, nu;
      nu  = cur_w - int'(PATCH) + 1;
      win = line_n / int'(PATCH);
      r   = line_n % int'(PATCH);
      u   = win % nu;
      v   = win / nu;
      if (line_first != (r == 0) || line_last != (r == int'(PATCH) - 1) ||
          int'(line_u) != u || int'(line_v) != v) errs_line++;
      if (!prev_rd) errs_line++;   // one cycle behind a request
      line_n++;
    end
    prev_rd = rd_en;
  end

  task automatic scan(input int w, input int h);
    int nwin, t0, t1;
    nwin = (w >= int'(PATCH) && h >= int'(PATCH)) ? (w - int'(PATCH) + 1) * (h - int'(PATCH) + 1) : 0;
    req_n = 0; line_n = 0; errs_req = 0; errs_line = 0; cur_w = w;
    @(negedge clk);
    reg_w = coord_t'(w); reg_h = coord_t'(h); start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    repeat (3) @(negedge clk);
    check(int'(num_windows) == nwin, $sformatf("%0dx%0d num_windows %0d", w, h, num_windows));
    check(req_n == nwin * int'(PATCH), $sformatf("%0dx%0d requests %0d", w, h, req_n));
    check(line_n == nwin * int'(PATCH), $sformatf("%0dx%0d lines %0d", w, h, line_n));
    check(errs_req == 0, $sformatf("%0dx%0d request order errors %0d", w, h, errs_req));
    check(errs_line == 0, $sformatf("%0dx%0d line control errors %0d", w, h, errs_line));
    // one cycle per line, no gap between windows
    check((nwin > 0) ? (t0 == nwin * int'(PATCH)) : (t0 <= 1),
          $sformatf("%0dx%0d took %0d cycles for %0d windows", w, h, t0, nwin));
    check(!busy, "busy after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    scan(11, 11);
    scan(24, 24);
    scan(20, 13);
    scan(13, 22);
    scan(40, 40);
    scan(10, 30);
    scan(30, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
