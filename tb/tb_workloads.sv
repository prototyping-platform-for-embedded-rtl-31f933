// tb_workloads: runs the two evaluations of the search kernel, at its
// default parameters, and reports their cycle counts.
//
// 1. Kernel benchmark.  A random n x n image is the search region and an
//    11x11 patch cut from it at a random place is the reference; n goes
//    from 11 to 40, so the window count (iterations of the search) is
//    k*k for k = 1..30, from 1 to 900.  The kernel must find the patch at
//    the place it was cut from, with an NSSD near zero, and the time from
//    the end of the load to the result write must be 11 cycles per window
//    plus the same constant for every size.
// 2. One tracking frame.  15 features are tracked in a random 160x120
//    frame; for each, a search region 20 to 24 pixels across is cut around
//    the feature's predicted position, and the reference patch is the
//    feature's true appearance under a gain and offset change.  The host
//    side of the search (the box around the prediction, clipping it to the
//    frame, turning the window corner back into a frame position) is done
//    here, as software would do it.  Every feature must be found at its
//    true position.
// The cycle counts are printed with the time they take at a 125 MHz
// kernel clock.  The sizes of both runs follow the evaluations this kernel
// was designed for; the frame size and the feature placement are this
// testbench's own.
module tb_workloads;
  import nssd_pkg::*;
  import tb_ref_pkg::*;

  localparam int REF_BASE = 32'h0000;
  localparam int REG_BASE = 32'h0100;
  localparam int RES_BASE = 32'h1000;
  localparam int MAXR     = 40;
  localparam int FW       = 160;
  localparam int FH       = 120;
  localparam int NFEAT    = 15;
  localparam real CLK_MHZ = 125.0;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  avs_address = '0;
  logic        avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        irq;
  logic [31:0] avm_address, avm_writedata, avm_readdata;
  logic        avm_read, avm_write, avm_waitrequest, avm_readdatavalid;

  nssd_search_kernel dut (
    .clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .irq, .avm_address, .avm_read, .avm_write, .avm_writedata,
    .avm_waitrequest, .avm_readdata, .avm_readdatavalid
  );

  gm_model #(.WORDS(2048), .LAT(4), .STALL_PCT(25)) u_gm (
    .clk, .address(avm_address), .read(avm_read), .write(avm_write),
    .writedata(avm_writedata), .waitrequest(avm_waitrequest),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid)
  );

  int checks = 0, failures = 0;
  int cyc = 0, last_rdv = 0, first_wr = -1, scan_const = -1;
  int n_read_stall = 0, n_write_stall = 0;

  int region [MAXR*MAXR];
  int frame  [FW*FH];
  patch_t refp;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (avm_read && avm_waitrequest) n_read_stall++;
    if (avm_write && avm_waitrequest) n_write_stall++;
    if (avm_readdatavalid) last_rdv = cyc;
    if (avm_write && first_wr < 0) first_wr = cyc;
  end

  task automatic csr_write(input int a, input int d);
    @(negedge clk);
    avs_address = 3'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic csr_read(input int a, output logic [31:0] d);
    @(negedge clk);
    avs_address = 3'(a); avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  function automatic void put_byte(input int addr, input int val);
    u_gm.mem[addr >> 2][8*(addr & 3) +: 8] = 8'(val);
  endfunction

  function automatic patch_t window(input int w, input int u, input int v);
    patch_t p;
    for (int r = 0; r < P; r++)
      for (int c = 0; c < P; c++) p[r*P + c] = region[(v + r)*w + u + c];
    return p;
  endfunction

  // one kernel run on region[] and refp; returns the result record, the
  // kernel's own cycle count and the load-end to write-back time
  task automatic run(input int w, input int h, output real nssd, output int u,
                     output int v, output int cycles, output int scan);
    logic [31:0] st, c;
    for (int i = 0; i < N; i++) put_byte(REF_BASE + i, refp[i]);
    for (int i = 0; i < w*h; i++) put_byte(REG_BASE + i, region[i]);
    for (int i = 0; i < 3; i++) u_gm.mem[(RES_BASE >> 2) + i] = 32'hDEAD_BEEF;
    csr_write(1, REF_BASE);
    csr_write(2, REG_BASE);
    csr_write(3, RES_BASE);
    csr_write(4, w);
    csr_write(5, h);
    first_wr = -1;
    csr_write(0, 1);
    do csr_read(0, st); while (st[1] == 1'b0);
    check(st[2] == 1'b1, $sformatf("%0dx%0d: found clear", w, h));
    check(irq == 1'b1, $sformatf("%0dx%0d: irq low after done", w, h));
    csr_read(6, c);
    cycles = int'(c);
    scan   = first_wr - last_rdv;
    nssd   = f2r(u_gm.mem[RES_BASE >> 2]);
    u      = int'(u_gm.mem[(RES_BASE >> 2) + 1]);
    v      = int'(u_gm.mem[(RES_BASE >> 2) + 2]);
  endtask

  task automatic check_rate(input int nwin, input int scan, input string name);
    if (scan_const < 0) scan_const = scan - nwin * P;
    check(scan - nwin * P == scan_const && scan_const < 32,
          $sformatf("%s: scan took %0d cycles for %0d windows", name, scan, nwin));
  endtask

  // kernel benchmark: square regions, patch cut from the region
  task automatic benchmark();
    real nssd;
    int  u, v, cu, cv, cycles, scan, n;
    $display("benchmark: iterations  region  kernel cycles  us at %0.0f MHz", CLK_MHZ);
    for (int k = 1; k <= 30; k++) begin
      n = 10 + k;
      for (int i = 0; i < n*n; i++) region[i] = $urandom % 256;
      cu = $urandom % k;
      cv = $urandom % k;
      refp = window(n, cu, cv);
      run(n, n, nssd, u, v, cycles, scan);
      check(u == cu && v == cv, $sformatf("benchmark %0d: found (%0d,%0d), cut at (%0d,%0d)", k*k, u, v, cu, cv));
      check(nssd >= 0.0 && nssd < 1.0e-3, $sformatf("benchmark %0d: nssd %g of an exact copy", k*k, nssd));
      check_rate(k*k, scan, $sformatf("benchmark %0d", k*k));
      $display("benchmark: %10d  %2dx%2d  %13d  %8.2f", k*k, n, n, cycles, real'(cycles) / CLK_MHZ);
    end
  endtask

  // one frame of tracking: 15 features, regions 20..24 pixels across
  task automatic tracking_frame();
    real nssd, gain;
    int  fx, fy, px, py, side, x0, y0, x1, y1, w, h, u, v, cycles, scan, total, off;
    total = 0;
    for (int i = 0; i < FW*FH; i++) frame[i] = $urandom % 256;
    for (int f = 0; f < NFEAT; f++) begin
      // true centre of the feature, away from the frame edge
      fx = 20 + $urandom % (FW - 40);
      fy = 20 + $urandom % (FH - 40);
      // predicted centre, off by up to 4 pixels; box of 20..24 pixels
      px = fx + int'($urandom % 9) - 4;
      py = fy + int'($urandom % 9) - 4;
      side = 20 + $urandom % 5;
      x0 = px - side / 2;
      y0 = py - side / 2;
      x1 = x0 + side;
      y1 = y0 + side;
      if (x0 < 0) x0 = 0;
      if (y0 < 0) y0 = 0;
      if (x1 > FW) x1 = FW;
      if (y1 > FH) y1 = FH;
      w = x1 - x0;
      h = y1 - y0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) region[r*w + c] = frame[(y0 + r)*FW + x0 + c];
      // the stored appearance: same patch, other gain and offset
      gain = 0.5 + 0.05 * ($urandom % 6);
      off  = $urandom % 40;
      for (int r = 0; r < P; r++)
        for (int c = 0; c < P; c++)
          refp[r*P + c] = int'(gain * frame[(fy - P/2 + r)*FW + fx - P/2 + c]) + off;
      run(w, h, nssd, u, v, cycles, scan);
      total += cycles;
      // window corner in the region back to a centre in the frame
      check(x0 + u + P/2 == fx && y0 + v + P/2 == fy,
            $sformatf("feature %0d: found at (%0d,%0d), true (%0d,%0d)", f, x0 + u + P/2, y0 + v + P/2, fx, fy));
      check(nssd >= 0.0 && nssd < 1.0e-2, $sformatf("feature %0d: nssd %g", f, nssd));
      check_rate((w - P + 1) * (h - P + 1), scan, $sformatf("feature %0d", f));
    end
    $display("frame: %0d features, %0d kernel cycles, %0.1f us at %0.0f MHz, %0.2f us per feature",
             NFEAT, total, real'(total) / CLK_MHZ, CLK_MHZ, real'(total) / CLK_MHZ / NFEAT);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    benchmark();
    tracking_frame();
    check(n_read_stall > 0, "no read stall seen");
    check(n_write_stall > 0, "no write stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
