// tb_nssd_search_kernel: end-to-end test of the search kernel at its
// default parameters, driven the way a host drives it.
//
// For each run the testbench writes an 11x11 reference patch and a W x H
// search region into the global-memory model, programs the argument
// registers, sets start, polls the status register, then reads the 3-word
// result record from global memory.  The expected best window comes from
// a double-precision NSSD of every window.  Runs cover a plain copy of a
// window (exact match), a gain/offset copy, a random patch, a 40x40 region
// (900 windows, the largest evaluated search), a region with flat areas, a
// region too small to hold a window and an all-flat region.  The global
// memory stalls at random, so loads and the result write see waitrequest.
//
// Mechanisms that must occur at least once: read stalls, write stalls,
// best-match updates, flat windows, a region with no window, a last load
// word with fewer than four valid bytes.  Rate: the time from the end of
// the load to the result write must be 11 cycles per window plus a
// constant that is the same for every run.
module tb_nssd_search_kernel;
  import nssd_pkg::*;
  import tb_ref_pkg::*;

  localparam int REF_BASE = 32'h0000;
  localparam int REG_BASE = 32'h0100;
  localparam int RES_BASE = 32'h1000;
  localparam int MAXR     = 40;

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
  int n_read_stall = 0, n_write_stall = 0, n_update = 0, n_flat = 0;
  int n_nowindow = 0, n_partial = 0;
  int cyc = 0, last_rdv = 0, first_wr = -1, scan_const = -1;

  int region [MAXR*MAXR];
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
    if (dut.u_min.updated) n_update++;
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

  // one kernel run; expects the search result to match the reference
  task automatic run(input int w, input int h, input string name);
    logic [31:0] st, cycles, stalls;
    real best, got, at_got, e;
    int  bu, bv, nwin, flat_here;
    for (int i = 0; i < N; i++) put_byte(REF_BASE + i, refp[i]);
    for (int i = 0; i < w*h; i++) put_byte(REG_BASE + i, region[i]);
    for (int i = 0; i < 3; i++) u_gm.mem[(RES_BASE >> 2) + i] = 32'hDEAD_BEEF;
    if ((w*h) % 4 != 0 || N % 4 != 0) n_partial++;
    // reference search
    best = 1.0e300; bu = -1; bv = -1; flat_here = 0;
    nwin = (w >= P && h >= P) ? (w - P + 1) * (h - P + 1) : 0;
    if (nwin == 0) n_nowindow++;
    for (int v = 0; v + P <= h; v++)
      for (int u = 0; u + P <= w; u++) begin
        e = nssd_ref(refp, window(w, u, v));
        if (e < 0.0) flat_here++;
        else if (e < best) begin best = e; bu = u; bv = v; end
      end
    n_flat += flat_here;
    // program and start
    csr_write(1, REF_BASE);
    csr_write(2, REG_BASE);
    csr_write(3, RES_BASE);
    csr_write(4, w);
    csr_write(5, h);
    first_wr = -1;
    csr_write(0, 1);
    do csr_read(0, st); while (st[1] == 1'b0);
    check(irq == 1'b1, {name, ": irq"});
    check(st[0] == 1'b0, {name, ": busy after done"});
    csr_read(6, cycles);
    csr_read(7, stalls);
    check(cycles >= 32'(nwin * P), $sformatf("%s: cycles %0d", name, cycles));
    // rate: load end to result write
    if (nwin > 0) begin
      if (scan_const < 0) scan_const = first_wr - last_rdv - nwin * P;
      check(first_wr - last_rdv - nwin * P == scan_const && scan_const < 32,
            $sformatf("%s: scan took %0d cycles for %0d windows", name, first_wr - last_rdv, nwin));
    end
    got = f2r(u_gm.mem[RES_BASE >> 2]);
    if (bu < 0) begin
      check(st[2] == 1'b0, {name, ": found set"});
      check(is_inf(u_gm.mem[RES_BASE >> 2]), {name, ": nssd not +inf"});
    end else begin
      check(st[2] == 1'b1, {name, ": found clear"});
      check(fabs(got - best) <= 1.0e-2 + 1.0e-3 * best,
            $sformatf("%s: nssd %f expected %f", name, got, best));
      at_got = nssd_ref(refp, window(w, int'(u_gm.mem[(RES_BASE >> 2) + 1]), int'(u_gm.mem[(RES_BASE >> 2) + 2])));
      check(at_got >= 0.0 && at_got <= best + 1.0e-2 + 1.0e-3 * best,
            $sformatf("%s: window (%0d,%0d) scores %f, best (%0d,%0d) %f", name,
                      u_gm.mem[(RES_BASE >> 2) + 1], u_gm.mem[(RES_BASE >> 2) + 2], at_got, bu, bv, best));
    end
    $display("%s: %0dx%0d, %0d windows, best (%0d,%0d) %g, got %g, %0d cycles, %0d stalls",
             name, w, h, nwin, bu, bv, best, got, cycles, stalls);
  endtask

  task automatic random_region(input int w, input int h);
    for (int i = 0; i < w*h; i++) region[i] = $urandom % 256;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: exact copy of a window of a typical 24x24 region
    random_region(24, 24);
    refp = window(24, 7, 9);
    run(24, 24, "copy");
    check(u_gm.mem[(RES_BASE >> 2) + 1] == 7 && u_gm.mem[(RES_BASE >> 2) + 2] == 9, "copy: position");
    // 2: gain/offset copy in the largest region
    random_region(40, 40);
    refp = window(40, 25, 3);
    for (int i = 0; i < N; i++) refp[i] = refp[i] / 2 + 60;
    run(40, 40, "affine");
    check(u_gm.mem[(RES_BASE >> 2) + 1] == 25 && u_gm.mem[(RES_BASE >> 2) + 2] == 3, "affine: position");
    // 3: random patch, odd region size (partial last word)
    random_region(21, 23);
    for (int i = 0; i < N; i++) refp[i] = $urandom % 256;
    run(21, 23, "random");
    // 4: region with a flat block
    random_region(22, 20);
    for (int r = 0; r < 14; r++) for (int c = 0; c < 13; c++) region[(r + 3)*22 + c + 4] = 77;
    refp = window(22, 10, 8);
    for (int i = 0; i < N; i++) refp[i] = (i * 37) % 256;
    run(22, 20, "flat-block");
    // 5: region smaller than a patch
    random_region(10, 30);
    run(10, 30, "no-window");
    // 6: all-flat region
    for (int i = 0; i < 144; i++) region[i] = 5;
    run(12, 12, "all-flat");
    // mechanisms
    check(n_read_stall > 0, "no read stall seen");
    check(n_write_stall > 0, "no write stall seen");
    check(n_update > 0, "no best-match update seen");
    check(n_flat > 0, "no flat window seen");
    check(n_nowindow > 0, "no empty region seen");
    check(n_partial > 0, "no partial last word seen");
    $display("mechanisms: read_stall=%0d write_stall=%0d update=%0d flat=%0d no_window=%0d partial=%0d",
             n_read_stall, n_write_stall, n_update, n_flat, n_nowindow, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
