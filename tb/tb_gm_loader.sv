// tb_gm_loader: checks the copy of the patch and the region from global
// memory into local memory, through a memory model that stalls at random
// and answers reads several cycles late.
//
// Every written byte lane is collected into two shadow arrays and compared
// with what was put in global memory; bytes beyond the patch or region
// must never be written.  Region sizes include ones whose last word is
// partial.  Stalls must occur and be flagged on the stall output.
module tb_gm_loader;
  import nssd_pkg::*;

  localparam int IDX_W = 16;
  localparam int REF_BASE = 32'h0040;
  localparam int REG_BASE = 32'h0400;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [31:0] reg_bytes = '0;
  logic busy, done, stall;
  logic [31:0] avm_address, avm_readdata;
  logic avm_read, avm_waitrequest, avm_readdatavalid;
  logic wr_ref, wr_reg;
  logic [IDX_W-1:0] wr_idx;
  logic [31:0] wr_data;
  logic [3:0] wr_be;

  gm_loader #(.IDX_W(IDX_W)) dut (.clk, .rst_n, .start, .ref_base(REF_BASE), .reg_base(REG_BASE),
    .reg_bytes, .busy, .done, .stall, .avm_address, .avm_read, .avm_waitrequest,
    .avm_readdata, .avm_readdatavalid, .wr_ref, .wr_reg, .wr_idx, .wr_data, .wr_be);

  gm_model #(.WORDS(1024), .LAT(5), .STALL_PCT(40)) u_gm (.clk, .address(avm_address),
    .read(avm_read), .write(1'b0), .writedata(32'd0), .waitrequest(avm_waitrequest),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  int checks = 0, failures = 0, n_stall = 0, n_stall_flag = 0;
  int got_ref [2048];
  int got_reg [2048];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (avm_read && avm_waitrequest) n_stall++;
    if (stall) n_stall_flag++;
    for (int k = 0; k < 4; k++) if (wr_be[k]) begin
      if (wr_ref) got_ref[int'(wr_idx) + k] = int'(wr_data[8*k +: 8]);
      if (wr_reg) got_reg[int'(wr_idx) + k] = int'(wr_data[8*k +: 8]);
    end
  end

  task automatic load(input int nbytes);
    int bytes_ref [NPIX];
    int bytes_reg [1600];
    int bad;
    for (int i = 0; i < 2048; i++) begin got_ref[i] = -1; got_reg[i] = -1; end
    for (int i = 0; i < 1024; i++) u_gm.mem[i] = $urandom;
    for (int i = 0; i < int'(NPIX); i++) bytes_ref[i] = int'(u_gm.mem[(REF_BASE + i) >> 2][8*((REF_BASE + i) & 3) +: 8]);
    for (int i = 0; i < nbytes; i++) bytes_reg[i] = int'(u_gm.mem[(REG_BASE + i) >> 2][8*((REG_BASE + i) & 3) +: 8]);
    @(negedge clk);
    reg_bytes = nbytes; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    bad = 0;
    for (int i = 0; i < int'(NPIX); i++) if (got_ref[i] != bytes_ref[i]) bad++;
    check(bad == 0, $sformatf("%0d patch bytes wrong", bad));
    check(got_ref[NPIX] == -1 && got_ref[NPIX + 1] == -1, "patch overrun");
    bad = 0;
    for (int i = 0; i < nbytes; i++) if (got_reg[i] != bytes_reg[i]) bad++;
    check(bad == 0, $sformatf("%0d of %0d region bytes wrong", bad, nbytes));
    check(got_reg[nbytes] == -1, $sformatf("region overrun at %0d", nbytes));
    check(!busy && !avm_read, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(24 * 24);
    load(21 * 23);
    load(40 * 40);
    load(13 * 11);
    load(0);
    check(n_stall > 0, "no stall seen");
    check(n_stall_flag == n_stall, "stall output mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
