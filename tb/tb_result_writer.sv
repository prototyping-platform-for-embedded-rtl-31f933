// tb_result_writer: checks that the result record lands in global memory
// as three consecutive words (NSSD bits, u, v) at the given base, through
// a memory model that stalls at random, and that the record is the one
// captured at start even if the input changes while the words go out.
module tb_result_writer;
  import nssd_pkg::*;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  match_t result = '0;
  logic [31:0] res_base = '0;
  logic busy, done, avm_write, avm_waitrequest, rdv;
  logic [31:0] avm_address, avm_writedata, rdata;

  result_writer dut (.clk, .rst_n, .start, .result, .res_base, .busy, .done,
    .avm_address, .avm_write, .avm_writedata, .avm_waitrequest);

  gm_model #(.WORDS(256), .LAT(2), .STALL_PCT(50)) u_gm (.clk, .address(avm_address),
    .read(1'b0), .write(avm_write), .writedata(avm_writedata), .waitrequest(avm_waitrequest),
    .readdata(rdata), .readdatavalid(rdv));

  int checks = 0, failures = 0, n_stall = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (avm_write && avm_waitrequest) n_stall++;

  task automatic store(input int base);
    match_t rec;
    int w0;
    rec = '{nssd: $urandom, u: 16'($urandom), v: 16'($urandom)};
    w0 = base >> 2;
    for (int i = -1; i < 4; i++) u_gm.mem[(w0 + i) % 256] = 32'hCAFE_0010 + i;
    @(negedge clk);
    result = rec; res_base = base; start = 1;
    @(negedge clk);
    start = 0;
    result = '1;   // must not matter any more
    while (!done) @(negedge clk);
    check(u_gm.mem[w0] == rec.nssd, "nssd word");
    check(u_gm.mem[w0 + 1] == 32'(rec.u), "u word");
    check(u_gm.mem[w0 + 2] == 32'(rec.v), "v word");
    check(u_gm.mem[w0 + 3] == 32'hCAFE_0013 && u_gm.mem[w0 - 1] == 32'hCAFE_000F, "neighbours untouched");
    check(!busy && !avm_write, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) store(4 + 4 * ($urandom % 200));
    check(n_stall > 0, "no stall seen");
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
