// tb_kernel_csr: checks the control registers: argument write/read-back,
// the one-cycle start pulse (and that start is refused while busy), the
// sticky done flag cleared by a new start, the found bit, and the cycle
// and stall counters of a run.
module tb_kernel_csr;
  import nssd_pkg::*;

  logic clk = 0, rst_n = 1;
  // a real falling edge on the asynchronous reset before the first clock
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic start;
  logic [31:0] ref_base, reg_base, res_base;
  coord_t reg_w, reg_h;
  logic busy = 0, done = 0, found = 0, stall = 0;

  kernel_csr dut (.clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .start, .ref_base, .reg_base, .res_base, .reg_w, .reg_h,
    .busy, .done, .found, .stall);

  int checks = 0, failures = 0, n_start = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (start) n_start++;

  task automatic wr(input int a, input int d);
    @(negedge clk);
    avs_address = 3'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    avs_address = 3'(a); avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  initial begin
    logic [31:0] d;
    int stalls;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(1, 32'h1234_5678); wr(2, 32'h0000_ABC0); wr(3, 32'hFFFF_0004); wr(4, 24); wr(5, 31);
    rd(1, d); check(d == 32'h1234_5678 && ref_base == 32'h1234_5678, "REF_BASE");
    rd(2, d); check(d == 32'h0000_ABC0 && reg_base == 32'h0000_ABC0, "REG_BASE");
    rd(3, d); check(d == 32'hFFFF_0004 && res_base == 32'hFFFF_0004, "RES_BASE");
    rd(4, d); check(d == 24 && reg_w == 24, "REG_W");
    rd(5, d); check(d == 31 && reg_h == 31, "REG_H");
    rd(0, d); check(d == 0, "status idle");
    // start pulse
    wr(0, 1);
    @(negedge clk);
    check(n_start == 1, $sformatf("start pulses %0d", n_start));
    // a run of 100 busy cycles, every third one stalled; the status read,
    // the refused start and its wait add 5 more busy cycles
    stalls = 0;
    busy = 1;
    for (int i = 0; i < 100; i++) begin
      stall = (i % 3 == 0);
      if (stall) stalls++;
      @(negedge clk);
    end
    stall = 0;
    rd(0, d); check(d[0] == 1'b1 && d[1] == 1'b0, "status busy");
    wr(0, 1);
    @(negedge clk);
    check(n_start == 1, "start accepted while busy");
    busy = 0; found = 1; done = 1;
    @(negedge clk);
    done = 0;
    rd(0, d); check(d == 32'b110, $sformatf("status done/found %b", d[2:0]));
    rd(6, d); check(d == 32'd105, $sformatf("cycles %0d", d));
    rd(7, d); check(d == 32'(stalls), $sformatf("stalls %0d expected %0d", d, stalls));
    rd(0, d); check(d[1] == 1'b1, "done is sticky");
    found = 0;
    wr(0, 1);
    @(negedge clk);
    check(n_start == 2, "second start");
    rd(0, d); check(d[1] == 1'b0, "done cleared by start");
    rd(6, d); check(d == 0, "cycles cleared by start");
    wr(0, 0);
    @(negedge clk);
    check(n_start == 2, "write of 0 starts nothing");
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
