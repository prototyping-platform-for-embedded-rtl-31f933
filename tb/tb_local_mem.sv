// tb_local_mem: checks the pixel cache: byte-masked four-byte writes and
// the one-cycle, 11-pixel line reads at any byte index, including reads
// that run past the end (zero fill) and holding rd_data while rd_en is low.
module tb_local_mem;
  import nssd_pkg::*;

  localparam int DEPTH = 1600;
  localparam int IDX_W = $clog2(DEPTH + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  logic               wr_en = 0, rd_en = 0;
  logic [IDX_W-1:0]   wr_idx = '0, rd_idx = '0;
  logic [31:0]        wr_data = '0;
  logic [3:0]         wr_be = '0;
  pixel_t [PATCH-1:0] rd_data;

  local_mem #(.DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_idx, .wr_data, .wr_be,
                                  .rd_en, .rd_idx, .rd_data);

  int checks = 0, failures = 0;
  int model [DEPTH];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write_word(input int idx, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk);
    wr_en = 1; wr_idx = IDX_W'(idx); wr_data = d; wr_be = be;
    for (int k = 0; k < 4; k++) if (be[k] && idx + k < DEPTH) model[idx + k] = int'(d[8*k +: 8]);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read_line(input int idx);
    pixel_t [PATCH-1:0] hold;
    @(negedge clk);
    rd_en = 1; rd_idx = IDX_W'(idx);
    @(negedge clk);
    rd_en = 0;
    for (int k = 0; k < int'(PATCH); k++)
      check(int'(rd_data[k]) == ((idx + k < DEPTH) ? model[idx + k] : 0),
            $sformatf("idx %0d+%0d got %0d", idx, k, rd_data[k]));
    hold = rd_data;
    rd_idx = IDX_W'(0);
    @(negedge clk);
    check(rd_data == hold, "rd_data not held");
  endtask

  initial begin
    // fill the whole memory with full words
    for (int i = 0; i < DEPTH; i += 4) write_word(i, $urandom, 4'hF);
    // masked overwrites
    for (int n = 0; n < 50; n++) write_word(($urandom % (DEPTH / 4)) * 4, $urandom, 4'($urandom));
    // writes that run past the end
    write_word(DEPTH - 2, 32'hA1B2C3D4, 4'hF);
    for (int n = 0; n < 100; n++) read_line($urandom % DEPTH);
    read_line(DEPTH - 5);
    read_line(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
