// gm_model: behavioural model of the global memory seen by the kernel's
// master port (the DDR3 behind the HPS bridge), for simulation only.
//
// A word-addressed array of WORDS 32-bit words, reached by byte address
// (bits [1:0] ignored).  Reads are pipelined: an accepted read returns its
// word LAT cycles later with readdatavalid, in order.  Writes complete when
// accepted.  When STALL_PCT is non-zero, waitrequest is raised at random on
// that share of cycles, so the master sees back-pressure.  Counters:
// stall_cycles (requests held off), reads, writes.
module gm_model #(
  parameter int WORDS     = 1024,
  parameter int LAT       = 3,
  parameter int STALL_PCT = 30
) (
  input  logic        clk,
  input  logic [31:0] address,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic        waitrequest,
  output logic [31:0] readdata,
  output logic        readdatavalid
);

  logic [31:0] mem [WORDS];
  logic [31:0] pipe_d [LAT];
  logic        pipe_v [LAT];
  int stall_cycles = 0;
  int reads = 0;
  int writes = 0;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
    waitrequest = 1'b0;
  end

  always @(posedge clk) begin
    if ((read || write) && waitrequest) stall_cycles++;
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= read && !waitrequest;
    pipe_d[0] <= mem[(address >> 2) % WORDS];
    if (read && !waitrequest) reads++;
    if (write && !waitrequest) begin
      mem[(address >> 2) % WORDS] <= writedata;
      writes++;
    end
    waitrequest <= (STALL_PCT > 0) && (($urandom % 100) < STALL_PCT);
  end

  assign readdata      = pipe_d[LAT-1];
  assign readdatavalid = pipe_v[LAT-1];

endmodule
