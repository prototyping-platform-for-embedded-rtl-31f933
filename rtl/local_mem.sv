// local_mem: on-chip pixel cache for the reference patch or the search
// region.
//
// The kernel copies its inputs out of global (DRAM) memory once, into local
// memory, so that the unrolled line loop can read stall-free.  Each cycle the
// read port returns PATCH consecutive pixels starting at byte index rd_idx,
// which is one line of the candidate window; the compiler of the original
// kernel met these PATCH simultaneous loads by replicating the RAM, here the
// store is a plain byte array with a PATCH-wide read port and the synthesis
// tool decides how to bank it.
//
// Interface and timing:
//   wr_en/wr_idx/wr_data/wr_be : writes up to four bytes per cycle at
//     byte indices wr_idx..wr_idx+3 (byte lane k -> wr_idx+k), lane k only
//     if wr_be[k]; bytes past DEPTH are dropped.
//   rd_en/rd_idx -> rd_data : one cycle later rd_data[k] holds byte
//     rd_idx+k (zero past DEPTH).  rd_data keeps its value while rd_en is low.
// The four-byte write width matches a 32-bit global-memory word and is this
// design's choice.
module local_mem
  import nssd_pkg::*;
#(
  parameter int unsigned DEPTH = 1600,
  parameter int unsigned IDX_W = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [IDX_W-1:0]     wr_idx,
  input  logic [31:0]          wr_data,
  input  logic [3:0]           wr_be,
  input  logic                 rd_en,
  input  logic [IDX_W-1:0]     rd_idx,
  output pixel_t [PATCH-1:0]   rd_data
);

  pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int k = 0; k < 4; k++) begin
        if (wr_be[k] && (int'(wr_idx) + k < int'(DEPTH)))
          mem[int'(wr_idx) + k] <= wr_data[8*k +: 8];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int k = 0; k < int'(PATCH); k++) begin
        if (int'(rd_idx) + k < int'(DEPTH)) rd_data[k] <= mem[int'(rd_idx) + k];
        else                                rd_data[k] <= '0;
      end
    end
  end

endmodule
