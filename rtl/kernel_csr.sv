// kernel_csr: argument and control registers of the search kernel.
//
// The host starts the kernel over the 32-bit lightweight control bridge:
// it writes the scalar kernel arguments one register at a time, then sets
// the start bit, and polls the status register until done.  Two counters
// report the last run for profiling: total kernel cycles and the cycles
// the global-memory reads were stalled.
//
// Register map (word index on avs_address):
//   0 CTRL/STATUS  write: bit0 = start (ignored while busy)
//                  read:  bit0 busy, bit1 done (sticky, cleared by start),
//                         bit2 found (a finite best score exists)
//   1 REF_BASE     byte address of the 11x11 reference patch
//   2 REG_BASE     byte address of the search region (row-major)
//   3 RES_BASE     byte address of the 3-word result record
//   4 REG_W        search region width in pixels
//   5 REG_H        search region height in pixels
//   6 CYCLES       read-only, cycles from start to done of the last run
//   7 STALLS       read-only, global-memory read stall cycles of last run
// Timing: writes take effect on the clock edge; avs_readdata is valid the
// cycle after avs_read (fixed read latency of one).  start pulses for one
// cycle after the control write.
// The register map and the counters are this design's choices.
module kernel_csr
  import nssd_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // control slave
  input  logic [2:0]        avs_address,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  input  logic              avs_read,
  output logic [31:0]       avs_readdata,
  // to the kernel
  output logic              start,
  output logic [ADDR_W-1:0] ref_base,
  output logic [ADDR_W-1:0] reg_base,
  output logic [ADDR_W-1:0] res_base,
  output coord_t            reg_w,
  output coord_t            reg_h,
  input  logic              busy,
  input  logic              done,
  input  logic              found,
  input  logic              stall
);

  logic        done_flag;
  logic [31:0] cycles, stalls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      ref_base  <= '0;
      reg_base  <= '0;
      res_base  <= '0;
      reg_w     <= '0;
      reg_h     <= '0;
      done_flag <= 1'b0;
      cycles    <= '0;
      stalls    <= '0;
    end else begin
      start <= 1'b0;
      if (avs_write) begin
        case (avs_address)
          3'd0: if (avs_writedata[0] && !busy && !start) begin
                  start     <= 1'b1;
                  done_flag <= 1'b0;
                  cycles    <= '0;
                  stalls    <= '0;
                end
          3'd1: ref_base <= ADDR_W'(avs_writedata);
          3'd2: reg_base <= ADDR_W'(avs_writedata);
          3'd3: res_base <= ADDR_W'(avs_writedata);
          3'd4: reg_w    <= coord_t'(avs_writedata);
          3'd5: reg_h    <= coord_t'(avs_writedata);
          default: ;
        endcase
      end
      if (done) done_flag <= 1'b1;
      if (busy) begin
        cycles <= cycles + 32'd1;
        if (stall) stalls <= stalls + 32'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata <= '0;
    end else if (avs_read) begin
      case (avs_address)
        3'd0:    avs_readdata <= {29'd0, found, done_flag, busy};
        3'd1:    avs_readdata <= 32'(ref_base);
        3'd2:    avs_readdata <= 32'(reg_base);
        3'd3:    avs_readdata <= 32'(res_base);
        3'd4:    avs_readdata <= 32'(reg_w);
        3'd5:    avs_readdata <= 32'(reg_h);
        3'd6:    avs_readdata <= cycles;
        default: avs_readdata <= stalls;
      endcase
    end
  end

endmodule
