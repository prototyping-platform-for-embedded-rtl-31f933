// gm_loader: copies the reference patch and the search region from global
// memory into the two local memories before a search.
//
// Instead of passing two patches per correlation, the host places the whole
// reference patch and the whole search region in global memory once, and
// this block streams them on chip.  It is a pipelined read master on a
// 32-bit Avalon-MM style port: it keeps issuing word reads while the
// memory accepts them (waitrequest low) and writes each returned word, four
// pixels, into the local memory selected by the phase (patch first, then
// region).  Reads return in order, so a running byte index is enough to
// place them.  The last word of each phase is written with only its valid
// byte lanes.
//
// Interface and timing:
//   start (one cycle, while idle) with ref_base, reg_base (byte addresses,
//   word aligned) and reg_bytes (W*H) begins the copy; busy is high until
//   the last word has been written, then done pulses for one cycle.
//   avm_* is the read side of the global-memory master: avm_read and
//   avm_address are held while avm_waitrequest is high; avm_readdatavalid
//   marks returned data, in request order, any number of cycles later.
//   wr_ref/wr_reg with wr_idx, wr_data, wr_be write the local memories;
//   wr_data is avm_readdata itself, written in the cycle it arrives, so
//   the loader adds no buffering between the bus and the local memory.
//   stall pulses on every cycle a read is held off by waitrequest.
// The bus protocol, word width and little-endian byte order are this
// design's choices.
module gm_loader
  import nssd_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned IDX_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] ref_base,
  input  logic [ADDR_W-1:0] reg_base,
  input  logic [31:0]       reg_bytes,
  output logic              busy,
  output logic              done,
  output logic              stall,
  // global memory read master
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_read,
  input  logic              avm_waitrequest,
  input  logic [31:0]       avm_readdata,
  input  logic              avm_readdatavalid,
  // local memory write side
  output logic              wr_ref,
  output logic              wr_reg,
  output logic [IDX_W-1:0]  wr_idx,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_be
);

  typedef enum logic [1:0] {L_IDLE, L_REF, L_REG} phase_e;

  phase_e      req_phase, rsp_phase;
  logic [31:0] req_bytes_left;   // bytes still to request in req_phase
  logic [31:0] rsp_bytes_left;   // bytes still to receive in rsp_phase
  logic [31:0] rsp_idx;
  logic [31:0] reg_total;
  logic [ADDR_W-1:0] reg_base_q;
  logic        accept;

  assign avm_read = (req_phase != L_IDLE);
  assign accept   = avm_read && !avm_waitrequest;
  assign stall    = avm_read && avm_waitrequest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_phase      <= L_IDLE;
      req_bytes_left <= '0;
      avm_address    <= '0;
      reg_base_q     <= '0;
      reg_total      <= '0;
    end else begin
      if (!busy && start) begin
        req_phase      <= L_REF;
        req_bytes_left <= 32'(NPIX);
        avm_address    <= ref_base;
        reg_base_q     <= reg_base;
        reg_total      <= reg_bytes;
      end else if (accept) begin
        if (req_bytes_left > 32'd4) begin
          req_bytes_left <= req_bytes_left - 32'd4;
          avm_address    <= avm_address + ADDR_W'(4);
        end else if (req_phase == L_REF && reg_total != 32'd0) begin
          req_phase      <= L_REG;
          req_bytes_left <= reg_total;
          avm_address    <= reg_base_q;
        end else begin
          req_phase      <= L_IDLE;
        end
      end
    end
  end

  // response side: place returned words
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_phase      <= L_IDLE;
      rsp_bytes_left <= '0;
      rsp_idx        <= '0;
      busy           <= 1'b0;
      done           <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy           <= 1'b1;
        rsp_phase      <= L_REF;
        rsp_bytes_left <= 32'(NPIX);
        rsp_idx        <= '0;
      end else if (busy && avm_readdatavalid) begin
        if (rsp_bytes_left > 32'd4) begin
          rsp_bytes_left <= rsp_bytes_left - 32'd4;
          rsp_idx        <= rsp_idx + 32'd4;
        end else if (rsp_phase == L_REF && reg_total != 32'd0) begin
          rsp_phase      <= L_REG;
          rsp_bytes_left <= reg_total;
          rsp_idx        <= '0;
        end else begin
          rsp_phase <= L_IDLE;
          busy      <= 1'b0;
          done      <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    wr_ref  = busy && avm_readdatavalid && (rsp_phase == L_REF);
    wr_reg  = busy && avm_readdatavalid && (rsp_phase == L_REG);
    wr_idx  = IDX_W'(rsp_idx);
    wr_data = avm_readdata;
    case (rsp_bytes_left)
      32'd1:   wr_be = 4'b0001;
      32'd2:   wr_be = 4'b0011;
      32'd3:   wr_be = 4'b0111;
      default: wr_be = 4'b1111;
    endcase
  end

endmodule
