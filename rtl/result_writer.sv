// result_writer: stores the search result structure in global memory.
//
// At the end of a search the best-match record is written back in one
// short burst of consecutive words, so the host reads one small array
// instead of separate scalar results:
//   res_base + 0 : NSSD of the best window (IEEE-754 single; +infinity if
//                  no window could be scored)
//   res_base + 4 : u of the best window (top-left column in the region)
//   res_base + 8 : v of the best window (top-left row in the region)
// The record is captured at start, so the tracker may be cleared while the
// words go out.
//
// Interface and timing:
//   start (one cycle, while idle) with result and res_base; busy until the
//   third word is accepted, then done pulses for one cycle.
//   avm_write/avm_address/avm_writedata are held while avm_waitrequest is
//   high; one word is accepted per cycle without waitrequest.
// The word layout and bus protocol are this design's choices.
module result_writer
  import nssd_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  match_t            result,
  input  logic [ADDR_W-1:0] res_base,
  output logic              busy,
  output logic              done,
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_write,
  output logic [31:0]       avm_writedata,
  input  logic              avm_waitrequest
);

  match_t      rec;
  logic [1:0]  word;

  assign avm_write = busy;

  always_comb begin
    case (word)
      2'd0:    avm_writedata = rec.nssd;
      2'd1:    avm_writedata = 32'(rec.u);
      default: avm_writedata = 32'(rec.v);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      word        <= '0;
      rec         <= '0;
      avm_address <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy        <= 1'b1;
          word        <= '0;
          rec         <= result;
          avm_address <= res_base;
        end
      end else if (!avm_waitrequest) begin
        if (word == 2'd2) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          word        <= word + 1'b1;
          avm_address <= avm_address + ADDR_W'(4);
        end
      end
    end
  end

endmodule
