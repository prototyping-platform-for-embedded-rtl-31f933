// min_tracker: keeps the best (smallest-NSSD) window seen in a search.
//
// Each scored window is compared with the stored best; if its NSSD is
// strictly smaller it replaces it, so among equal scores the first window
// in scan order wins, as in the sequential search loop the kernel replaces.
// The stored record (NSSD, u, v) is the result structure that is written
// back to global memory at the end of the search, kept on chip while the
// search runs so that no store to global memory happens per window.
//
// Interface and timing:
//   clear (one cycle) sets the best NSSD to +infinity and drops found.
//   in_valid with in_nssd/in_u/in_v offers one window; best and found
//   update on the same clock edge.  updated pulses one cycle after a window
//   that replaced the best.
// The +infinity start value is this design's choice: any finite score
// becomes the first best, and a search whose windows are all flat leaves
// found low.
module min_tracker
  import nssd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  fp32_t  in_nssd,
  input  coord_t in_u,
  input  coord_t in_v,
  output match_t best,
  output logic   found,
  output logic   updated
);

  logic better;
  assign better = in_valid && fp_lt(in_nssd, best.nssd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best    <= '{nssd: FP_PINF, u: '0, v: '0};
      found   <= 1'b0;
      updated <= 1'b0;
    end else if (clear) begin
      best    <= '{nssd: FP_PINF, u: '0, v: '0};
      found   <= 1'b0;
      updated <= 1'b0;
    end else begin
      updated <= better;
      if (better) begin
        best  <= '{nssd: in_nssd, u: in_u, v: in_v};
        found <= 1'b1;
      end
    end
  end

endmodule
