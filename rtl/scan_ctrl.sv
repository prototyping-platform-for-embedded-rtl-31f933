// scan_ctrl: walks the reference patch over every window of the search
// region.
//
// This is the caller loop of the correlation (the window search): for each
// window position (u, v), top-left pixel in region coordinates, v outer and
// u inner, the PATCH lines of the window are fetched one per cycle from the
// two local memories: line r of the reference patch and line v+r, columns
// u..u+PATCH-1, of the region.  The loop never pauses between windows, so a
// region of W x H pixels takes (W-PATCH+1)*(H-PATCH+1)*PATCH cycles.
//
// Interface and timing:
//   start (one cycle, while idle) latches reg_w/reg_h and begins the scan;
//   busy stays high until the last line has been requested, then done
//   pulses for one cycle.  A region smaller than the patch in either
//   direction has no window: done pulses on the cycle after start.
//   num_windows is the window count of the current/last scan.
//   ref_rd_idx/reg_rd_idx with rd_en address the two memories; the
//   line_* outputs are delayed by one cycle to line up with the memories'
//   read data and drive the sums unit directly.
// Scan order and the top-left coordinate convention are this design's
// choices.
module scan_ctrl
  import nssd_pkg::*;
#(
  parameter int unsigned MAX_REGION = 40,
  parameter int unsigned REF_IDX_W  = $clog2(NPIX + 1),
  parameter int unsigned REG_IDX_W  = $clog2(MAX_REGION * MAX_REGION + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  coord_t                reg_w,
  input  coord_t                reg_h,
  output logic                  busy,
  output logic                  done,
  output logic [31:0]           num_windows,
  output logic                  rd_en,
  output logic [REF_IDX_W-1:0]  ref_rd_idx,
  output logic [REG_IDX_W-1:0]  reg_rd_idx,
  output logic                  line_valid,
  output logic                  line_first,
  output logic                  line_last,
  output coord_t                line_u,
  output coord_t                line_v
);

  coord_t w_q, h_q, u, v;
  logic [$clog2(PATCH)-1:0] r;
  logic last_u, last_v, last_r;

  assign last_r = (r == ($clog2(PATCH))'(PATCH - 1));
  assign last_u = (u == coord_t'(w_q - coord_t'(PATCH)));
  assign last_v = (v == coord_t'(h_q - coord_t'(PATCH)));

  assign rd_en      = busy;
  assign ref_rd_idx = REF_IDX_W'(int'(r) * int'(PATCH));
  assign reg_rd_idx = REG_IDX_W'((int'(v) + int'(r)) * int'(w_q) + int'(u));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      num_windows <= '0;
      w_q         <= '0;
      h_q         <= '0;
      u           <= '0;
      v           <= '0;
      r           <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          w_q <= reg_w;
          h_q <= reg_h;
          u   <= '0;
          v   <= '0;
          r   <= '0;
          if (reg_w >= coord_t'(PATCH) && reg_h >= coord_t'(PATCH)) begin
            busy        <= 1'b1;
            num_windows <= (32'(reg_w) - 32'(PATCH) + 32'd1) * (32'(reg_h) - 32'(PATCH) + 32'd1);
          end else begin
            done        <= 1'b1;
            num_windows <= '0;
          end
        end
      end else begin
        if (!last_r) begin
          r <= r + 1'b1;
        end else begin
          r <= '0;
          if (!last_u) begin
            u <= u + 1'b1;
          end else begin
            u <= '0;
            if (!last_v) begin
              v <= v + 1'b1;
            end else begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end

  // align the line controls with the one-cycle read latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_valid <= 1'b0;
      line_first <= 1'b0;
      line_last  <= 1'b0;
      line_u     <= '0;
      line_v     <= '0;
    end else begin
      line_valid <= busy;
      line_first <= busy && (r == '0);
      line_last  <= busy && last_r;
      line_u     <= u;
      line_v     <= v;
    end
  end

endmodule
