// sums_unit: the five integer sums of one candidate window, one line per
// cycle.
//
// For a reference patch f and a candidate window t the NSSD needs
//   Sf = sum f, St = sum t, Sf2 = sum f^2, St2 = sum t^2, Sft = sum f*t.
// The line loop is fully unrolled: each valid cycle takes one line of PATCH
// reference pixels and PATCH candidate pixels, forms the five line sums with
// PATCH multipliers per product and adder trees, and adds them into the
// running sums.  Accepting a new line every cycle gives an initiation
// interval of 1, so a PATCH x PATCH window takes PATCH cycles and the next
// window follows without a gap.
//
// Interface and timing:
//   in_valid, in_first (first line of a window, restarts the sums),
//   in_last (last line), in_f/in_t (the line's pixels), in_u/in_v (window
//   coordinates, taken with the last line).
//   out_valid pulses for one cycle, one cycle after the last line, with
//   out_sums, out_u and out_v.  Reset clears out_valid only.
// The sums are exact integers, as in the kernel this follows.
module sums_unit
  import nssd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  pixel_t [PATCH-1:0] in_f,
  input  pixel_t [PATCH-1:0] in_t,
  input  coord_t             in_u,
  input  coord_t             in_v,
  output logic               out_valid,
  output sums_t              out_sums,
  output coord_t             out_u,
  output coord_t             out_v
);

  sums_t line, acc, acc_q;

  // line sums: the unrolled inner loop
  always_comb begin
    line = '0;
    for (int k = 0; k < int'(PATCH); k++) begin
      line.sf  = line.sf  + SUM1_W'(in_f[k]);
      line.st  = line.st  + SUM1_W'(in_t[k]);
      line.sf2 = line.sf2 + SUM2_W'(in_f[k]) * SUM2_W'(in_f[k]);
      line.st2 = line.st2 + SUM2_W'(in_t[k]) * SUM2_W'(in_t[k]);
      line.sft = line.sft + SUM2_W'(in_f[k]) * SUM2_W'(in_t[k]);
    end
  end

  always_comb begin
    if (in_first) begin
      acc = line;
    end else begin
      acc.sf  = acc_q.sf  + line.sf;
      acc.st  = acc_q.st  + line.st;
      acc.sf2 = acc_q.sf2 + line.sf2;
      acc.st2 = acc_q.st2 + line.st2;
      acc.sft = acc_q.sft + line.sft;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) acc_q <= acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sums  <= '0;
      out_u     <= '0;
      out_v     <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid && in_last) begin
        out_sums <= acc;
        out_u    <= in_u;
        out_v    <= in_v;
      end
    end
  end

endmodule
