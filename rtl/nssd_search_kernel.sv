// nssd_search_kernel: FPGA accelerator for the feature-matching search of a
// monocular EKF-SLAM.
//
// Given an 11x11 reference patch of a tracked feature and a search region
// of the new camera frame, the kernel scores every 11x11 window of the
// region with the NSSD (normalised sum of squared differences) and returns
// the best-scoring window.  One run:
//   1. LOAD   gm_loader copies the patch and the region from global memory
//             into two local memories (a cache, so the scan never stalls on
//             DRAM);
//   2. SCAN   scan_ctrl steps through the windows, one window line per
//             cycle; sums_unit forms the five integer sums (11 pixels per
//             cycle), nssd_unit turns them into a float NSSD (one division
//             per window) and min_tracker keeps the smallest;
//   3. WRITE  result_writer stores {NSSD, u, v} in global memory.
// The scan of a W x H region costs PATCH cycles per window,
// (W-10)*(H-10)*11 cycles, plus a fixed pipeline drain.
//
// Ports: clk, rst_n (asynchronous, active low); avs_* is the 32-bit control
// slave (register map in kernel_csr); avm_* is the 32-bit global-memory
// master shared by the loader (reads) and the result writer (writes); irq
// is high while the done flag is set.
// MAX_REGION, the largest region side the local memory holds, is 40: the
// largest evaluated search scans 900 windows, a 30x30 grid of positions.
// Regions larger than MAX_REGION*MAX_REGION pixels are not supported.
// The phase sequencing, bus protocols and register map are this design's
// own; the datapath follows the reference kernel.
module nssd_search_kernel
  import nssd_pkg::*;
#(
  parameter int unsigned MAX_REGION = 40,
  parameter int unsigned ADDR_W     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // control slave
  input  logic [2:0]        avs_address,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  input  logic              avs_read,
  output logic [31:0]       avs_readdata,
  output logic              irq,
  // global memory master
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_read,
  output logic              avm_write,
  output logic [31:0]       avm_writedata,
  input  logic              avm_waitrequest,
  input  logic [31:0]       avm_readdata,
  input  logic              avm_readdatavalid
);

  localparam int unsigned REG_DEPTH = MAX_REGION * MAX_REGION;
  localparam int unsigned REG_IDX_W = $clog2(REG_DEPTH + 1);
  localparam int unsigned REF_IDX_W = $clog2(NPIX + 1);
  localparam int unsigned LD_IDX_W  = (REG_IDX_W > REF_IDX_W) ? REG_IDX_W : REF_IDX_W;

  typedef enum logic [1:0] {K_IDLE, K_LOAD, K_SCAN, K_WRITE} kstate_e;
  kstate_e state;

  // control registers
  logic              start;
  logic [ADDR_W-1:0] ref_base, reg_base, res_base;
  coord_t            reg_w, reg_h;
  logic              busy, kdone;

  // loader
  logic                ld_start, ld_busy, ld_done, ld_stall;
  logic [ADDR_W-1:0]   ld_address;
  logic                ld_read;
  logic                wr_ref, wr_reg;
  logic [LD_IDX_W-1:0] wr_idx;
  logic [31:0]         wr_data;
  logic [3:0]          wr_be;

  // scan
  logic                 sc_start, sc_busy, sc_done, sc_seen_done;
  logic [31:0]          num_windows, scored;
  logic                 rd_en;
  logic [REF_IDX_W-1:0] ref_rd_idx;
  logic [REG_IDX_W-1:0] reg_rd_idx;
  logic                 line_valid, line_first, line_last;
  coord_t               line_u, line_v;
  pixel_t [PATCH-1:0]   ref_line, reg_line;

  sums_t  sums;
  logic   sums_valid;
  coord_t sums_u, sums_v;

  logic   n_valid;
  fp32_t  n_nssd;
  coord_t n_u, n_v;

  match_t best;
  logic   found;

  // writer
  logic              wb_start, wb_busy, wb_done, wb_write;
  logic [ADDR_W-1:0] wb_address;
  logic [31:0]       wb_writedata;

  assign busy = (state != K_IDLE);

  kernel_csr #(.ADDR_W(ADDR_W)) u_csr (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
    .start, .ref_base, .reg_base, .res_base, .reg_w, .reg_h,
    .busy, .done(kdone), .found, .stall(ld_stall)
  );

  gm_loader #(.ADDR_W(ADDR_W), .IDX_W(LD_IDX_W)) u_loader (
    .clk, .rst_n,
    .start(ld_start), .ref_base, .reg_base,
    .reg_bytes(32'(reg_w) * 32'(reg_h)),
    .busy(ld_busy), .done(ld_done), .stall(ld_stall),
    .avm_address(ld_address), .avm_read(ld_read),
    .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .wr_ref, .wr_reg, .wr_idx, .wr_data, .wr_be
  );

  local_mem #(.DEPTH(NPIX), .IDX_W(REF_IDX_W)) u_ref_mem (
    .clk,
    .wr_en(wr_ref), .wr_idx(REF_IDX_W'(wr_idx)), .wr_data, .wr_be,
    .rd_en, .rd_idx(ref_rd_idx), .rd_data(ref_line)
  );

  local_mem #(.DEPTH(REG_DEPTH), .IDX_W(REG_IDX_W)) u_reg_mem (
    .clk,
    .wr_en(wr_reg), .wr_idx(REG_IDX_W'(wr_idx)), .wr_data, .wr_be,
    .rd_en, .rd_idx(reg_rd_idx), .rd_data(reg_line)
  );

  scan_ctrl #(.MAX_REGION(MAX_REGION), .REF_IDX_W(REF_IDX_W), .REG_IDX_W(REG_IDX_W)) u_scan (
    .clk, .rst_n,
    .start(sc_start), .reg_w, .reg_h,
    .busy(sc_busy), .done(sc_done), .num_windows,
    .rd_en, .ref_rd_idx, .reg_rd_idx,
    .line_valid, .line_first, .line_last, .line_u, .line_v
  );

  sums_unit u_sums (
    .clk, .rst_n,
    .in_valid(line_valid), .in_first(line_first), .in_last(line_last),
    .in_f(ref_line), .in_t(reg_line), .in_u(line_u), .in_v(line_v),
    .out_valid(sums_valid), .out_sums(sums), .out_u(sums_u), .out_v(sums_v)
  );

  nssd_unit u_nssd (
    .clk, .rst_n,
    .in_valid(sums_valid), .in_sums(sums), .in_u(sums_u), .in_v(sums_v),
    .out_valid(n_valid), .out_nssd(n_nssd), .out_u(n_u), .out_v(n_v)
  );

  min_tracker u_min (
    .clk, .rst_n,
    .clear(sc_start), .in_valid(n_valid), .in_nssd(n_nssd), .in_u(n_u), .in_v(n_v),
    .best, .found, .updated()
  );

  result_writer #(.ADDR_W(ADDR_W)) u_writer (
    .clk, .rst_n,
    .start(wb_start), .result(best), .res_base,
    .busy(wb_busy), .done(wb_done),
    .avm_address(wb_address), .avm_write(wb_write), .avm_writedata(wb_writedata),
    .avm_waitrequest
  );

  // phase sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= K_IDLE;
      ld_start     <= 1'b0;
      sc_start     <= 1'b0;
      wb_start     <= 1'b0;
      kdone        <= 1'b0;
      sc_seen_done <= 1'b0;
      scored       <= '0;
      irq          <= 1'b0;
    end else begin
      ld_start <= 1'b0;
      sc_start <= 1'b0;
      wb_start <= 1'b0;
      kdone    <= 1'b0;
      if (n_valid) scored <= scored + 32'd1;
      case (state)
        K_IDLE: if (start) begin
          state    <= K_LOAD;
          ld_start <= 1'b1;
          irq      <= 1'b0;
        end
        K_LOAD: if (ld_done) begin
          state        <= K_SCAN;
          sc_start     <= 1'b1;
          sc_seen_done <= 1'b0;
          scored       <= '0;
        end
        K_SCAN: begin
          if (sc_done) sc_seen_done <= 1'b1;
          if (sc_seen_done && scored == num_windows && !wb_busy && !wb_start) begin
            state    <= K_WRITE;
            wb_start <= 1'b1;
          end
        end
        K_WRITE: if (wb_done) begin
          state <= K_IDLE;
          kdone <= 1'b1;
          irq   <= 1'b1;
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  // one master port: reads while loading, writes while storing the result
  assign avm_read      = ld_read;
  assign avm_write     = wb_write;
  assign avm_address   = wb_busy ? wb_address : ld_address;
  assign avm_writedata = wb_writedata;

  // the two phases never overlap on the bus
  assert property (@(posedge clk) disable iff (!rst_n) !(avm_read && avm_write));
  // loading and scanning are strictly sequential
  assert property (@(posedge clk) disable iff (!rst_n) !(ld_busy && sc_busy));

endmodule
