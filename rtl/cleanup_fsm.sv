// cleanup_fsm: background engine that recycles sequence numbers (SNs).
//
// SNs carry a 2-bit cycle number y.  New SNs are handed out from the next
// cycle cy+1; Cleanup walks every cache line once per cycle.  For a line of
// TIs whose SN is from the last cycle (cy-1) it first relabels the line
// with cy, then looks up the line's real page through RT: if the TLB entry
// still owns the page, is hot and carries the same count n (from cycle cy or
// cy-1), the line is still valid and keeps its SN, and a TLB SN still in
// cycle cy-1 is moved to cy; otherwise the line's count is zapped to 0 (no
// hot TLB entry ever has n = 0).  After the last line it starts a new cycle
// (cy := cy+1 and nMax := 1 in the TLB), so the SNs of the finished last
// cycle can be handed out again.
// One line per clock, and only in clocks where the cache grants access (it
// is idle); a line that needs a TLB update also waits for the TLB.
// The cache-line count is a parameter; the scan order (line 0 upward) and
// running whenever the cache is idle are this design's choices.
module cleanup_fsm
  import vor_pkg::*;
#(
  parameter int unsigned NLINES = 4096,
  parameter int unsigned TLB_IW = 10,
  localparam int unsigned LIW   = $clog2(NLINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [1:0]         cy,
  // cache
  input  logic               cl_grant,
  output logic [LIW-1:0]     cl_li,
  input  logic               cl_flag,
  input  logic [RA_W-1:0]    cl_ra,
  input  sn_t                cl_sn,
  output logic               cl_we,
  output sn_t                cl_sn_w,
  // TLB
  output logic [RPAGE_W-1:0] pr_rpage,
  input  logic               pr_valid,
  input  logic               pr_hot,
  input  sn_t                pr_sn,
  input  logic [TLB_IW-1:0]  pr_idx,
  output logic               cb_valid,
  output logic [TLB_IW-1:0]  cb_idx,
  input  logic               cb_ready,
  output logic               nc_valid,
  input  logic               nc_ready,
  // events
  output logic               ev_keep,
  output logic               ev_zap,
  output logic               ev_cycle
);
  typedef enum logic {S_SCAN, S_NEWCYC} state_t;
  state_t state;
  logic [LIW-1:0] li;

  logic [1:0] cy_last;
  assign cy_last = cy - 2'd1;

  logic need, still_valid, need_bump, step;
  assign cl_li       = li;
  assign pr_rpage    = cl_ra[RA_W-1:PAGE_BITS];
  assign need        = cl_flag && (cl_sn.y == cy_last);
  assign still_valid = pr_valid && pr_hot && (pr_sn.n == cl_sn.n) &&
                       ((pr_sn.y == cy) || (pr_sn.y == cy_last));
  assign need_bump   = need && still_valid && (pr_sn.y == cy_last);

  assign cb_valid = (state == S_SCAN) && en && cl_grant && need_bump;
  assign cb_idx   = pr_idx;
  assign step     = (state == S_SCAN) && en && cl_grant && (!need_bump || cb_ready);

  assign cl_we    = step && need;
  assign cl_sn_w  = '{y: cy, n: still_valid ? cl_sn.n : '0};

  assign nc_valid = (state == S_NEWCYC);

  assign ev_keep  = cl_we && still_valid;
  assign ev_zap   = cl_we && !still_valid;
  assign ev_cycle = nc_valid && nc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SCAN;
      li    <= '0;
    end else begin
      case (state)
        S_SCAN: if (step) begin
          li <= li + 1'b1;
          if (li == LIW'(NLINES - 1)) state <= S_NEWCYC;
        end
        S_NEWCYC: if (nc_ready) state <= S_SCAN;
        default: state <= S_SCAN;
      endcase
    end
  end
endmodule
