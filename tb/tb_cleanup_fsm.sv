// tb_cleanup_fsm: runs the cleanup engine over 32 modelled cache lines with a
// modelled TLB/RT probe, random grants and random TLB readiness, for several
// cycles.  Before each cycle the lines get random flags, pages and SNs and
// the TLB model random owners, hot bits and SNs; when the cycle ends every
// line is compared with the expected result (kept and relabelled to cy,
// zapped to n = 0, or untouched) and every needed TLB bump is checked.
module tb_cleanup_fsm;
  import vor_pkg::*;
  localparam int NL = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, cl_grant = 0, cl_flag, cl_we, pr_valid, pr_hot, cb_valid, cb_ready = 0;
  logic nc_valid, nc_ready = 0, ev_keep, ev_zap, ev_cycle;
  logic [1:0] cy = 2'd1;
  logic [4:0] cl_li;
  logic [RA_W-1:0] cl_ra;
  sn_t cl_sn, cl_sn_w, pr_sn;
  logic [RPAGE_W-1:0] pr_rpage;
  logic [9:0] pr_idx, cb_idx;

  cleanup_fsm #(.NLINES(NL), .TLB_IW(10)) dut (.*);

  // line model
  logic        lflag [NL];
  logic [RA_W-1:0] lra [NL];
  sn_t         lsn [NL], exp_sn [NL];
  // TLB model, indexed by the low 3 bits of the real page
  logic tvalid [8], thot [8];
  sn_t  tsn [8], exp_tsn [8];
  logic [RPAGE_W-1:0] tpage [8];

  assign cl_flag  = lflag[cl_li];
  assign cl_ra    = lra[cl_li];
  assign cl_sn    = lsn[cl_li];
  assign pr_idx   = 10'(pr_rpage[2:0]);
  assign pr_valid = tvalid[pr_rpage[2:0]] && tpage[pr_rpage[2:0]] == pr_rpage;
  assign pr_hot   = thot[pr_rpage[2:0]];
  assign pr_sn    = tsn[pr_rpage[2:0]];

  always @(posedge clk) begin
    if (cl_we) lsn[cl_li] <= cl_sn_w;
    if (cb_valid && cb_ready && tsn[cb_idx[2:0]].y == cy - 2'd1) tsn[cb_idx[2:0]].y <= cy;
    if (nc_valid && nc_ready) cy <= cy + 2'd1;
  end

  always @(negedge clk) begin
    cl_grant = ($urandom_range(0, 3) != 0);
    cb_ready = ($urandom_range(0, 1) != 0);
    nc_ready = ($urandom_range(0, 1) != 0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sn_t rsn(input logic [1:0] c);
    sn_t s;
    s.y = c + 2'($urandom_range(0, 3));
    s.n = 7'($urandom_range(0, 3));
    return s;
  endfunction

  int keeps = 0, zaps = 0;
  logic [1:0] old_cy;
  always @(posedge clk) begin
    if (ev_keep) keeps++;
    if (ev_zap) zaps++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 12; c++) begin
      // set up the cycle
      for (int t = 0; t < 8; t++) begin
        tvalid[t] = ($urandom_range(0, 3) != 0);
        thot[t]   = ($urandom_range(0, 3) != 0);
        tpage[t]  = RPAGE_W'(t + 8 * $urandom_range(0, 1));
        tsn[t]    = rsn(cy);
        exp_tsn[t] = tsn[t];
      end
      for (int i = 0; i < NL; i++) begin
        logic [2:0] t;
        logic still;
        lflag[i] = ($urandom_range(0, 3) != 0);
        lra[i]   = {RPAGE_W'($urandom_range(0, 15)), 9'($urandom)};
        lsn[i]   = rsn(cy);
        if ($urandom_range(0, 1)) lsn[i].y = cy - 2'd1;
        t = lra[i][PAGE_BITS +: 3];
        still = tvalid[t] && tpage[t] == lra[i][RA_W-1:PAGE_BITS] && thot[t] &&
                tsn[t].n == lsn[i].n && (tsn[t].y == cy || tsn[t].y == cy - 2'd1);
        exp_sn[i] = lsn[i];
        if (lflag[i] && lsn[i].y == cy - 2'd1) begin
          exp_sn[i] = '{y: cy, n: still ? lsn[i].n : 7'd0};
          if (still && exp_tsn[t].y == cy - 2'd1) exp_tsn[t].y = cy;
        end
      end
      @(negedge clk);
      en = 1;
      old_cy = cy;
      wait (cy != old_cy);
      @(negedge clk);
      en = 0;
      for (int i = 0; i < NL; i++) begin
        checks++;
        if (lsn[i] != exp_sn[i]) begin
          failures++;
          $display("FAIL cycle %0d line %0d: sn %h expected %h", c, i, lsn[i], exp_sn[i]);
        end
      end
      for (int t = 0; t < 8; t++) begin
        checks++;
        if (tsn[t] != exp_tsn[t]) begin
          failures++;
          $display("FAIL cycle %0d tlb %0d: sn %h expected %h", c, t, tsn[t], exp_tsn[t]);
        end
      end
    end
    checks++;
    if (keeps == 0 || zaps == 0) begin failures++; $display("FAIL keep/zap never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
