// tb_vor_tlb: directed checks of the TLB and its sequence-number state:
// fill and lookup, Warm (new SN from cycle cy+1, RT takeover chilling the
// former owner), InternalStore and ExternalStore chills, nMax growth and
// exhaustion (warm fails), cleanup bump and new cycle, the RT probe, and a
// fill displacing a hot entry.  Uses MAXN = 4 so exhaustion is reached fast.
module tb_vor_tlb;
  import vor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] lk_va = '0, fill_va = '0;
  logic lk_hit, lk_hot, fill_valid = 0, xs_valid = 0, xs_ready, warm_valid = 0, warm_ready, warm_ok;
  logic [9:0] lk_idx, warm_idx = '0, ich_idx = '0, pr_idx, cb_idx = '0;
  logic [20:0] lk_rpage, fill_rpage = '0, xs_rpage = '0, pr_rpage = '0;
  sn_t lk_sn, pr_sn;
  logic [1:0] cy;
  logic ich_valid = 0, ich_ready, pr_valid, pr_hot, cb_valid = 0, cb_ready, nc_valid = 0, nc_ready;
  logic ev_chill, ev_warm, ev_warm_fail;
  int n_chill = 0;

  vor_tlb #(.NTLB(1024), .RT_SIZE(1024), .MAXN(4)) dut (.*);

  always @(posedge clk) if (ev_chill) n_chill++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic fill(input logic [31:0] va, input logic [20:0] rp);
    @(negedge clk); fill_valid = 1; fill_va = va; fill_rpage = rp;
    @(negedge clk); fill_valid = 0;
  endtask

  // warm the entry of va; returns warm_ok
  task automatic warm(input logic [31:0] va, output logic ok);
    @(negedge clk); warm_valid = 1; warm_idx = va[18:9];
    #1 ok = warm_ok;
    chk("warm ready", warm_ready);
    @(negedge clk); warm_valid = 0;
  endtask

  task automatic look(input logic [31:0] va);
    lk_va = va; #1;
  endtask

  logic ok;
  int c0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    look(32'h1000);
    chk("empty misses", !lk_hit);
    fill(32'h1000, 21'h40);
    look(32'h1000);
    chk("fill hit", lk_hit && lk_rpage == 21'h40 && !lk_hot);
    look(32'h1000 + (1 << 19));
    chk("residue mismatch misses", !lk_hit);
    // Warm A: SN (1,1)
    warm(32'h1000, ok);
    look(32'h1000);
    chk("warm A", ok && lk_hot && lk_sn.y == 2'd1 && lk_sn.n == 7'd1);
    // probe through RT
    pr_rpage = 21'h40; #1;
    chk("probe A", pr_valid && pr_hot && pr_idx == 10'h8 && pr_sn == lk_sn);
    pr_rpage = 21'h41; #1;
    chk("probe other page", !pr_valid);
    // internal store chills, nMax becomes 2
    @(negedge clk); ich_valid = 1; ich_idx = 10'h8;
    #1 chk("ich ready + chill", ich_ready && ev_chill);
    @(negedge clk); ich_valid = 0;
    look(32'h1000);
    chk("ich chilled", lk_hit && !lk_hot);
    warm(32'h1000, ok);
    look(32'h1000);
    chk("rewarm gets n=2", ok && lk_hot && lk_sn.n == 7'd2);
    // external store to another page: no chill
    c0 = n_chill;
    @(negedge clk); xs_valid = 1; xs_rpage = 21'h41;
    @(negedge clk); xs_valid = 0;
    look(32'h1000);
    chk("unrelated xs keeps hot", lk_hot && n_chill == c0);
    @(negedge clk); xs_valid = 1; xs_rpage = 21'h40;
    #1 chk("xs ready", xs_ready);
    @(negedge clk); xs_valid = 0;
    look(32'h1000);
    chk("xs chills", !lk_hot && n_chill == c0 + 1);
    // page B sharing the RT slot of A (rpage differs by 1024)
    warm(32'h1000, ok);          // A hot again, n = 3
    look(32'h1000);
    chk("A n=3", lk_sn.n == 7'd3);
    fill(32'h2200, 21'h40 + 21'd1024);
    warm(32'h2200, ok);
    look(32'h2200);
    chk("B warm", ok && lk_hot && lk_sn.n == 7'd3);
    look(32'h1000);
    chk("B took RT slot from A", !lk_hot);
    pr_rpage = 21'h40 + 21'd1024; #1;
    chk("probe B", pr_valid && pr_idx == 10'h11);
    // nMax is now 4 = MAXN: a cold page cannot warm
    warm(32'h1000, ok);
    look(32'h1000);
    chk("exhausted warm fails", !ok && !lk_hot);
    // a hot page warms trivially
    warm(32'h2200, ok);
    chk("hot page warm ok", ok);
    // new cycle: cy 1, nMax 1
    @(negedge clk); nc_valid = 1;
    #1 chk("nc ready", nc_ready);
    @(negedge clk); nc_valid = 0;
    chk("cy = 1", cy == 2'd1);
    warm(32'h1000, ok);
    look(32'h1000);
    chk("warm after new cycle", ok && lk_hot && lk_sn.y == 2'd2 && lk_sn.n == 7'd1);
    // two more cycles: A's SN y=2 becomes cy-1 when cy=3; bump moves it to 3
    @(negedge clk); nc_valid = 1; @(negedge clk); nc_valid = 1; @(negedge clk); nc_valid = 0;
    chk("cy = 3", cy == 2'd3);
    @(negedge clk); cb_valid = 1; cb_idx = 10'h8;
    #1 chk("cb ready", cb_ready);
    @(negedge clk); cb_valid = 0;
    look(32'h1000);
    chk("bumped", lk_sn.y == 2'd3 && lk_sn.n == 7'd1 && lk_hot);
    // fill over a hot entry chills it
    c0 = n_chill;
    fill(32'h1000 + (1 << 19), 21'h77);
    look(32'h1000 + (1 << 19));
    chk("refill displaces", lk_hit && !lk_hot && n_chill == c0 + 1);
    // priority: fill beats warm in the same clock
    @(negedge clk); fill_valid = 1; fill_va = 32'h4000; fill_rpage = 21'h5; warm_valid = 1; warm_idx = 10'h20;
    #1 chk("fill has priority", !warm_ready);
    @(negedge clk); fill_valid = 0; warm_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
