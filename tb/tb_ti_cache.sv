// tb_ti_cache: the cache with its TLB, translator and a behavioural memory,
// driven through the processor port.  Checks ordinary read miss and hit,
// store hit (line dirty, page chilled), write-back of a dirty victim on a
// conflicting miss, a TI fetch that warms a cold page and then hits, an
// external store to the code page invalidating its TIs (next fetch
// misses), a TLB miss reported as a fault, and random ordinary reads and
// writes against a reference memory.  Uses 16 lines so conflicts are common.
module tb_ti_cache;
  import vor_pkg::*;
  localparam int NL = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req = 0, we = 0, ack, fault;
  logic [PA_W-1:0] addr = '0;
  word_t wdata = '0, rdata;
  line_meta_t rmeta;
  logic [31:0] lk_va;
  logic lk_hit, lk_hot, warm_valid, warm_ready, warm_ok, ich_valid, ich_ready;
  logic [9:0] lk_idx, warm_idx, ich_idx, pr_idx;
  logic [20:0] lk_rpage, txs_rpage;
  sn_t lk_sn, pr_sn, cl_sn;
  logic [1:0] cy;
  logic txs_valid, txs_ready, lr_req, lr_we, lr_ack;
  line_key_t lr_key;
  word_t lr_wdata [4], lr_rdata [4];
  line_meta_t lr_meta;
  logic xs_valid = 0, xs_done, cl_grant, cl_flag, pr_valid, pr_hot;
  logic [RA_W-1:0] xs_ra = '0, cl_ra;
  word_t xs_data = '0;
  logic fill_valid = 0;
  logic [31:0] fill_va = '0;
  logic [20:0] fill_rpage = '0;
  logic ev_hit, ev_miss_ti, ev_miss_ord, ev_flush, ev_uncached, ev_chill, ev_warm, ev_warm_fail;
  logic m_req, m_we, m_ack, ev_translate, ev_join, ev_pass, cb_ready, nc_ready;
  logic [RA_W-3:0] m_addr;
  word_t m_wdata, m_rdata;

  ti_cache #(.NLINES(NL), .TLB_IW(10)) dut (
    .clk, .rst_n, .req, .addr, .we, .wdata, .ack, .rdata, .rmeta, .fault,
    .lk_va, .lk_hit, .lk_idx, .lk_rpage, .lk_hot, .lk_sn, .cy,
    .warm_valid, .warm_idx, .warm_ready, .warm_ok, .ich_valid, .ich_idx, .ich_ready,
    .txs_valid, .txs_rpage, .txs_ready,
    .lr_req, .lr_we, .lr_key, .lr_wdata, .lr_ack, .lr_rdata, .lr_meta,
    .xs_valid, .xs_ra, .xs_data, .xs_done,
    .cl_grant, .cl_li(4'd0), .cl_flag, .cl_ra, .cl_sn, .cl_we(1'b0), .cl_sn_w('0),
    .ev_hit, .ev_miss_ti, .ev_miss_ord, .ev_flush, .ev_uncached);

  vor_tlb #(.NTLB(1024), .RT_SIZE(1024), .MAXN(64)) u_tlb (
    .clk, .rst_n, .lk_va, .lk_hit, .lk_idx, .lk_rpage, .lk_hot, .lk_sn, .cy,
    .fill_valid, .fill_va, .fill_rpage,
    .xs_valid(txs_valid), .xs_rpage(txs_rpage), .xs_ready(txs_ready),
    .warm_valid, .warm_idx, .warm_ready, .warm_ok, .ich_valid, .ich_idx, .ich_ready,
    .pr_rpage(21'd0), .pr_valid, .pr_hot, .pr_sn, .pr_idx,
    .cb_valid(1'b0), .cb_idx(10'd0), .cb_ready, .nc_valid(1'b0), .nc_ready,
    .ev_chill, .ev_warm, .ev_warm_fail);

  translator #(.JOIN(1'b1)) u_t (.clk, .rst_n, .lr_req, .lr_we, .lr_key, .lr_wdata, .lr_ack,
                                 .lr_rdata, .lr_meta, .m_req, .m_we, .m_addr, .m_wdata,
                                 .m_ack, .m_rdata, .ev_translate, .ev_join, .ev_pass);

  mem_model #(.WORDS(8192), .AW(RA_W-2)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr),
                                               .wdata(m_wdata), .ack(m_ack), .rdata(m_rdata));

  int n_hit = 0, n_mti = 0, n_mord = 0, n_flush = 0, n_chill = 0;
  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_miss_ti) n_mti++;
    if (ev_miss_ord) n_mord++;
    if (ev_flush) n_flush++;
    if (ev_chill) n_chill++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic access(input logic [PA_W-1:0] a, input logic w, input word_t d);
    @(negedge clk);
    req = 1; addr = a; we = w; wdata = d;
    #1;
    while (!ack) begin @(negedge clk); #1; end
    @(negedge clk);
    req = 0; we = 0;
  endtask

  task automatic tfill(input logic [31:0] va, input logic [20:0] rp);
    @(negedge clk); fill_valid = 1; fill_va = va; fill_rpage = rp;
    @(negedge clk); fill_valid = 0;
  endtask

  // VA page p (p < 8) maps to real page p + 4
  word_t refm [1024];
  int h0, m0;
  logic [31:0] a;
  word_t got;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++) tfill(32'(p) << 9, 21'(p + 4));
    for (int i = 0; i < 1024; i++) begin
      refm[i] = $urandom;
      u_mem.mem[(4 << 7) + i] = refm[i];
    end
    // ordinary read miss then hit
    m0 = n_mord; h0 = n_hit;
    access(39'h10, 0, 0);
    chk("read miss data", rdata == refm[4] && n_mord == m0 + 1);
    h0 = n_hit;
    access(39'h14, 0, 0);
    chk("read hit", rdata == refm[5] && n_hit == h0 + 1);
    // store hit: page chilled only if hot (it is cold here); line dirty
    access(39'h14, 1, 32'hCAFE);
    refm[5] = 32'hCAFE;
    chk("dirty line not yet in memory", u_mem.mem[(4 << 7) + 5] != 32'hCAFE);
    // conflicting line (16 lines of 16 bytes: +256 bytes) forces a write-back
    m0 = n_flush;
    access(39'h110, 0, 0);
    chk("conflict read", rdata == refm['h44]);
    chk("write-back", n_flush == m0 + 1 && u_mem.mem[(4 << 7) + 5] == 32'hCAFE);
    // TI fetch: HALT at VAX 0x600 (page 3, real page 7)
    u_mem.mem[(7 << 7)] = 32'h0;
    m0 = n_mti; h0 = n_hit;
    access(vpc_to_pc(32'h600), 0, 0);
    chk("TI miss", rdata == ti_trap(TRAP_HALT) && n_mti == m0 + 1 && !fault);
    h0 = n_hit;
    access(vpc_to_pc(32'h600), 0, 0);
    chk("TI hit", rdata == ti_trap(TRAP_HALT) && n_hit == h0 + 1);
    // external store to the code page: next fetch misses
    @(negedge clk); xs_valid = 1; xs_ra = 30'((7 << 9) + 8); xs_data = 32'h1;
    while (!xs_done) @(negedge clk);
    @(negedge clk); xs_valid = 0;
    m0 = n_mti;
    access(vpc_to_pc(32'h600), 0, 0);
    chk("chilled page misses", n_mti == m0 + 1);
    // internal store into the code page chills it
    m0 = n_chill;
    access(39'h608, 1, 32'h5);
    chk("internal store chills", n_chill == m0 + 1);
    m0 = n_mti;
    access(vpc_to_pc(32'h600), 0, 0);
    chk("miss after internal store", n_mti == m0 + 1);
    // TLB miss
    @(negedge clk); req = 1; addr = 39'h10000; we = 0;
    while (!ack) @(negedge clk);
    chk("fault", fault);
    @(negedge clk); req = 0;
    // random ordinary traffic in pages 0..1 against the reference
    for (int i = 0; i < 1500; i++) begin
      a = 32'($urandom_range(0, 255)) << 2;
      if ($urandom_range(0, 2) == 0) begin
        got = $urandom;
        access({7'b0, a}, 1, got);
        refm[a >> 2] = got;
      end else begin
        access({7'b0, a}, 0, 0);
        checks++;
        if (rdata != refm[a >> 2]) begin
          failures++;
          $display("FAIL random read %h: %h expected %h", a, rdata, refm[a >> 2]);
        end
      end
    end
    chk("events seen", n_hit > 100 && n_flush > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
