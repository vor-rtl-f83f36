// vor_top: a VAX built as a RISC (the VR) plus a translator (T) that turns
// VAX instructions into VR instructions on cache misses.
//
//   vr_core --- ti_cache --- translator --- memory bus
//                  |  \
//               vor_tlb  cleanup_fsm
//
// The VR runs VAX code by jumping to the pseudo-address of a VAX PC
// ((VPC + 2**32) << 6).  Its fetches miss in the cache the first time;
// the cache asks the translator for the line, and the translator, instead
// of reading memory, reads and decodes the VAX instruction and delivers
// translated instructions (TIs).  Ordinary addresses pass straight through
// the translator to memory.  Stores, by the VR or from outside (xs_*, real
// address only), make the stored-to page cold in the TLB, which invalidates
// all cached TIs made from it through the sequence-number scheme; the
// cleanup engine recycles sequence numbers in the background.
//
// Outside the block: main memory on the m_* word bus (req held until ack),
// TLB loading (tlb_fill_*: the VR has no page-table walker here), and the
// start of execution.  fast_cache_index (the cache indexed with
// virtual-address bits before translation, with a one-clock retry when the
// bits above the page offset disagree) stands beside the rest on the fx_*
// ports: this cache indexes with the real address in the clock of its TLB
// lookup and does not need it.  Parameters are the design's sizes: 4096 cache lines
// of 16 bytes, 1024 TLB entries, a 1024-entry RT table, SN counts up to 64.
module vor_top
  import vor_pkg::*;
#(
  parameter int unsigned NLINES  = 4096,
  parameter int unsigned NTLB    = 1024,
  parameter int unsigned RT_SIZE = 1024,
  parameter int unsigned MAXN    = 64,
  parameter bit          JOIN    = 1'b1,
  localparam int unsigned TIW    = $clog2(NTLB)
) (
  input  logic               clk,
  input  logic               rst_n,
  // run control
  input  logic               start,
  input  logic [PA_W-1:0]    boot_pc,
  input  logic [31:0]        boot_vpc,
  input  logic               cleanup_en,
  // TLB loading
  input  logic               tlb_fill_valid,
  input  logic [VA_W-1:0]    tlb_fill_va,
  input  logic [RPAGE_W-1:0] tlb_fill_rpage,
  // external store (another processor or an i/o device)
  input  logic               xs_valid,
  input  logic [RA_W-1:0]    xs_ra,
  input  word_t              xs_data,
  output logic               xs_done,
  // memory bus
  output logic               m_req,
  output logic               m_we,
  output logic [RA_W-3:0]    m_addr,
  output word_t              m_wdata,
  input  logic               m_ack,
  input  word_t              m_rdata,
  // status
  output logic               running,
  output logic               halted,
  output logic [15:0]        trap_code,
  output logic [31:0]        trap_addr,
  output logic [PA_W-1:0]    pc,
  output logic [31:0]        vpc,
  output logic               joined,
  output logic [31:0]        nz,
  output logic               cc_c,
  output logic               cc_v,
  output logic [1:0]         cycle,
  input  logic [5:0]         dbg_reg,
  output word_t              dbg_val,
  // fast cache indexing with virtual-address bits, side by side
  input  logic               fx_req,
  input  logic [31:0]        fx_va,
  input  logic [RA_W-1:0]    fx_ra,
  output logic [$clog2(NLINES)-1:0] fx_idx,
  output logic               fx_ok,
  output logic               fx_stall,
  // events, one pulse per occurrence: 0 TI retired, 1 implicit branch,
  // 2 VAX branch, 3 delayed branch, 4 hit, 5 TI miss, 6 ordinary miss,
  // 7 write-back, 8 uncached TI, 9 chill, 10 warm, 11 warm failed, 12-14
  // cleanup keep/zap/new cycle, 15 translation, 16 join, 17 pass-through,
  // 18 external store, 19 fault, 20 fast-index stall
  output logic [20:0]        events
);
  localparam int unsigned LIW = $clog2(NLINES);

  // core <-> cache
  logic c_req, c_we, c_ack, c_fault;
  logic [PA_W-1:0] c_addr;
  word_t c_wdata, c_rdata;
  line_meta_t c_meta;
  // cache <-> TLB
  logic [VA_W-1:0] lk_va;
  logic lk_hit, lk_hot;
  logic [TIW-1:0] lk_idx;
  logic [RPAGE_W-1:0] lk_rpage;
  sn_t lk_sn;
  logic [1:0] cy;
  logic warm_valid, warm_ready, warm_ok, ich_valid, ich_ready, txs_valid, txs_ready;
  logic [TIW-1:0] warm_idx, ich_idx;
  logic [RPAGE_W-1:0] txs_rpage;
  // cache <-> translator
  logic lr_req, lr_we, lr_ack;
  line_key_t lr_key;
  word_t lr_wdata [WORDS_PER_LINE];
  word_t lr_rdata [WORDS_PER_LINE];
  line_meta_t lr_meta;
  // cleanup
  logic cl_grant, cl_flag, cl_we;
  logic [LIW-1:0] cl_li;
  logic [RA_W-1:0] cl_ra;
  sn_t cl_sn, cl_sn_w, pr_sn;
  logic [RPAGE_W-1:0] pr_rpage;
  logic pr_valid, pr_hot, cb_valid, cb_ready, nc_valid, nc_ready;
  logic [TIW-1:0] pr_idx, cb_idx;

  logic [5:0] trap_reg;

  vr_core u_core (
    .clk, .rst_n, .start, .boot_pc, .boot_vpc,
    .req(c_req), .addr(c_addr), .we(c_we), .wdata(c_wdata),
    .ack(c_ack), .rdata(c_rdata), .rmeta(c_meta), .fault(c_fault),
    .running, .halted, .trap_code, .trap_addr, .trap_reg,
    .pc, .vpc, .joined, .nz, .cc_c, .cc_v,
    .dbg_reg, .dbg_val,
    .ev_retire(events[0]), .ev_implicit(events[1]), .ev_vbr(events[2]),
    .ev_delayed(events[3])
  );

  ti_cache #(.NLINES(NLINES), .TLB_IW(TIW)) u_cache (
    .clk, .rst_n,
    .req(c_req), .addr(c_addr), .we(c_we), .wdata(c_wdata),
    .ack(c_ack), .rdata(c_rdata), .rmeta(c_meta), .fault(c_fault),
    .lk_va, .lk_hit, .lk_idx, .lk_rpage, .lk_hot, .lk_sn, .cy,
    .warm_valid, .warm_idx, .warm_ready, .warm_ok,
    .ich_valid, .ich_idx, .ich_ready,
    .txs_valid, .txs_rpage, .txs_ready,
    .lr_req, .lr_we, .lr_key, .lr_wdata, .lr_ack, .lr_rdata, .lr_meta,
    .xs_valid, .xs_ra, .xs_data, .xs_done,
    .cl_grant, .cl_li, .cl_flag, .cl_ra, .cl_sn, .cl_we, .cl_sn_w,
    .ev_hit(events[4]), .ev_miss_ti(events[5]), .ev_miss_ord(events[6]),
    .ev_flush(events[7]), .ev_uncached(events[8])
  );

  vor_tlb #(.NTLB(NTLB), .RT_SIZE(RT_SIZE), .MAXN(MAXN)) u_tlb (
    .clk, .rst_n,
    .lk_va, .lk_hit, .lk_idx, .lk_rpage, .lk_hot, .lk_sn, .cy,
    .fill_valid(tlb_fill_valid), .fill_va(tlb_fill_va), .fill_rpage(tlb_fill_rpage),
    .xs_valid(txs_valid), .xs_rpage(txs_rpage), .xs_ready(txs_ready),
    .warm_valid, .warm_idx, .warm_ready, .warm_ok,
    .ich_valid, .ich_idx, .ich_ready,
    .pr_rpage, .pr_valid, .pr_hot, .pr_sn, .pr_idx,
    .cb_valid, .cb_idx, .cb_ready, .nc_valid, .nc_ready,
    .ev_chill(events[9]), .ev_warm(events[10]), .ev_warm_fail(events[11])
  );

  cleanup_fsm #(.NLINES(NLINES), .TLB_IW(TIW)) u_cleanup (
    .clk, .rst_n, .en(cleanup_en), .cy,
    .cl_grant, .cl_li, .cl_flag, .cl_ra, .cl_sn, .cl_we, .cl_sn_w,
    .pr_rpage, .pr_valid, .pr_hot, .pr_sn, .pr_idx,
    .cb_valid, .cb_idx, .cb_ready, .nc_valid, .nc_ready,
    .ev_keep(events[12]), .ev_zap(events[13]), .ev_cycle(events[14])
  );

  translator #(.JOIN(JOIN)) u_t (
    .clk, .rst_n,
    .lr_req, .lr_we, .lr_key, .lr_wdata, .lr_ack, .lr_rdata, .lr_meta,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .ev_translate(events[15]), .ev_join(events[16]), .ev_pass(events[17])
  );

  fast_cache_index #(.IDX_W(LIW), .OFF_W(4), .PAGE_BITS(PAGE_BITS), .RA_W(RA_W)) u_fx (
    .clk, .rst_n, .req(fx_req), .va(fx_va), .ra(fx_ra),
    .idx(fx_idx), .ok(fx_ok), .stall(fx_stall), .ev_stall(events[20])
  );

  assign cycle      = cy;
  assign events[18] = xs_done;
  assign events[19] = c_ack && c_fault;
endmodule
