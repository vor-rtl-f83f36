// vor_tlb: translation buffer of the VOR, extended with the state of the
// sequence-number (SN) invalidation scheme.
//
// Each of the NTLB direct-mapped entries maps one 512-byte VAX page
// (index = VA[18:9], residue = VA[31:19]) to a real page, and also holds a
// hot bit and an SN.  A page is hot while its SN is valid and it is
// reachable through the RT table; only then may translated instructions
// (TIs) made from its bytes be cached.  Cache lines of TIs carry the SN they
// were made under and hit only while it matches the TLB entry's SN, so
// making a page cold (Chill) or giving it a new SN invalidates all its TIs
// at once, without touching the cache.
//
// Operations, at most one per clock, fixed priority:
//   fill    load an entry (a displaced hot entry is chilled first)
//   xstore  a store seen only by real page: find the entry through RT and
//           chill it if it is hot for that page (ExternalStore)
//   warm    make entry warm_idx hot with a new SN from the next cycle cy+1;
//           the page takes over its RT slot, chilling the former owner.
//           warm_ok = 0 when the cycle has run out of SNs (Warm)
//   ichill  a store by this processor through entry ich_idx: set modified,
//           chill if hot (InternalStore)
//   bump    cleanup found a valid line: move the entry's SN from cycle cy-1
//           to cy
//   newcyc  cleanup starts a cycle: cy := cy+1, nMax := 1
// Chill records nMax := max(nMax, n+1) for SNs of cycle cy+1, so a later
// Warm never reuses an SN that lines of a chilled page may still hold.
// Lookup and the RT probe are combinational; all updates are synchronous.
// Reset makes every entry invalid and cold, cy 0 and nMax 1.
// The design's protection field is not modelled (it gives no behaviour for it).
module vor_tlb
  import vor_pkg::*;
#(
  parameter int unsigned NTLB    = 1024,
  parameter int unsigned RT_SIZE = 1024,
  parameter int unsigned MAXN    = 64,
  localparam int unsigned IW     = $clog2(NTLB),
  localparam int unsigned RES_W  = VA_W - PAGE_BITS - IW
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup by virtual address
  input  logic [VA_W-1:0]    lk_va,
  output logic               lk_hit,
  output logic [IW-1:0]      lk_idx,
  output logic [RPAGE_W-1:0] lk_rpage,
  output logic               lk_hot,
  output sn_t                lk_sn,
  output logic [1:0]         cy,
  // fill
  input  logic               fill_valid,
  input  logic [VA_W-1:0]    fill_va,
  input  logic [RPAGE_W-1:0] fill_rpage,
  // external store
  input  logic               xs_valid,
  input  logic [RPAGE_W-1:0] xs_rpage,
  output logic               xs_ready,
  // warm
  input  logic               warm_valid,
  input  logic [IW-1:0]      warm_idx,
  output logic               warm_ready,
  output logic               warm_ok,
  // internal store
  input  logic               ich_valid,
  input  logic [IW-1:0]      ich_idx,
  output logic               ich_ready,
  // cleanup: probe by real page through RT, bump, new cycle
  input  logic [RPAGE_W-1:0] pr_rpage,
  output logic               pr_valid,   // RT entry owns this real page
  output logic               pr_hot,
  output sn_t                pr_sn,
  output logic [IW-1:0]      pr_idx,
  input  logic               cb_valid,
  input  logic [IW-1:0]      cb_idx,
  output logic               cb_ready,
  input  logic               nc_valid,
  output logic               nc_ready,
  // events
  output logic               ev_chill,
  output logic               ev_warm,
  output logic               ev_warm_fail
);
  localparam int unsigned RT_IW = $clog2(RT_SIZE);

  typedef struct packed {
    logic [RES_W-1:0]   residue;
    logic [RPAGE_W-1:0] rpage;
    logic               modified;
    sn_t                sn;
  } tlb_entry_t;

  tlb_entry_t ent [NTLB];      // no reset, read only while valid
  logic [NTLB-1:0] evalid;
  logic [NTLB-1:0] ehot;
  logic [SN_N_W-1:0] nmax;
  logic [1:0]        cy_q;

  assign cy = cy_q;

  // ---------------------------------------------------------- lookup
  tlb_entry_t lk_e;
  assign lk_idx   = lk_va[PAGE_BITS +: IW];
  assign lk_e     = ent[lk_idx];
  assign lk_hit   = evalid[lk_idx] && (lk_e.residue == lk_va[VA_W-1 -: RES_W]);
  assign lk_rpage = lk_e.rpage;
  assign lk_hot   = ehot[lk_idx];
  assign lk_sn    = lk_e.sn;

  // ---------------------------------------------------------- RT
  logic [IW-1:0] rt_a, rt_b;
  logic          rt_we;
  logic [RT_IW-1:0] rt_widx;
  logic [IW-1:0] rt_wdata;
  logic [RPAGE_W-1:0] warm_page;
  logic [RPAGE_W-1:0] rt_b_page;

  rt_table #(.RT_SIZE(RT_SIZE), .TLB_IW(IW)) u_rt (
    .clk,
    .ra_idx (pr_rpage[RT_IW-1:0]), .ra_tlbi(rt_a),
    .rb_idx (rt_b_page[RT_IW-1:0]), .rb_tlbi(rt_b),
    .we     (rt_we), .w_idx(rt_widx), .w_tlbi(rt_wdata)
  );

  assign pr_idx   = rt_a;
  assign pr_valid = evalid[rt_a] && (ent[rt_a].rpage == pr_rpage);
  assign pr_hot   = ehot[rt_a];
  assign pr_sn    = ent[rt_a].sn;

  assign warm_page = ent[warm_idx].rpage;
  // port B serves the external store or, when there is none, warm
  assign rt_b_page = xs_valid ? xs_rpage : warm_page;

  // ---------------------------------------------------------- arbitration
  logic do_fill, do_xs, do_warm, do_ich, do_cb, do_nc;
  assign do_fill = fill_valid;
  assign do_xs   = xs_valid && !do_fill;
  assign do_warm = warm_valid && !do_fill && !xs_valid;
  assign do_ich  = ich_valid && !do_fill && !xs_valid && !warm_valid;
  assign do_cb   = cb_valid && !do_fill && !xs_valid && !warm_valid && !ich_valid;
  assign do_nc   = nc_valid && !do_fill && !xs_valid && !warm_valid && !ich_valid && !cb_valid;

  assign xs_ready   = do_xs;
  assign warm_ready = do_warm;
  assign ich_ready  = do_ich;
  assign cb_ready   = do_cb;
  assign nc_ready   = do_nc;

  // warm result: already hot, or an SN is left in cycle cy+1
  logic warm_has_sn;
  assign warm_has_sn = nmax < SN_N_W'(MAXN);
  assign warm_ok     = ehot[warm_idx] || warm_has_sn;

  // entry chilled by this operation, if any
  logic          chill_en;
  logic [IW-1:0] chill_idx;
  logic [IW-1:0] fill_idx;
  assign fill_idx = fill_va[PAGE_BITS +: IW];

  always_comb begin
    chill_en  = 1'b0;
    chill_idx = '0;
    if (do_fill) begin
      chill_en  = ehot[fill_idx];
      chill_idx = fill_idx;
    end else if (do_xs) begin
      chill_en  = evalid[rt_b] && ehot[rt_b] && (ent[rt_b].rpage == xs_rpage);
      chill_idx = rt_b;
    end else if (do_warm) begin
      chill_en  = !ehot[warm_idx] && warm_has_sn && ehot[rt_b] && (rt_b != warm_idx) &&
                   (ent[rt_b].rpage[RT_IW-1:0] == warm_page[RT_IW-1:0]);
      chill_idx = rt_b;
    end else if (do_ich) begin
      chill_en  = ehot[ich_idx];
      chill_idx = ich_idx;
    end
  end

  assign rt_we    = do_warm && !ehot[warm_idx] && warm_has_sn;
  assign rt_widx  = warm_page[RT_IW-1:0];
  assign rt_wdata = warm_idx;

  assign ev_chill     = chill_en;
  assign ev_warm      = rt_we;
  assign ev_warm_fail = do_warm && !warm_ok;

  // ---------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evalid <= '0;
      ehot   <= '0;
      nmax <= SN_N_W'(1);
      cy_q <= 2'd0;
    end else begin
      if (chill_en) begin
        ehot[chill_idx] <= 1'b0;
        if (ent[chill_idx].sn.y == cy_q + 2'd1 && ent[chill_idx].sn.n + 1'b1 > nmax)
          nmax <= ent[chill_idx].sn.n + 1'b1;
      end
      if (do_fill) begin
        evalid[fill_idx] <= 1'b1;
        ehot[fill_idx]   <= 1'b0;
      end
      if (rt_we) ehot[warm_idx] <= 1'b1;
      if (do_nc) begin
        cy_q <= cy_q + 2'd1;
        nmax <= SN_N_W'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_fill)
      ent[fill_idx] <= '{residue: fill_va[VA_W-1 -: RES_W], rpage: fill_rpage,
                         modified: 1'b0, sn: '0};
    if (rt_we) ent[warm_idx].sn <= '{y: cy_q + 2'd1, n: nmax};
    if (do_ich) ent[ich_idx].modified <= 1'b1;
    if (do_cb && ent[cb_idx].sn.y == cy_q - 2'd1) ent[cb_idx].sn.y <= cy_q;
  end
endmodule
