// ti_cache: the VR's cache, which holds ordinary memory lines and lines of
// translated instructions (TIs) side by side, with its miss controller.
//
// Direct mapped, NLINES lines of four 32-bit words, write-back with
// write-allocate.  A request carries a 39-bit VR address.  Below 2**32 it is
// an ordinary address: the TLB maps it to a real address RA and the line
// index is RA[4 +: LIW].  At or above 2**32 it is a pseudo-address
// {1, VAX byte address, TI slot, 00}: the TLB maps the VAX byte address,
// and the line index is {RA[LIW-3:0], slot[3:2]}, i.e. each VAX byte owns
// up to four consecutive lines (16 TI slots).  The tag is the full key
// {flag, slot[3:2], RA}.  A TI line hits only if its stored sequence
// number (SN) matches the SN of the page's TLB entry and the page is hot.
//
// Controller, one request at a time (req held until ack):
//   - TLB miss: ack with fault.
//   - TI fetch from a cold page: ask the TLB to warm it; if the cycle has
//     run out of SNs the line is fetched from the translator and the word
//     returned without being cached (uncached TI execution).
//   - store: the page is chilled in the TLB (a store into a page invalidates
//     its TIs), then the word is written and the line marked dirty.
//   - miss: a dirty ordinary victim is written back through the translator
//     (which passes it to memory), then the line is requested from it.
//     The translator returns memory data for ordinary lines and freshly
//     made TIs, with where/when/joined metadata, for TI lines.
// An external store (real address only) is handled when the controller is
// idle: the TLB chills the page through RT and a hitting ordinary line is
// updated.  The cleanup engine may read and rewrite line SNs in clocks
// where the arrays are otherwise unused (cl_grant): no request, or a miss
// waiting for its line.
// The line-index function and the full-width tag are this design's own
// choices; the design asks only that pseudo-addresses have their own input
// to the line addressing.  The handshake assertion uses the asynchronous
// reset in its disable condition, so lint sees rst_n both as an
// asynchronous reset and as a synchronous signal; this is intended.
module ti_cache
  import vor_pkg::*;
#(
  parameter int unsigned NLINES = 4096,
  parameter int unsigned TLB_IW = 10,
  localparam int unsigned LIW   = $clog2(NLINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // VR side
  input  logic               req,
  input  logic [PA_W-1:0]    addr,
  input  logic               we,
  input  word_t              wdata,
  output logic               ack,
  output word_t              rdata,
  output line_meta_t         rmeta,
  output logic               fault,
  // TLB
  output logic [VA_W-1:0]    lk_va,
  input  logic               lk_hit,
  input  logic [TLB_IW-1:0]  lk_idx,
  input  logic [RPAGE_W-1:0] lk_rpage,
  input  logic               lk_hot,
  input  sn_t                lk_sn,
  input  logic [1:0]         cy,
  output logic               warm_valid,
  output logic [TLB_IW-1:0]  warm_idx,
  input  logic               warm_ready,
  input  logic               warm_ok,
  output logic               ich_valid,
  output logic [TLB_IW-1:0]  ich_idx,
  input  logic               ich_ready,
  output logic               txs_valid,
  output logic [RPAGE_W-1:0] txs_rpage,
  input  logic               txs_ready,
  // translator / memory side, one line per request
  output logic               lr_req,
  output logic               lr_we,
  output line_key_t          lr_key,
  output word_t              lr_wdata [WORDS_PER_LINE],
  input  logic               lr_ack,
  input  word_t              lr_rdata [WORDS_PER_LINE],
  input  line_meta_t         lr_meta,
  // external store
  input  logic               xs_valid,
  input  logic [RA_W-1:0]    xs_ra,
  input  word_t              xs_data,
  output logic               xs_done,
  // cleanup access
  output logic               cl_grant,
  input  logic [LIW-1:0]     cl_li,
  output logic               cl_flag,
  output logic [RA_W-1:0]    cl_ra,
  output sn_t                cl_sn,
  input  logic               cl_we,
  input  sn_t                cl_sn_w,
  // events
  output logic               ev_hit,
  output logic               ev_miss_ti,
  output logic               ev_miss_ord,
  output logic               ev_flush,
  output logic               ev_uncached
);
  typedef enum logic [1:0] {S_IDLE, S_WARM, S_FLUSH, S_REFILL} state_t;
  state_t state;
  logic   nocache;   // this TI fetch is served without caching

  line_key_t  tag   [NLINES];
  logic [NLINES-1:0] vld;     // valid and dirty bits as vectors, reset to 0
  logic [NLINES-1:0] dirty;
  sn_t        lsn   [NLINES];
  line_meta_t meta  [NLINES];
  word_t      data  [NLINES][WORDS_PER_LINE];

  // --------------------------------------------------------- address
  logic            pseudo;
  logic [RA_W-1:0] ra;
  line_key_t       key;
  logic [LIW-1:0]  idx;
  logic [1:0]      wsel;

  assign pseudo = addr[PA_W-1];
  assign lk_va  = pseudo ? addr[37:6] : addr[31:0];
  assign ra     = {lk_rpage, lk_va[PAGE_BITS-1:0]};
  assign wsel   = addr[3:2];
  assign key    = '{flag: pseudo, tiline: pseudo ? addr[5:4] : 2'b00,
                    ra: pseudo ? ra : {ra[RA_W-1:4], 4'b0}};
  assign idx    = pseudo ? {ra[LIW-3:0], addr[5:4]} : ra[4 +: LIW];

  logic hit;
  always_comb begin
    hit = vld[idx] && (tag[idx] == key);
    if (pseudo) hit = hit && lk_hot && sn_matches(lsn[idx], lk_sn, cy);
  end

  assign warm_idx = lk_idx;
  assign ich_idx  = lk_idx;

  logic idle_req;
  assign idle_req = (state == S_IDLE) && req && !xs_valid;

  // store: chill first (TLB), same cycle as the write when granted
  assign ich_valid  = idle_req && lk_hit && we && !pseudo && hit;
  assign warm_valid = (state == S_WARM);

  // external store: TLB chill through RT plus data update
  assign txs_valid = (state == S_IDLE) && xs_valid;
  assign txs_rpage = xs_ra[RA_W-1:PAGE_BITS];
  assign xs_done   = txs_valid && txs_ready;
  logic [LIW-1:0] xs_idx;
  logic           xs_hit;
  assign xs_idx = xs_ra[4 +: LIW];
  assign xs_hit = vld[xs_idx] && !tag[xs_idx].flag && (tag[xs_idx].ra[RA_W-1:4] == xs_ra[RA_W-1:4]);

  // victim
  logic victim_dirty;
  assign victim_dirty = vld[idx] && dirty[idx] && !tag[idx].flag;

  // translator port
  assign lr_req = (state == S_FLUSH) || (state == S_REFILL);
  assign lr_we  = (state == S_FLUSH);
  assign lr_key = (state == S_FLUSH) ? tag[idx] : key;
  always_comb for (int w = 0; w < int'(WORDS_PER_LINE); w++) lr_wdata[w] = data[idx][w];

  // cleanup port
  // cleanup uses the arrays while they are idle: no request, or a miss
  // waiting for the translator / memory
  assign cl_grant = ((state == S_IDLE) && !req && !xs_valid) ||
                    (((state == S_REFILL) || (state == S_FLUSH)) && !lr_ack);
  assign cl_flag  = vld[cl_li] && tag[cl_li].flag;
  assign cl_ra    = tag[cl_li].ra;
  assign cl_sn    = lsn[cl_li];

  // --------------------------------------------------------- responses
  always_comb begin
    ack   = 1'b0;
    fault = 1'b0;
    rdata = data[idx][wsel];
    rmeta = meta[idx];
    if (idle_req) begin
      if (!lk_hit || (we && pseudo)) begin
        ack   = 1'b1;
        fault = 1'b1;
      end else if (hit && (!we || ich_ready)) begin
        ack = 1'b1;
      end
    end else if (state == S_REFILL && lr_ack && nocache) begin
      ack   = 1'b1;
      rdata = lr_rdata[wsel];
      rmeta = lr_meta;
    end
  end

  assign ev_hit      = idle_req && lk_hit && hit && ack;
  assign ev_miss_ti  = idle_req && lk_hit && !hit && pseudo && lk_hot;
  assign ev_miss_ord = idle_req && lk_hit && !hit && !pseudo;
  assign ev_flush    = (state == S_FLUSH) && lr_ack;
  assign ev_uncached = (state == S_REFILL) && lr_ack && nocache;

  // --------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      nocache <= 1'b0;
      vld     <= '0;
      dirty   <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (idle_req && lk_hit && !(we && pseudo)) begin
            if (pseudo && !lk_hot) begin
              state <= S_WARM;
            end else if (hit) begin
              if (we && ich_ready) dirty[idx] <= 1'b1;
            end else begin
              nocache <= 1'b0;
              state   <= victim_dirty ? S_FLUSH : S_REFILL;
            end
          end
        end
        S_WARM: begin
          if (warm_ready) begin
            if (warm_ok) state <= S_IDLE;      // retry, page now hot
            else begin
              nocache <= 1'b1;
              state   <= S_REFILL;
            end
          end
        end
        S_FLUSH: if (lr_ack) begin
          dirty[idx] <= 1'b0;
          state      <= S_REFILL;
        end
        S_REFILL: if (lr_ack) begin
          if (!nocache) begin
            vld[idx]   <= 1'b1;
            dirty[idx] <= 1'b0;
          end
          nocache <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // line storage (no reset: a line is read only while its valid bit is set)
  logic fill_we;
  assign fill_we = (state == S_REFILL) && lr_ack && !nocache;
  always_ff @(posedge clk) begin
    if (cl_grant && cl_we) lsn[cl_li] <= cl_sn_w;
    if (state == S_IDLE) begin
      if (xs_done && xs_hit) data[xs_idx][xs_ra[3:2]] <= xs_data;
      if (idle_req && lk_hit && !pseudo && hit && we && ich_ready) data[idx][wsel] <= wdata;
    end
    if (fill_we) begin
      tag[idx]  <= key;
      // a line filled under a TLB SN still labelled with the last cycle is
      // labelled with the current one, as cleanup would have done
      lsn[idx]  <= (lk_sn.y == cy - 2'd1) ? '{y: cy, n: lk_sn.n} : lk_sn;
      meta[idx] <= pseudo ? lr_meta : '0;
      for (int w = 0; w < int'(WORDS_PER_LINE); w++) data[idx][w] <= lr_rdata[w];
    end
  end

  // a request is held stable until it is acknowledged
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (req && !ack) |=> (req && $stable(addr) && $stable(we));
  endproperty
  a_hold: assert property (p_hold);
endmodule
