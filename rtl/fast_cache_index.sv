// fast_cache_index: addresses a direct-mapped cache with virtual-address
// bits before the TLB has produced the real address, and retries with the
// real address when the guess was wrong.
//
// The cache line index is address bits [OFF_W +: IDX_W].  The low part of
// it, below PAGE_BITS, is the same in the virtual address VA and the real
// address RA.  The bits at and above PAGE_BITS are the "dubious" bits: the
// VA and RA agree there only if the operating system placed the page so.
// In the first clock of a request the index comes from VA, and the TLB
// lookup runs in parallel.  At the end of that clock the dubious bits of
// VA and RA are compared alongside the tag compare: if they agree, the
// tag compare of this clock is valid (ok = 1).  If not, the RA index is
// latched and the next clock re-addresses the cache with it (a one-clock
// stall, stall = 1 in the first clock); the tag compare of that second
// clock is valid.
//
// Interface: req and va are held by the requester until ok; ra arrives
// from the TLB in the same clock as va.  idx goes to the cache arrays
// combinationally; ok says the array output read with idx belongs to the
// real address; ev_stall pulses once per retry.
//
// The method and the one-clock penalty follow the design description.  The
// parameter defaults are its 64 KB direct-mapped cache with 16-byte lines
// and 512-byte pages, which leaves 7 dubious bits.  The cache model of this
// design (ti_cache) indexes with the real address in the same clock as its
// TLB lookup, so this block stands on its own and is not wired into the top.
// Only the index bits of va and ra are used here; their tag bits go to the
// tag compare outside this block, so lint reports them as unused.
module fast_cache_index #(
  parameter int unsigned IDX_W     = 12,
  parameter int unsigned OFF_W     = 4,
  parameter int unsigned PAGE_BITS = 9,
  parameter int unsigned RA_W      = 30
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic [31:0]      va,
  input  logic [RA_W-1:0]  ra,
  output logic [IDX_W-1:0] idx,
  output logic             ok,
  output logic             stall,
  output logic             ev_stall
);
  localparam int unsigned TOP = OFF_W + IDX_W;  // first address bit above the index

  logic             retry;
  logic [IDX_W-1:0] ra_idx_q;
  logic             agree;

  assign agree = va[TOP-1:PAGE_BITS] == ra[TOP-1:PAGE_BITS];
  assign idx   = retry ? ra_idx_q : va[OFF_W +: IDX_W];
  assign ok    = req && (retry || agree);
  assign stall = req && !retry && !agree;
  assign ev_stall = stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      retry    <= 1'b0;
      ra_idx_q <= '0;
    end else begin
      retry <= stall;
      if (stall) ra_idx_q <= ra[OFF_W +: IDX_W];
    end
  end
endmodule
