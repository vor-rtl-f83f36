// rt_table: the RT ("real address to TLB index") table.  A direct-mapped
// table indexed by the low bits of a real page number; each entry holds the
// index of the TLB entry that currently owns that slot.  It lets a store
// that arrives with only a real address (another processor, an i/o device)
// find the TLB entry, and with it the sequence number, of a hot page.
// Depth and width follow the design (1024 entries of a 10-bit TLB index).
// Two asynchronous read ports, one synchronous write port.  Entries are not
// reset: a user must check that the entry read back owns the page.
module rt_table #(
  parameter int unsigned RT_SIZE = 1024,
  parameter int unsigned TLB_IW  = 10,
  localparam int unsigned RT_IW  = $clog2(RT_SIZE)
) (
  input  logic              clk,
  input  logic [RT_IW-1:0]  ra_idx,   // read port A
  output logic [TLB_IW-1:0] ra_tlbi,
  input  logic [RT_IW-1:0]  rb_idx,   // read port B
  output logic [TLB_IW-1:0] rb_tlbi,
  input  logic              we,
  input  logic [RT_IW-1:0]  w_idx,
  input  logic [TLB_IW-1:0] w_tlbi
);
  logic [TLB_IW-1:0] mem [RT_SIZE];

  always_ff @(posedge clk) begin
    if (we) mem[w_idx] <= w_tlbi;
  end

  assign ra_tlbi = mem[ra_idx];
  assign rb_tlbi = mem[rb_idx];
endmodule
