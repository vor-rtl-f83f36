// fetch_seq: next-PC logic of the VR, including the implicit branch that
// takes the VR from one translated VAX instruction (VI) to the next.
//
// The PC is 39 bits wide so that it can hold pseudo-addresses
// (VAX PC + 2**32) << 6.  Every cache line of TIs carries two small numbers:
// where, added to the address of the line's first word to give the branch
// target, and when, which makes the branch happen after the TI in word
// when-1 of the line (0 disables it).  The implicit branch costs no
// instruction and no cycle: it is evaluated alongside the TI it follows.
// On an implicit branch the VPC pseudo-register (r15, the VAX PC) is set to
// the VAX address of the target, (PC >> 6) - 2**32; it is not changed by the
// TIs of a VI otherwise.  Explicit VR branches are delayed by one
// instruction, as on the base RISC; the VAX branch VBR takes effect at once
// and loads both VPC and PC = (VPC + 2**32) << 6.  Priority when several
// apply to one instruction: VBR, then a pending delayed branch, then the
// implicit branch, then PC + 4.  joined is high while the VR executes the
// second or later word of a joined line, i.e. while the VPC does not yet
// include the length of the line's first VI.
// Interface: `load` sets PC and VPC; one update per asserted `advance`;
// outputs are registered.
module fetch_seq
  import vor_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,         // load boot_pc / boot_vpc
  input  logic [PA_W-1:0] boot_pc,
  input  logic [31:0]     boot_vpc,
  input  logic            advance,      // current instruction completes
  input  line_meta_t      meta,         // metadata of the current instruction's line
  input  logic            br_valid,     // delayed branch issued now
  input  logic [PA_W-1:0] br_target,
  input  logic            vbr_taken,    // VAX branch taken now
  input  logic [31:0]     vbr_vpc,
  input  logic            vpc_we,       // TI writes r15
  input  logic [31:0]     vpc_wdata,
  output logic [PA_W-1:0] pc,
  output logic [31:0]     vpc,
  output logic            joined,
  output logic            ev_implicit,
  output logic            ev_delayed
);
  logic            pend;
  logic [PA_W-1:0] pend_target;
  logic [PA_W-1:0] line_base, imp_target, next_pc;
  logic            implicit;

  assign line_base  = {pc[PA_W-1:4], 4'b0};
  assign imp_target = line_base + PA_W'(meta.where_off);
  assign implicit   = (meta.when_cnt != 0) && ({1'b0, pc[3:2]} == meta.when_cnt - 1'b1);

  always_comb begin
    if (vbr_taken)     next_pc = vpc_to_pc(vbr_vpc);
    else if (pend)     next_pc = pend_target;
    else if (implicit) next_pc = imp_target;
    else               next_pc = pc + PA_W'(4);
  end

  assign ev_implicit = advance && implicit && !vbr_taken && !pend;
  assign ev_delayed  = advance && pend && !vbr_taken;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= '0;
      vpc         <= '0;
      pend        <= 1'b0;
      pend_target <= '0;
      joined      <= 1'b0;
    end else if (load) begin
      pc     <= boot_pc;
      vpc    <= boot_vpc;
      pend   <= 1'b0;
      joined <= 1'b0;
    end else if (advance) begin
      pc          <= next_pc;
      pend        <= br_valid && !vbr_taken;
      pend_target <= br_target;
      joined      <= meta.joined && (next_pc[PA_W-1:4] == pc[PA_W-1:4]) &&
                     !vbr_taken && !pend && !implicit;
      if (vbr_taken)
        vpc <= vbr_vpc;
      else if ((pend && pend_target[PA_W-1]) || (!pend && implicit))
        vpc <= pc_to_vpc(next_pc);
      else if (vpc_we)
        vpc <= vpc_wdata;
    end
  end

endmodule
