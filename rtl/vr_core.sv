// vr_core: the VR, a simple 32-bit RISC with 64 registers that executes both
// native code and translated VAX instructions (TIs), extended for VAX
// emulation.
//
// Base machine: load/store with 16-bit displacement, load immediate
// (r1 := r2 + d, and r1 := r2 + d*2**16), operate r1 := r2 op r3 with r2
// optionally a 6-bit signed literal, shift/extract of a field of the
// 64-bit pair (r2, r3), delayed conditional branch on a comparison of r1
// with 0 or a bit of r1, and jump-and-link.  r0 reads as the PC and ignores
// writes.  VAX extensions: byte addresses with an unaligned-reference trap
// that captures address and register; ^B / ^W loads and stores that ignore
// the low address bits (^W traps on 11) and leave them in the BN
// pseudo-register for the byte-field extract/insert; operate on the low
// byte or halfword only, with condition codes of that size; condition-code
// pseudo-registers NZ (r60, holds the result), C (r61) and V (r62), set by
// operate TIs on request and by 32-bit loads and stores whose register is
// one of the VAX registers; sign extension of a byte or halfword; the VPC
// pseudo-register r15; and the VAX branch
// VBR, which loads VPC and converts it to the 39-bit PC.  Next-PC logic,
// including the implicit where/when branch between VIs, is in fetch_seq.
//
// Microarchitecture (this design's own, the base RISC's pipeline is not
// reproduced): one instruction at a time, fetch then execute, plus one
// memory access for loads and stores; every access goes through the cache
// port (req held until ack).  A TRAP TI, an unaligned reference or a TLB
// miss stops the core with trap_code set (a full system would enter
// extracode here).  LI/LIH with r2 = 0 use base 0, not the PC.
module vr_core
  import vor_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,        // load boot_pc/boot_vpc and run
  input  logic [PA_W-1:0] boot_pc,
  input  logic [31:0]     boot_vpc,
  // cache port
  output logic            req,
  output logic [PA_W-1:0] addr,
  output logic            we,
  output word_t           wdata,
  input  logic            ack,
  input  word_t           rdata,
  input  line_meta_t      rmeta,
  input  logic            fault,
  // status
  output logic            running,
  output logic            halted,
  output logic [15:0]     trap_code,
  output logic [31:0]     trap_addr,
  output logic [5:0]      trap_reg,
  output logic [PA_W-1:0] pc,
  output logic [31:0]     vpc,
  output logic            joined,
  output logic [31:0]     nz,
  output logic            cc_c,
  output logic            cc_v,
  // debug read of the register file
  input  logic [5:0]      dbg_reg,
  output word_t           dbg_val,
  // events
  output logic            ev_retire,
  output logic            ev_implicit,
  output logic            ev_vbr,
  output logic            ev_delayed
);
  typedef enum logic [1:0] {S_STOP, S_FETCH, S_EXEC, S_MEM} state_t;
  state_t state;

  word_t      rf [64];
  word_t      ir;
  line_meta_t ir_meta;
  logic [1:0] bn;
  logic       v;

  assign cc_v = v;

  // --------------------------------------------------------------- fields
  opcode_t     op;
  logic [5:0]  r1, r2, r3;
  logic [15:0] d16;
  alu_func_t   fn;
  logic        lit;
  logic [1:0]  ccm, sz;
  assign op  = opcode_t'(ir[31:28]);
  assign r1  = ir[27:22];
  assign r2  = ir[21:16];
  assign r3  = ir[15:10];
  assign d16 = ir[15:0];
  assign fn  = alu_func_t'(ir[9:6]);
  assign lit = ir[5];
  assign ccm = ir[4:3];
  assign sz  = ir[2:1];

  function automatic word_t rd(input logic [5:0] r);
    case (r)
      R_PC:    return pc[31:0];
      R_VPC:   return vpc;
      R_NZ:    return nz;
      R_C:     return {31'b0, cc_c};
      R_V:     return {31'b0, v};
      R_BN:    return {30'b0, bn};
      default: return rf[r];
    endcase
  endfunction

  assign dbg_val = rd(dbg_reg);

  word_t a2, a3, a1, ea;
  assign a1 = rd(r1);
  assign a2 = rd(r2);
  assign a3 = rd(r3);
  assign ea = a2 + {{16{d16[15]}}, d16};

  // --------------------------------------------------------------- ALU
  word_t      alu_res, alu_nz;
  logic       alu_c, alu_v;
  always_comb begin
    word_t x, y, r;
    logic [32:0] s;
    logic [4:0]  sh;
    x = lit ? {{26{r2[5]}}, r2} : a2;
    y = a3;
    sh = (sz == 2'd0) ? 5'd24 : (sz == 2'd1) ? 5'd16 : 5'd0;
    // align the operand size to bit 31 so carry and overflow come out right
    x = x << sh;
    y = y << sh;
    s = '0;
    alu_c = 1'b0;
    alu_v = 1'b0;
    case (fn)
      F_ADD: begin
        s = {1'b0, x} + {1'b0, y};
        r = s[31:0];
        alu_c = s[32];
        alu_v = (x[31] == y[31]) && (r[31] != x[31]);
      end
      F_SUB: begin
        s = {1'b0, x} - {1'b0, y};
        r = s[31:0];
        alu_c = s[32];            // borrow
        alu_v = (x[31] != y[31]) && (r[31] != x[31]);
      end
      F_AND:  r = x & y;
      F_OR:   r = x | y;
      F_XOR:  r = x ^ y;
      F_BIC:  r = y & ~x;
      F_SHL:  r = y << x[4:0];
      F_SHR:  r = y >> x[4:0];
      F_SAR:  r = $signed(y) >>> x[4:0];
      F_PASS: r = x;
      F_SXB:  r = {{24{y[7]}}, y[7:0]};
      F_SXH:  r = {{16{y[15]}}, y[15:0]};
      default: r = '0;
    endcase
    alu_nz = word_t'($signed(r) >>> sh);   // sign-extended sized result
    case (sz)
      2'd0:    alu_res = {a1[31:8], r[31:24]};
      2'd1:    alu_res = {a1[31:16], r[31:16]};
      default: alu_res = r;
    endcase
  end

  // extract / insert
  word_t ext_res, extb_res, ins_res, fmask;
  always_comb begin
    logic [63:0] pair;
    pair     = {a2, a3} >> ir[9:5];
    fmask    = (ir[4:0] == 5'd31) ? 32'hFFFF_FFFF : ((32'd1 << (ir[4:0] + 1'b1)) - 1'b1);
    ext_res  = pair[31:0] & fmask;
    extb_res = (a3 >> {bn, 3'b000}) & fmask;
    ins_res  = (a1 & ~(fmask << {bn, 3'b000})) | ((a3 & fmask) << {bn, 3'b000});
  end

  // --------------------------------------------------------------- branches
  logic is_misc_vbr, is_trap, br_taken, vbr_taken;
  logic [15:0] br_off;
  logic [PA_W-1:0] br_target;
  cond_t bc;
  assign bc          = cond_t'(ir[21:18]);
  assign is_misc_vbr = (op == OP_MISC) && (ir[27:24] == MISC_VBR);
  assign is_trap     = (op == OP_MISC) && (ir[27:24] == MISC_TRAP);
  assign br_off      = (bc == C_BS || bc == C_BC) ? {{5{d16[10]}}, d16[10:0]} : d16;
  assign br_taken    = (op == OP_BR) && cond_true(bc, a1, {1'b0, d16[15:11]});
  assign br_target   = (op == OP_BR) ? pc + {{23{br_off[15]}}, br_off}
                                     : {7'b0, ea};
  assign vbr_taken   = is_misc_vbr && cond_true(cond_t'(ir[15:12]), nz, 6'd0);

  // --------------------------------------------------------------- control
  logic is_load, is_store, mem_op, misalign, fs_adv;
  assign is_load  = (op == OP_LD) || (op == OP_LDB) || (op == OP_LDW);
  assign is_store = (op == OP_ST) || (op == OP_STB) || (op == OP_STW);
  assign mem_op   = is_load || is_store;
  assign misalign = ((op == OP_LD || op == OP_ST) && ea[1:0] != 2'b00) ||
                    ((op == OP_LDW || op == OP_STW) && ea[1:0] == 2'b11);

  assign req   = (state == S_FETCH) || (state == S_MEM);
  assign addr  = (state == S_FETCH) ? pc : {7'b0, ea[31:2], 2'b00};
  assign we    = (state == S_MEM) && is_store;
  assign wdata = a1;

  // instruction completes
  assign fs_adv = ((state == S_EXEC) && !mem_op && !is_trap) ||
                  ((state == S_MEM) && ack && !fault);
  assign ev_retire = fs_adv;
  assign ev_vbr    = fs_adv && vbr_taken;

  // register write of the current instruction
  logic        wr_en;
  logic [5:0]  wr_r;
  word_t       wr_v;
  always_comb begin
    wr_en = 1'b0;
    wr_r  = r1;
    wr_v  = '0;
    if (state == S_EXEC) begin
      case (op)
        OP_LI:   begin wr_en = 1'b1; wr_v = ((r2 == 6'd0) ? 32'd0 : a2) + {{16{d16[15]}}, d16}; end
        OP_LIH:  begin wr_en = 1'b1; wr_v = ((r2 == 6'd0) ? 32'd0 : a2) + {d16, 16'b0}; end
        OP_ALU:  begin wr_en = 1'b1; wr_v = alu_res; end
        OP_EXT:  begin wr_en = 1'b1; wr_v = ext_res; end
        OP_EXTB: begin wr_en = 1'b1; wr_v = extb_res; end
        OP_INS:  begin wr_en = 1'b1; wr_v = ins_res; end
        OP_JMPL: begin wr_en = 1'b1; wr_v = pc[31:0] + 32'd8; end
        default: ;
      endcase
    end else if (state == S_MEM && ack && !fault && is_load) begin
      wr_en = 1'b1;
      wr_v  = rdata;
    end
  end

  fetch_seq u_fs (
    .clk, .rst_n,
    .load      (start),
    .boot_pc, .boot_vpc,
    .advance   (fs_adv),
    .meta      (ir_meta),
    .br_valid  ((state == S_EXEC) && (br_taken || op == OP_JMPL)),
    .br_target (br_target),
    .vbr_taken ((state == S_EXEC) && vbr_taken),
    .vbr_vpc   (a2 + {{20{ir[11]}}, ir[11:0]}),
    .vpc_we    (wr_en && wr_r == R_VPC),
    .vpc_wdata (wr_v),
    .pc, .vpc, .joined,
    .ev_implicit,
    .ev_delayed
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_STOP;
      halted    <= 1'b0;
      trap_code <= '0;
      trap_addr <= '0;
      trap_reg  <= '0;
      ir        <= '0;
      ir_meta   <= '0;
      bn        <= '0;
      nz        <= '0;
      cc_c      <= 1'b0;
      v         <= 1'b0;
      for (int i = 0; i < 64; i++) rf[i] <= '0;
    end else begin
      if (wr_en) begin
        case (wr_r)
          R_PC, R_VPC: ;
          R_NZ: nz   <= wr_v;
          R_C:  cc_c <= wr_v[0];
          R_V:  v    <= wr_v[0];
          R_BN: bn   <= wr_v[1:0];
          default: rf[wr_r] <= wr_v;
        endcase
      end
      case (state)
        S_STOP: if (start) begin
          state  <= S_FETCH;
          halted <= 1'b0;
        end
        S_FETCH: if (ack) begin
          if (fault) begin
            state     <= S_STOP;
            halted    <= 1'b1;
            trap_code <= TRAP_TLBMISS;
            trap_addr <= pc[31:0];
          end else begin
            ir      <= rdata;
            ir_meta <= rmeta;
            state   <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (is_trap) begin
            state     <= S_STOP;
            halted    <= 1'b1;
            trap_code <= ir[15:0];
            trap_addr <= vpc;
          end else if (mem_op) begin
            if (misalign) begin
              state     <= S_STOP;
              halted    <= 1'b1;
              trap_code <= TRAP_UNALIGNED;
              trap_addr <= ea;
              trap_reg  <= r1;
              if (op == OP_LDW || op == OP_STW) bn <= 2'b00;
            end else begin
              if (op == OP_LDB || op == OP_STB || op == OP_LDW || op == OP_STW) bn <= ea[1:0];
              state <= S_MEM;
            end
          end else begin
            state <= S_FETCH;
          end
          if (op == OP_ALU && ccm != CC_NONE && !(wr_r == R_NZ)) begin
            nz <= alu_nz;
            if (ccm == CC_NZV0) v <= 1'b0;
            if (ccm == CC_ALL) begin
              cc_c <= alu_c;
              v    <= alu_v;
            end
          end
        end
        S_MEM: if (ack) begin
          if (fault) begin
            state     <= S_STOP;
            halted    <= 1'b1;
            trap_code <= TRAP_TLBMISS;
            trap_addr <= ea;
          end else begin
            // 32-bit load/store of a VAX register sets NZ and clears V
            if ((op == OP_LD || op == OP_ST) && is_vax_reg(r1)) begin
              nz <= (op == OP_LD) ? rdata : a1;
              v  <= 1'b0;
            end
            state <= S_FETCH;
          end
        end
        default: state <= S_STOP;
      endcase
    end
  end

  assign running = (state != S_STOP);
endmodule
