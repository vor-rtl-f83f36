// translator: the translator T, which sits between the VR cache and the
// memory bus and plays the part of memory for the cache.
//
// A line request for an ordinary address is passed to memory unchanged
// (four word reads, or four word writes for a write-back) and the data
// passed back.  A request for a pseudo-address is never sent to memory:
// T fetches the VAX instruction (VI) at the line's real VAX byte address,
// decodes it, and generates the translated VR instructions (TIs) that
// emulate it; it then returns the requested line of TIs, with the line's
// implicit-branch fields where/when.  A miss on any line of a VI starts
// the translation from the VI's first byte.
//
// Decoding follows the operand-specifier scheme of the design: every
// operand is reduced to a register (R), a 6-bit signed constant (C) or a
// memory operand d(r) (M), emitting address arithmetic as needed.  Effects
// of auto-increment/decrement are not applied to the registers at once:
// T keeps an adjustment adj[r] per VAX register, folds it into later uses
// of r, and emits the register updates after the operation.  PC-relative
// operands use the VPC pseudo-register, which holds the address of the
// VI's first byte, plus the number of bytes consumed so far.  Then the
// opcode-specific Read / Do / Write steps emit the work.  After the last TI
// the line's when field makes the VR branch, in parallel, to the next VI
// (where = length << 6).  A translation of one TI is joined with the next
// VI: its first TI (or two) go in the same line, word 3 holds a TI that adds
// the first VI's length to VPC (used when the VR must recover VPC on an
// exception), and the joined bit is set.
//
// Implemented opcodes: HALT, NOP, BRB, BRW, BNEQ, BEQL, BGTR, BLEQ, BGEQ,
// BLSS, ADDL2/3, SUBL2/3, BISL2/3, BICL2/3, XORL2/3, CMPL, TSTL, MOVL,
// CLRL, INCL.  CMPL sets NZ from the difference, so N is the sign of
// src1-src2 (exact unless the subtraction overflows) and V is that of the
// subtraction rather than cleared; TSTL leaves C unchanged.  All addressing modes are
// decoded.  Anything else becomes a TRAP TI (the extracode a full system
// would call).  A VI that runs past its page also becomes a TRAP TI; the
// design's branch into the next page is not built.  Timing: one clock per
// specifier byte or emission step, plus one memory read per new word of
// the VI; pass-through lines take four memory transactions.
module translator
  import vor_pkg::*;
#(
  parameter bit JOIN = 1'b1          // join one-TI translations with the next VI
) (
  input  logic               clk,
  input  logic               rst_n,
  // cache side
  input  logic               lr_req,
  input  logic               lr_we,
  input  line_key_t          lr_key,
  input  word_t              lr_wdata [WORDS_PER_LINE],
  output logic               lr_ack,
  output word_t              lr_rdata [WORDS_PER_LINE],
  output line_meta_t         lr_meta,
  // memory bus, word addressed
  output logic               m_req,
  output logic               m_we,
  output logic [RA_W-3:0]    m_addr,
  output word_t              m_wdata,
  input  logic               m_ack,
  input  word_t              m_rdata,
  // events
  output logic               ev_translate,
  output logic               ev_join,
  output logic               ev_pass
);
  typedef enum logic [3:0] {
    T_IDLE, T_MEM, T_RESP, T_OPC, T_SPEC, T_BYTES, T_OSDONE, T_BDISP,
    T_GEN, T_ADJ, T_FIN, T_FETCH
  } tstate_t;

  typedef enum logic [3:0] {
    CL_RES, CL_HALT, CL_NOP, CL_BR, CL_BCC, CL_MOV, CL_OP2, CL_OP3,
    CL_SUB2, CL_SUB3, CL_CLR, CL_INC, CL_CMP, CL_TST
  } iclass_t;

  typedef enum logic [1:0] {K_R, K_C, K_M} kind_t;
  localparam logic [1:0] U_R = 2'd0, U_W = 2'd1, U_M = 2'd2;

  typedef struct packed {
    kind_t       k;
    logic [5:0]  rc;   // register number, or constant
    logic [15:0] md;   // M: displacement
    logic [5:0]  mr;   // M: base register
  } opnd_t;

  // ------------------------------------------------------------ state
  tstate_t st, st_n, ret, ret_n;
  line_key_t key, key_n;
  logic [RA_W-1:0] vi_ra, vi_ra_n;
  logic [5:0] pos, pos_n;
  logic       pass2, pass2_n;
  iclass_t    cls, cls_n;
  cond_t      bcond, bcond_n;
  alu_func_t  aluf, aluf_n;            // operation of an operate-class VI
  logic [1:0] alucc, alucc_n;          // its condition-code mode
  logic [1:0] nops, nops_n, opn, opn_n;
  logic [5:0] use_v, use_n;            // 3 x 2-bit use codes
  opnd_t      od [3];
  opnd_t      od_n [3];
  logic signed [15:0] adj [15];
  logic signed [15:0] adj_n [15];
  logic       hx, hx_n;                // index register pending
  logic [5:0] xr, xr_n;
  logic [3:0] smode, smode_n, sreg, sreg_n;
  logic [31:0] acc, acc_n;
  logic [2:0]  nb, nb_n, nbt, nbt_n;
  word_t      tib [16];
  word_t      tib_n [16];
  logic [4:0] tic, tic_n;
  logic       trap, trap_n;
  logic [15:0] tcode, tcode_n;
  logic [3:0] ar, ar_n;                // register walked by T_ADJ
  logic [2:0] nr, nr_n;                // next scratch register
  logic [5:0] len1, len1_n;
  word_t      t1, t1_n;
  logic [1:0] mw, mw_n;                // pass-through word counter
  word_t      ob [WORDS_PER_LINE];
  word_t      ob_n [WORDS_PER_LINE];
  line_meta_t om, om_n;
  logic [RA_W-3:0] wba, wba_n;
  word_t      wbd, wbd_n;
  logic       wbv, wbv_n;

  // ------------------------------------------------------------ byte source
  logic [RA_W-1:0] bra;
  logic            bavail, pcross;
  logic [7:0]      bval;
  assign bra    = vi_ra + RA_W'(pos);
  assign pcross = ({1'b0, vi_ra[PAGE_BITS-1:0]} + 10'(pos)) >= 10'd512;
  assign bavail = wbv && (wba == bra[RA_W-1:2]);
  assign bval   = wbd[8*bra[1:0] +: 8];

  // ------------------------------------------------------------ outputs
  assign lr_ack   = (st == T_RESP);
  assign lr_rdata = ob;
  assign lr_meta  = om;
  assign m_req    = (st == T_MEM) || (st == T_FETCH);
  assign m_we     = (st == T_MEM) && key.flag == 1'b0 && lr_we;
  assign m_addr   = (st == T_FETCH) ? bra[RA_W-1:2] : {key.ra[RA_W-1:4], mw};
  assign m_wdata  = lr_wdata[mw];

  assign ev_pass      = (st == T_IDLE) && lr_req && !lr_key.flag;
  assign ev_translate = (st == T_IDLE) && lr_req && lr_key.flag;

  // ------------------------------------------------------------ helpers
  function automatic logic small16(input logic signed [31:0] v);
    return (v >= -32768) && (v <= 32767);
  endfunction

  function automatic logic [15:0] hi16(input logic [31:0] v);
    logic [31:0] t;
    t = v + 32'h0000_8000;
    return t[31:16];
  endfunction

  function automatic logic [5:0] tmp(input logic [1:0] n);
    return 6'd40 + 6'(n);
  endfunction

  function automatic logic [5:0] ttmp(input logic [1:0] n);
    return 6'd46 + 6'(n);
  endfunction

  function automatic logic [1:0] use_of(input logic [5:0] u, input logic [1:0] n);
    return u[2*n +: 2];
  endfunction

  logic join_now;

  // ------------------------------------------------------------ next state
  always_comb begin
    logic [4:0] e;            // emission index
    logic signed [31:0] dd;
    logic [5:0] a_reg, b_reg, d_reg, nreg;
    logic a_lit;
    logic [5:0] ln;
    logic bad, has_a, has_d;
    logic [5:0] vr, t;
    logic [1:0] na, nbo, nd;
    alu_func_t  f;
    logic [4:0] L;
    logic [1:0] last;
    word_t fix;

    st_n = st; ret_n = ret; key_n = key; vi_ra_n = vi_ra; pos_n = pos;
    pass2_n = pass2; cls_n = cls; bcond_n = bcond; aluf_n = aluf; alucc_n = alucc; nops_n = nops; opn_n = opn;
    use_n = use_v; od_n = od; adj_n = adj; hx_n = hx; xr_n = xr;
    smode_n = smode; sreg_n = sreg; acc_n = acc; nb_n = nb; nbt_n = nbt;
    tib_n = tib; tic_n = tic; trap_n = trap; tcode_n = tcode; ar_n = ar; nr_n = nr;
    len1_n = len1; t1_n = t1; mw_n = mw; ob_n = ob; om_n = om;
    wba_n = wba; wbd_n = wbd; wbv_n = wbv;
    join_now = 1'b0;
    e = tic;
    dd = '0; a_reg = '0; b_reg = '0; d_reg = '0; a_lit = 1'b0; nreg = '0;
    ln = '0; bad = 1'b0; has_a = 1'b1; has_d = 1'b1; vr = '0; t = '0;
    na = '0; nbo = '0; nd = '0; f = F_ADD; L = '0; last = '0; fix = '0;

    case (st)
      // ---------------------------------------------------------------
      T_IDLE: if (lr_req) begin
        key_n = lr_key;
        mw_n  = '0;
        if (!lr_key.flag) st_n = T_MEM;
        else begin
          vi_ra_n = lr_key.ra; pos_n = '0; pass2_n = 1'b0;
          st_n = T_OPC;
        end
        // fresh decoder state
        tic_n = '0; trap_n = 1'b0; hx_n = 1'b0; nr_n = '0; opn_n = '0;
        for (int r = 0; r < 15; r++) adj_n[r] = '0;
        wbv_n = 1'b0;
      end

      T_MEM: if (m_ack) begin
        if (!lr_we) ob_n[mw] = m_rdata;
        mw_n = mw + 1'b1;
        if (mw == 2'd3) begin
          om_n = '0;
          st_n = T_RESP;
        end
      end

      T_RESP: st_n = T_IDLE;

      T_FETCH: if (m_ack) begin
        wba_n = bra[RA_W-1:2]; wbd_n = m_rdata; wbv_n = 1'b1;
        st_n = ret;
      end

      // --------------------------------------------------------------- opcode
      T_OPC: begin
        if (pcross) begin
          trap_n = 1'b1; tcode_n = TRAP_PAGECROSS; st_n = T_FIN;
        end else if (!bavail) begin
          ret_n = T_OPC; st_n = T_FETCH;
        end else begin
          pos_n = pos + 1'b1;
          opn_n = '0;
          nops_n = '0; use_n = '0; bcond_n = C_ALWAYS;
          case (bval)
            8'h00: cls_n = CL_HALT;
            8'h01: cls_n = CL_NOP;
            8'h11: begin cls_n = CL_BR; nbt_n = 3'd1; end
            8'h31: begin cls_n = CL_BR; nbt_n = 3'd2; end
            8'h12: begin cls_n = CL_BCC; nbt_n = 3'd1; bcond_n = C_NE; end
            8'h13: begin cls_n = CL_BCC; nbt_n = 3'd1; bcond_n = C_EQ; end
            8'h14: begin cls_n = CL_BCC; nbt_n = 3'd1; bcond_n = C_GT; end
            8'h15: begin cls_n = CL_BCC; nbt_n = 3'd1; bcond_n = C_LE; end
            8'h18: begin cls_n = CL_BCC; nbt_n = 3'd1; bcond_n = C_GE; end
            8'h19: begin cls_n = CL_BCC; nbt_n = 3'd1; bcond_n = C_LT; end
            8'hC0: begin cls_n = CL_OP2;  nops_n = 2'd2; use_n = {2'b0, U_M, U_R}; aluf_n = F_ADD; alucc_n = CC_ALL; end
            8'hC1: begin cls_n = CL_OP3;  nops_n = 2'd3; use_n = {U_W, U_R, U_R}; aluf_n = F_ADD; alucc_n = CC_ALL; end
            8'hC2: begin cls_n = CL_SUB2; nops_n = 2'd2; use_n = {2'b0, U_M, U_R}; aluf_n = F_SUB; alucc_n = CC_ALL; end
            8'hC3: begin cls_n = CL_SUB3; nops_n = 2'd3; use_n = {U_W, U_R, U_R}; aluf_n = F_SUB; alucc_n = CC_ALL; end
            8'hC8: begin cls_n = CL_OP2;  nops_n = 2'd2; use_n = {2'b0, U_M, U_R}; aluf_n = F_OR;  alucc_n = CC_NZV0; end
            8'hC9: begin cls_n = CL_OP3;  nops_n = 2'd3; use_n = {U_W, U_R, U_R}; aluf_n = F_OR;  alucc_n = CC_NZV0; end
            8'hCA: begin cls_n = CL_OP2;  nops_n = 2'd2; use_n = {2'b0, U_M, U_R}; aluf_n = F_BIC; alucc_n = CC_NZV0; end
            8'hCB: begin cls_n = CL_OP3;  nops_n = 2'd3; use_n = {U_W, U_R, U_R}; aluf_n = F_BIC; alucc_n = CC_NZV0; end
            8'hCC: begin cls_n = CL_OP2;  nops_n = 2'd2; use_n = {2'b0, U_M, U_R}; aluf_n = F_XOR; alucc_n = CC_NZV0; end
            8'hCD: begin cls_n = CL_OP3;  nops_n = 2'd3; use_n = {U_W, U_R, U_R}; aluf_n = F_XOR; alucc_n = CC_NZV0; end
            8'hD0: begin cls_n = CL_MOV;  nops_n = 2'd2; use_n = {2'b0, U_W, U_R}; end
            8'hD1: begin cls_n = CL_CMP;  nops_n = 2'd2; use_n = {2'b0, U_R, U_R}; aluf_n = F_SUB; alucc_n = CC_ALL; end
            8'hD4: begin cls_n = CL_CLR;  nops_n = 2'd1; use_n = {4'b0, U_W}; end
            8'hD5: begin cls_n = CL_TST;  nops_n = 2'd1; use_n = {4'b0, U_R}; aluf_n = F_PASS; alucc_n = CC_NZV0; end
            8'hD6: begin cls_n = CL_INC;  nops_n = 2'd1; use_n = {4'b0, U_M}; aluf_n = F_ADD; alucc_n = CC_ALL; end
            default: cls_n = CL_RES;
          endcase
          if (cls_n == CL_BR || cls_n == CL_BCC) begin
            acc_n = '0; nb_n = '0; st_n = T_BDISP;
          end else if (nops_n != 0) st_n = T_SPEC;
          else st_n = T_GEN;
        end
      end

      // branch displacement bytes
      T_BDISP: begin
        if (pcross) begin
          trap_n = 1'b1; tcode_n = TRAP_PAGECROSS; st_n = T_FIN;
        end else if (!bavail) begin
          ret_n = T_BDISP; st_n = T_FETCH;
        end else begin
          acc_n[8*nb +: 8] = bval;
          pos_n = pos + 1'b1;
          nb_n  = nb + 1'b1;
          if (nb + 1'b1 == nbt) begin
            // sign-extend
            if (nbt == 3'd1) acc_n = {{24{acc_n[7]}}, acc_n[7:0]};
            else acc_n = {{16{acc_n[15]}}, acc_n[15:0]};
            st_n = T_GEN;
          end
        end
      end

      // --------------------------------------------------------------- specifier
      T_SPEC: begin
        if (pcross) begin
          trap_n = 1'b1; tcode_n = TRAP_PAGECROSS; st_n = T_FIN;
        end else if (!bavail) begin
          ret_n = T_SPEC; st_n = T_FETCH;
        end else begin
          pos_n   = pos + 1'b1;
          smode_n = bval[7:4];
          sreg_n  = bval[3:0];
          acc_n   = '0; nb_n = '0; nbt_n = '0;
          case (bval[7:4])
            4'h0, 4'h1, 4'h2, 4'h3: begin
              if (use_of(use_v, opn) != U_R || hx) begin
                trap_n = 1'b1; tcode_n = TRAP_RESOPND; st_n = T_FIN;
              end else st_n = T_OSDONE;
            end
            4'h4: begin
              if (hx || bval[3:0] == 4'hF) begin
                trap_n = 1'b1; tcode_n = TRAP_RESOPND; st_n = T_FIN;
              end else begin
                hx_n = 1'b1;
                if (adj[bval[3:0]] == 0) xr_n = vreg(bval[3:0]);
                else begin
                  xr_n = 6'd52 + 6'(nr);
                  nr_n = nr + 1'b1;
                  tib_n[e[3:0]] = ti_mem(OP_LI, 6'd52 + 6'(nr), vreg(bval[3:0]), adj[bval[3:0]]);
                  e = e + 1'b1;
                end
              end
            end
            4'h8, 4'h9: begin
              if (bval[3:0] == 4'hF) begin nbt_n = 3'd4; st_n = T_BYTES; end
              else st_n = T_OSDONE;
            end
            4'hA, 4'hB: begin nbt_n = 3'd1; st_n = T_BYTES; end
            4'hC, 4'hD: begin nbt_n = 3'd2; st_n = T_BYTES; end
            4'hE, 4'hF: begin nbt_n = 3'd4; st_n = T_BYTES; end
            default: st_n = T_OSDONE;   // 5, 6, 7
          endcase
        end
      end

      T_BYTES: begin
        if (pcross) begin
          trap_n = 1'b1; tcode_n = TRAP_PAGECROSS; st_n = T_FIN;
        end else if (!bavail) begin
          ret_n = T_BYTES; st_n = T_FETCH;
        end else begin
          acc_n[8*nb +: 8] = bval;
          pos_n = pos + 1'b1;
          nb_n  = nb + 1'b1;
          if (nb + 1'b1 == nbt) begin
            if (nbt == 3'd1) acc_n = {{24{acc_n[7]}}, acc_n[7:0]};
            else if (nbt == 3'd2) acc_n = {{16{acc_n[15]}}, acc_n[15:0]};
            st_n = T_OSDONE;
          end
        end
      end

      // operand fully read: encode it (Table of operand handling)
      T_OSDONE: begin
        vr  = vreg(sreg);
        t   = tmp(opn);
        od_n[opn] = '{k: K_M, rc: t, md: '0, mr: t};
        // displacement relative to r including pending adjustment;
        // for PC the adjustment is the byte count consumed so far
        dd = $signed(acc) + ((sreg == 4'hF) ? 32'(pos) + (pass2 ? 32'(len1) : 32'd0)
                                             : 32'($signed(adj[sreg])));
        case (smode)
          4'h0, 4'h1, 4'h2, 4'h3: begin
            if (smode[1] == 1'b0) begin       // 0..31 fits the signed constant
              od_n[opn] = '{k: K_C, rc: {smode[1:0], sreg}, md: '0, mr: '0};
            end else begin
              od_n[opn] = '{k: K_R, rc: t, md: '0, mr: '0};
              tib_n[e[3:0]] = ti_mem(OP_LI, t, R_PC, {10'b0, smode[1:0], sreg});
              e = e + 1'b1;
            end
          end
          4'h5: begin
            if (hx || sreg == 4'hF) bad = 1'b1;
            else if (adj[sreg] == 0) od_n[opn] = '{k: K_R, rc: vr, md: '0, mr: '0};
            else begin
              nreg = 6'd52 + 6'(nr); nr_n = nr + 1'b1;
              od_n[opn] = '{k: K_R, rc: nreg, md: '0, mr: '0};
              tib_n[e[3:0]] = ti_mem(OP_LI, nreg, vr, adj[sreg]);
              e = e + 1'b1;
            end
          end
          4'h6, 4'hA, 4'hC, 4'hE: begin       // (r), d(r)
            if (small16(dd)) od_n[opn] = '{k: K_M, rc: t, md: dd[15:0], mr: vr};
            else begin
              tib_n[e[3:0]] = ti_mem(OP_LIH, t, vr, hi16(dd));
              e = e + 1'b1;
              od_n[opn] = '{k: K_M, rc: t, md: dd[15:0], mr: t};
            end
          end
          4'hB, 4'hD, 4'hF: begin             // @d(r)
            if (small16(dd)) begin
              tib_n[e[3:0]] = ti_mem(OP_LD, t, vr, dd[15:0]);
              e = e + 1'b1;
            end else begin
              tib_n[e[3:0]] = ti_mem(OP_LIH, t, vr, hi16(dd));
              tib_n[4'(e + 1'b1)] = ti_mem(OP_LD, t, t, dd[15:0]);
              e = e + 5'd2;
            end
            od_n[opn] = '{k: K_M, rc: t, md: '0, mr: t};
          end
          4'h7: begin                          // -(r)
            if (sreg == 4'hF) bad = 1'b1;
            else begin
              adj_n[sreg] = adj[sreg] - 16'sd4;
              od_n[opn] = '{k: K_M, rc: t, md: adj[sreg] - 16'sd4, mr: vr};
            end
          end
          4'h8: begin                          // (r)+ or immediate
            if (sreg == 4'hF) begin
              if (use_of(use_v, opn) != U_R) bad = 1'b1;
              else begin
                od_n[opn] = '{k: K_R, rc: t, md: '0, mr: '0};
                if (small16(acc)) begin
                  tib_n[e[3:0]] = ti_mem(OP_LI, t, R_PC, acc[15:0]);
                  e = e + 1'b1;
                end else begin
                  tib_n[e[3:0]] = ti_mem(OP_LIH, t, R_PC, hi16(acc));
                  tib_n[4'(e + 1'b1)] = ti_mem(OP_LI, t, t, acc[15:0]);
                  e = e + 5'd2;
                end
              end
            end else begin
              od_n[opn] = '{k: K_M, rc: t, md: adj[sreg], mr: vr};
              adj_n[sreg] = adj[sreg] + 16'sd4;
            end
          end
          4'h9: begin                          // @(r)+ or absolute
            if (sreg == 4'hF) begin
              tib_n[e[3:0]] = ti_mem(OP_LIH, t, R_PC, hi16(acc));
              e = e + 1'b1;
              od_n[opn] = '{k: K_M, rc: t, md: acc[15:0], mr: t};
            end else begin
              tib_n[e[3:0]] = ti_mem(OP_LD, t, vr, adj[sreg]);
              e = e + 1'b1;
              od_n[opn] = '{k: K_M, rc: t, md: '0, mr: t};
              adj_n[sreg] = adj[sreg] + 16'sd4;
            end
          end
          default: bad = 1'b1;
        endcase
        // index: address := base + 4 * x
        if (hx && !bad) begin
          if (od_n[opn].k != K_M) bad = 1'b1;
          else begin
            tib_n[e[3:0]] = ti_alu(F_SHL, ttmp(opn), 6'd2, 1'b1, xr, CC_NONE);
            tib_n[4'(e + 1'b1)] = ti_alu(F_ADD, t, ttmp(opn), 1'b0, od_n[opn].mr, CC_NONE);
            e = e + 5'd2;
            od_n[opn].mr = t;
          end
        end
        hx_n = 1'b0;
        if (bad) begin
          trap_n = 1'b1; tcode_n = TRAP_RESOPND; st_n = T_FIN;
        end else if (opn + 1'b1 == nops) st_n = T_GEN;
        else begin
          opn_n = opn + 1'b1;
          st_n  = T_SPEC;
        end
      end

      // --------------------------------------------------------------- work
      T_GEN: begin
        case (cls)
          CL_HALT: begin trap_n = 1'b1; tcode_n = TRAP_HALT; end
          CL_RES:  begin trap_n = 1'b1; tcode_n = TRAP_RESINSTR; end
          CL_NOP:  ;
          CL_BR, CL_BCC: begin
            dd = $signed(acc) + 32'(pos) + (pass2 ? 32'(len1) : 32'd0);
            if (dd >= -2048 && dd <= 2047) begin
              tib_n[e[3:0]] = ti_vbr(bcond, R_VPC, dd[11:0]);
              e = e + 1'b1;
            end else begin
              tib_n[e[3:0]] = ti_mem(OP_LI, tmp(2'd0), R_VPC, dd[15:0]);
              tib_n[4'(e + 1'b1)] = ti_vbr(bcond, tmp(2'd0), 12'd0);
              e = e + 5'd2;
            end
          end
          CL_MOV: begin
            if (od[1].k == K_C) bad = 1'b1;
            else if (od[1].k == K_R) begin
              if (od[0].k == K_M) begin
                tib_n[e[3:0]] = ti_mem(OP_LD, od[1].rc, od[0].mr, od[0].md);
              end else begin
                tib_n[e[3:0]] = ti_alu(F_PASS, od[1].rc, od[0].rc, od[0].k == K_C, 6'd0, CC_NZV0);
              end
              e = e + 1'b1;
            end else begin
              if (od[0].k == K_R && is_vax_reg(od[0].rc)) begin
                a_reg = od[0].rc;
              end else begin
                a_reg = tmp(2'd0);
                if (od[0].k == K_M) begin
                  tib_n[e[3:0]] = ti_mem(OP_LD, a_reg, od[0].mr, od[0].md);
                  e = e + 1'b1;
                  tib_n[e[3:0]] = ti_alu(F_PASS, a_reg, a_reg, 1'b0, 6'd0, CC_NZV0);
                end else begin
                  tib_n[e[3:0]] = ti_alu(F_PASS, a_reg, od[0].rc, od[0].k == K_C, 6'd0, CC_NZV0);
                end
                e = e + 1'b1;
              end
              tib_n[e[3:0]] = ti_mem(OP_ST, a_reg, od[1].mr, od[1].md);
              e = e + 1'b1;
            end
          end
          CL_CLR: begin
            if (od[0].k == K_C) bad = 1'b1;
            else begin
              d_reg = (od[0].k == K_R) ? od[0].rc : tmp(2'd0);
              tib_n[e[3:0]] = ti_alu(F_PASS, d_reg, 6'd0, 1'b1, 6'd0, CC_NZV0);
              e = e + 1'b1;
              if (od[0].k == K_M) begin
                tib_n[e[3:0]] = ti_mem(OP_ST, d_reg, od[0].mr, od[0].md);
                e = e + 1'b1;
              end
            end
          end
          default: begin   // operate classes: OP2, OP3, SUB2, SUB3, INC, CMP, TST
            has_a = 1'b1;
            f  = aluf;
            na = 2'd0; nbo = 2'd1; nd = 2'd1;
            case (cls)
              CL_OP3:  begin na = 2'd0; nbo = 2'd1; nd = 2'd2; end
              CL_CMP:  begin na = 2'd0; nbo = 2'd1; has_d = 1'b0; end
              CL_TST:  begin na = 2'd0; nbo = 2'd0; has_d = 1'b0; end
              CL_SUB2: begin na = 2'd1; nbo = 2'd0; nd = 2'd1; end
              CL_SUB3: begin na = 2'd1; nbo = 2'd0; nd = 2'd2; end
              CL_INC:  begin has_a = 1'b0; nbo = 2'd0; nd = 2'd0; end
              default: ;
            endcase
            // literal-capable first ALU operand
            if (!has_a) begin a_lit = 1'b1; a_reg = 6'd1; end
            else if (od[na].k == K_C) begin a_lit = 1'b1; a_reg = od[na].rc; end
            else if (od[na].k == K_R) a_reg = od[na].rc;
            else begin
              a_reg = tmp(na);
              tib_n[e[3:0]] = ti_mem(OP_LD, a_reg, od[na].mr, od[na].md);
              e = e + 1'b1;
            end
            // register second operand (TST has none)
            if (cls == CL_TST) b_reg = 6'd0;
            else if (od[nbo].k == K_R) b_reg = od[nbo].rc;
            else if (od[nbo].k == K_C) begin
              b_reg = tmp(nbo);
              tib_n[e[3:0]] = ti_alu(F_PASS, b_reg, od[nbo].rc, 1'b1, 6'd0, CC_NONE);
              e = e + 1'b1;
            end else begin
              b_reg = tmp(nbo);
              tib_n[e[3:0]] = ti_mem(OP_LD, b_reg, od[nbo].mr, od[nbo].md);
              e = e + 1'b1;
            end
            if (has_d && od[nd].k == K_C) bad = 1'b1;
            d_reg = !has_d ? tmp(2'd2) : (od[nd].k == K_R) ? od[nd].rc : tmp(nd);
            tib_n[e[3:0]] = ti_alu(f, d_reg, a_reg, a_lit, b_reg, alucc);
            e = e + 1'b1;
            if (has_d && od[nd].k == K_M) begin
              tib_n[e[3:0]] = ti_mem(OP_ST, d_reg, od[nd].mr, od[nd].md);
              e = e + 1'b1;
            end
          end
        endcase
        if (bad) begin trap_n = 1'b1; tcode_n = TRAP_RESOPND; end
        ar_n = '0;
        st_n = (trap_n) ? T_FIN : T_ADJ;
      end

      // register updates for auto-increment / auto-decrement
      T_ADJ: begin
        if (adj[ar] != 0) begin
          tib_n[e[3:0]] = ti_mem(OP_LI, vreg(ar), vreg(ar), adj[ar]);
          e = e + 1'b1;
        end
        ar_n = ar + 1'b1;
        if (ar == 4'd14) st_n = T_FIN;
      end

      // --------------------------------------------------------------- lines
      T_FIN: begin
        if (trap || tic > 5'd16 || pos > 6'd62) begin
          tib_n[0] = ti_trap((tic > 5'd16) ? TRAP_TOOLONG : tcode);
          tib_n[1] = TI_NOP;
          tic_n    = 5'd2;
          trap_n   = 1'b1;
        end
        if (!pass2) begin
          len1_n = pos;
          if (JOIN && !trap_n && tic == 5'd1 && key.tiline == 2'd0 &&
              ({1'b0, vi_ra[PAGE_BITS-1:0]} + 10'(pos)) < 10'd512) begin
            // translate the following VI and join it
            t1_n    = tib[0];
            pass2_n = 1'b1;
            vi_ra_n = vi_ra + RA_W'(pos);
            pos_n   = '0;
            tic_n   = '0; hx_n = 1'b0; nr_n = '0; opn_n = '0;
            for (int r = 0; r < 15; r++) adj_n[r] = '0;
            st_n = T_OPC;
          end else begin
            // a lone translation: at least two TIs, and never one TI in its last line
            L = (tic_n == 0) ? 5'd2 : (tic_n[1:0] == 2'd1) ? tic_n + 1'b1 : tic_n;
            for (int w = 0; w < 16; w++) if (5'(w) >= tic_n) tib_n[w] = TI_NOP;
            last = 2'((L - 1'b1) >> 2);
            for (int w = 0; w < 4; w++) ob_n[w] = tib_n[{key.tiline, 2'(w)}];
            if (key.tiline == last)
              om_n = '{where_off: {pos, 6'b0} - {6'b0, key.tiline, 4'b0},
                       when_cnt: 3'(L - {1'b0, last, 2'b0}), joined: 1'b0};
            else om_n = '0;
            st_n = T_RESP;
          end
        end else begin
          fix = ti_mem(OP_LI, R_VPC, R_VPC, {10'b0, len1});
          if (trap_n) begin
            // the next VI cannot be joined: VI1 alone
            ob_n = '{t1, TI_NOP, TI_NOP, TI_NOP};
            om_n = '{where_off: {len1, 6'b0}, when_cnt: 3'd2, joined: 1'b0};
          end else begin
            join_now = 1'b1;
            ln = len1 + pos;
            if (tic <= 5'd1) begin
              ob_n = '{t1, (tic == 0) ? TI_NOP : tib[0], TI_NOP, fix};
              om_n = '{where_off: {ln, 6'b0}, when_cnt: 3'd2, joined: 1'b1};
            end else if (tic == 5'd2) begin
              ob_n = '{t1, tib[0], tib[1], fix};
              om_n = '{where_off: {ln, 6'b0}, when_cnt: 3'd3, joined: 1'b1};
            end else begin
              ob_n = '{t1, tib[0], TI_NOP, fix};
              om_n = '{where_off: {len1, 6'b0} + 12'd4, when_cnt: 3'd2, joined: 1'b1};
            end
          end
          st_n = T_RESP;
        end
      end
      default: st_n = T_IDLE;
    endcase
    if (e != tic) tic_n = e;
  end

  assign ev_join = (st == T_FIN) && join_now;

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; ret <= T_IDLE; key <= '0; vi_ra <= '0; pos <= '0;
      pass2 <= 1'b0; cls <= CL_RES; bcond <= C_ALWAYS; aluf <= F_ADD; alucc <= CC_ALL; nops <= '0; opn <= '0;
      use_v <= '0; hx <= 1'b0; xr <= '0; smode <= '0; sreg <= '0;
      acc <= '0; nb <= '0; nbt <= '0; tic <= '0; trap <= 1'b0; tcode <= '0;
      ar <= '0; nr <= '0; len1 <= '0; t1 <= '0; mw <= '0; om <= '0;
      wba <= '0; wbd <= '0; wbv <= 1'b0;
      for (int i = 0; i < 3; i++) od[i] <= '0;
      for (int i = 0; i < 15; i++) adj[i] <= '0;
      for (int i = 0; i < 16; i++) tib[i] <= '0;
      for (int i = 0; i < 4; i++) ob[i] <= '0;
    end else begin
      st <= st_n; ret <= ret_n; key <= key_n; vi_ra <= vi_ra_n; pos <= pos_n;
      pass2 <= pass2_n; cls <= cls_n; bcond <= bcond_n; aluf <= aluf_n; alucc <= alucc_n; nops <= nops_n; opn <= opn_n;
      use_v <= use_n; hx <= hx_n; xr <= xr_n; smode <= smode_n; sreg <= sreg_n;
      acc <= acc_n; nb <= nb_n; nbt <= nbt_n; tic <= tic_n; trap <= trap_n; tcode <= tcode_n;
      ar <= ar_n; nr <= nr_n; len1 <= len1_n; t1 <= t1_n; mw <= mw_n; om <= om_n;
      wba <= wba_n; wbd <= wbd_n; wbv <= wbv_n;
      od <= od_n; adj <= adj_n; tib <= tib_n; ob <= ob_n;
    end
  end
endmodule
