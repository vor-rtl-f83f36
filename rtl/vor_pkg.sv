// vor_pkg: sizes, types, the translated-instruction (TI) encoding and small
// helper functions shared by every block of the VOR (VAX on a RISC).
//
// Address spaces.  A VAX byte address V is mapped to the VR pseudo-address
// (V + 2**32) << 6, a 39-bit value whose bit 38 marks it as a pseudo-address,
// bits 37:6 hold V and bits 5:2 pick one of the 16 TI slots reserved for
// the VAX instruction (VI) at V.  Ordinary VR addresses are below 2**32.
// Real addresses are 30 bits: 21-bit real page and 9-bit byte offset
// (512-byte VAX pages).  These sizes follow the design; the 32-bit TI
// encoding below is this implementation's own, since the base RISC's
// encoding is not part of the design description.
package vor_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned VA_W      = 32;          // VAX / VR virtual address
  localparam int unsigned PA_W      = 39;          // VR PC incl. pseudo-addresses
  localparam int unsigned PAGE_BITS = 9;           // 512-byte pages
  localparam int unsigned RPAGE_W   = 21;          // real page number
  localparam int unsigned RA_W      = RPAGE_W + PAGE_BITS; // 30-bit real address
  localparam int unsigned WORDS_PER_LINE = 4;      // 16-byte lines
  localparam int unsigned TIS_PER_VI = 16;         // TI slots per VAX PC
  localparam int unsigned SN_N_W    = 7;           // holds 0..MaxN (=64)
  localparam int unsigned WHERE_W   = 12;          // implicit branch offset, bytes
  localparam int unsigned WHEN_W    = 3;           // 0..4, 0 disables

  // ------------------------------------------------------------- types
  typedef logic [31:0] word_t;

  // Sequence number: 2-bit cleanup cycle y and count n.
  typedef struct packed {
    logic [1:0]        y;
    logic [SN_N_W-1:0] n;
  } sn_t;

  // Per-line metadata for implicit branching (where/when) and joining.
  typedef struct packed {
    logic [WHERE_W-1:0] where_off; // added to the address of word 0 of the line
    logic [WHEN_W-1:0]  when_cnt;  // implicit branch after word when_cnt-1; 0 = off
    logic               joined;    // word 0 is a complete VI, words 1.. the next VI
  } line_meta_t;

  // A memory reference seen by the cache: pseudo flag and TI slot come from
  // the VR address, the real address from the TLB.
  typedef struct packed {
    logic            flag;    // line holds TIs
    logic [1:0]      tiline;  // which of the 4 lines of a VI's 16 TI slots
    logic [RA_W-1:0] ra;      // real address (VAX byte for TI lines)
  } line_key_t;

  // ----------------------------------------------------- TI encoding
  // [31:28] opcode
  // memory, LI, LIH, JMPL: [27:22] r1 [21:16] r2 [15:0] d
  // ALU:  [27:22] r1 [21:16] r2/lit6 [15:10] r3 [9:6] func [5] lit
  //       [4:3] cc mode [2:1] size (0 byte, 1 word, 2 long)
  // EXT:  [27:22] r1 [21:16] r2 [15:10] r3 [9:5] position [4:0] width-1
  // EXTB/INS: [27:22] r1 [15:10] r3 [4:0] width-1 (field at byte BN)
  // BR:   [27:22] r1 [21:18] cond [15:0] d (bytes, PC relative, delayed);
  //       bit tests BS/BC take the bit number from d[15:11] and d[10:0] as offset
  // MISC: [27:24] sub-op.  VBR: [21:16] r2 [15:12] cond on NZ [11:0] d
  //       (new VPC = r2 + d, takes effect at once)
  // TRAP: [15:0] code
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0, OP_LD  = 4'h1, OP_LDB = 4'h2, OP_LDW = 4'h3,
    OP_ST   = 4'h4, OP_STB = 4'h5, OP_STW = 4'h6, OP_LI  = 4'h7,
    OP_LIH  = 4'h8, OP_ALU = 4'h9, OP_EXT = 4'hA, OP_EXTB = 4'hB,
    OP_INS  = 4'hC, OP_BR  = 4'hD, OP_JMPL = 4'hE, OP_MISC = 4'hF
  } opcode_t;

  // OP_MISC sub-op in [27:24]
  localparam logic [3:0] MISC_VBR  = 4'h0;
  localparam logic [3:0] MISC_TRAP = 4'h1;

  typedef enum logic [3:0] {
    F_ADD = 4'h0, F_SUB = 4'h1, F_AND = 4'h2, F_OR  = 4'h3,
    F_XOR = 4'h4, F_BIC = 4'h5, F_SHL = 4'h6, F_SHR = 4'h7,
    F_SAR = 4'h8, F_PASS = 4'h9, F_SXB = 4'hA, F_SXH = 4'hB
  } alu_func_t;                          // SXB / SXH: sign-extend byte / halfword of r3

  // condition-code update of an ALU TI
  localparam logic [1:0] CC_NONE = 2'd0; // leave CC registers alone
  localparam logic [1:0] CC_NZ   = 2'd1; // NZ only
  localparam logic [1:0] CC_NZV0 = 2'd2; // NZ, V cleared, C kept (VAX moves)
  localparam logic [1:0] CC_ALL  = 2'd3; // NZ, C and V from the ALU

  typedef enum logic [3:0] {
    C_ALWAYS = 4'h0, C_EQ = 4'h1, C_NE = 4'h2, C_LT = 4'h3,
    C_GE = 4'h4, C_GT = 4'h5, C_LE = 4'h6, C_BS = 4'h7, C_BC = 4'h8,
    C_NEVER = 4'h9
  } cond_t;

  // special registers
  localparam logic [5:0] R_PC  = 6'd0;   // reads as PC, writes ignored
  localparam logic [5:0] R_VPC = 6'd15;  // VAX PC pseudo-register
  localparam logic [5:0] R_VR0 = 6'd16;  // home of VAX R0
  localparam logic [5:0] R_NZ  = 6'd60;  // CC pseudo-registers
  localparam logic [5:0] R_C   = 6'd61;
  localparam logic [5:0] R_V   = 6'd62;
  localparam logic [5:0] R_BN  = 6'd63;  // byte number of last ^B/^W access

  // trap codes reported by TRAP TIs and by the core itself
  localparam logic [15:0] TRAP_HALT      = 16'h0000; // VAX HALT
  localparam logic [15:0] TRAP_RESINSTR  = 16'h0001; // opcode left to extracode
  localparam logic [15:0] TRAP_RESOPND   = 16'h0002; // reserved operand / mode
  localparam logic [15:0] TRAP_PAGECROSS = 16'h0003; // VI crosses a page
  localparam logic [15:0] TRAP_TOOLONG   = 16'h0004; // more than 16 TIs
  localparam logic [15:0] TRAP_UNALIGNED = 16'h0010; // core: unaligned load/store
  localparam logic [15:0] TRAP_TLBMISS   = 16'h0011; // core: TLB miss

  // -------------------------------------------------- helper functions
  function automatic logic [PA_W-1:0] vpc_to_pc(input logic [31:0] vpc);
    return {1'b1, vpc, 6'b0};
  endfunction

  function automatic logic [31:0] pc_to_vpc(input logic [PA_W-1:0] pc);
    return pc[37:6];
  endfunction

  // VR register that holds VAX register r (0..15)
  function automatic logic [5:0] vreg(input logic [3:0] r);
    return (r == 4'd0) ? R_VR0 : {2'b00, r};
  endfunction

  function automatic logic is_vax_reg(input logic [5:0] r);
    return (r >= 6'd1) && (r <= 6'd16);
  endfunction

  // TI builders
  function automatic word_t ti_mem(input opcode_t op, input logic [5:0] r1,
                                   input logic [5:0] r2, input logic [15:0] d);
    return {op, r1, r2, d};
  endfunction

  function automatic word_t ti_alu(input alu_func_t f, input logic [5:0] r1,
                                   input logic [5:0] r2, input logic lit,
                                   input logic [5:0] r3, input logic [1:0] cc);
    return {OP_ALU, r1, r2, r3, f, lit, cc, 2'd2, 1'b0};
  endfunction

  function automatic word_t ti_vbr(input cond_t c, input logic [5:0] r2,
                                   input logic [11:0] d);
    return {OP_MISC, MISC_VBR, 2'b00, r2, c, d};
  endfunction

  function automatic word_t ti_trap(input logic [15:0] code);
    return {OP_MISC, MISC_TRAP, 8'h00, code};
  endfunction

  localparam word_t TI_NOP = 32'h0000_0000;

  // condition test on a register value
  function automatic logic cond_true(input cond_t c, input word_t v, input logic [5:0] bitno);
    case (c)
      C_ALWAYS: return 1'b1;
      C_EQ:     return v == 0;
      C_NE:     return v != 0;
      C_LT:     return v[31];
      C_GE:     return !v[31];
      C_GT:     return !v[31] && (v != 0);
      C_LE:     return v[31] || (v == 0);
      C_BS:     return v[bitno[4:0]];
      C_BC:     return !v[bitno[4:0]];
      default:  return 1'b0;
    endcase
  endfunction

  // Sequence-number match of a cache line against its TLB entry, where cy
  // is the current cleanup cycle (Matches in the design description).
  function automatic logic sn_matches(input sn_t c, input sn_t t, input logic [1:0] cy);
    return (c.n == t.n) && ((c.y == t.y) || ((c.y == cy) && (t.y == cy - 2'd1)));
  endfunction

endpackage
