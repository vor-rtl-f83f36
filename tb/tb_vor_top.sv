// tb_vor_top: end-to-end test of the VOR.  A VAX program is placed in
// memory and run by jumping to its pseudo-address; the registers and
// memory it leaves are compared with values worked out by hand from the
// VAX instruction definitions.  Further phases make each mechanism occur:
// a native VR program with a delayed branch; an external store that patches
// the VAX code (its translation must be invalidated, so the new code runs);
// a store by the VR into the code page followed by a rerun with the
// sequence numbers of the cycle used up (uncached TI execution); background
// cleanup cycles that zap stale lines and keep valid ones; a TLB miss; a
// counting loop; random requests to the fast cache index beside the rest.
// Every mechanism is counted and one that never occurred is a failure.
// Runs at reduced sizes (64 cache lines, SN count 3) so that conflicts,
// write-backs and SN exhaustion happen in a short program.
module tb_vor_top;
  import vor_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 1'b0, cleanup_en = 1'b0;
  logic [PA_W-1:0] boot_pc = '0;
  logic [31:0] boot_vpc = '0;
  logic tlb_fill_valid = 1'b0;
  logic [31:0] tlb_fill_va = '0;
  logic [RPAGE_W-1:0] tlb_fill_rpage = '0;
  logic xs_valid = 1'b0, xs_done;
  logic [RA_W-1:0] xs_ra = '0;
  word_t xs_data = '0;
  logic m_req, m_we, m_ack;
  logic [RA_W-3:0] m_addr;
  word_t m_wdata, m_rdata;
  logic running, halted, joined, cc_c, cc_v;
  logic [15:0] trap_code;
  logic [31:0] trap_addr, vpc, nz;
  logic [PA_W-1:0] pc;
  logic [1:0] cycle;
  logic [5:0] dbg_reg = '0;
  word_t dbg_val;
  logic [20:0] events;
  logic fx_req = 1'b0, fx_ok, fx_stall;
  logic [31:0] fx_va = '0;
  logic [RA_W-1:0] fx_ra = '0;
  logic [6-1:0] fx_idx;

  vor_top #(.NLINES(64), .MAXN(3)) dut (
    .clk, .rst_n, .start, .boot_pc, .boot_vpc, .cleanup_en,
    .tlb_fill_valid, .tlb_fill_va, .tlb_fill_rpage,
    .xs_valid, .xs_ra, .xs_data, .xs_done,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .running, .halted, .trap_code, .trap_addr, .pc, .vpc, .joined,
    .nz, .cc_c, .cc_v, .cycle, .dbg_reg, .dbg_val,
    .fx_req, .fx_va, .fx_ra, .fx_idx, .fx_ok, .fx_stall, .events
  );

  mem_model #(.WORDS(16384), .AW(RA_W-2)) u_mem (
    .clk, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .ack(m_ack), .rdata(m_rdata)
  );

  // event counters
  int unsigned evc [21];
  int unsigned joined_cycles = 0;
  initial for (int i = 0; i < 21; i++) evc[i] = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 21; i++) if (events[i]) evc[i]++;
    if (joined) joined_cycles++;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // VA page p lives in real page p + 64
  function automatic logic [RA_W-1:0] ra_of(input logic [31:0] va);
    return {RPAGE_W'(va[31:9] + 23'd64), va[8:0]};
  endfunction

  task automatic putb(input logic [31:0] va, input logic [7:0] b);
    logic [RA_W-1:0] ra;
    ra = ra_of(va);
    u_mem.mem[ra[RA_W-1:2]][8*ra[1:0] +: 8] = b;
  endtask

  task automatic putbytes(input logic [31:0] va, input logic [7:0] bs [], input int n);
    for (int i = 0; i < n; i++) putb(va + 32'(i), bs[i]);
  endtask

  task automatic putw(input logic [31:0] va, input word_t w);
    logic [RA_W-1:0] ra;
    ra = ra_of(va);
    u_mem.mem[ra[RA_W-1:2]] = w;
  endtask

  // memory as the VR sees it: a dirty line in the write-back cache wins
  function automatic word_t getw(input logic [31:0] va);
    logic [RA_W-1:0] ra;
    int li;
    ra = ra_of(va);
    li = int'(ra[RA_W-1:4]) % dut.NLINES;
    if (dut.u_cache.vld[li] && dut.u_cache.dirty[li] && !dut.u_cache.tag[li].flag &&
        dut.u_cache.tag[li].ra[RA_W-1:4] == ra[RA_W-1:4])
      return dut.u_cache.data[li][ra[3:2]];
    return u_mem.mem[ra[RA_W-1:2]];
  endfunction

  task automatic fill(input logic [31:0] va);
    @(negedge clk);
    tlb_fill_valid = 1'b1; tlb_fill_va = va; tlb_fill_rpage = RPAGE_W'(va[31:9] + 23'd64);
    @(negedge clk);
    tlb_fill_valid = 1'b0;
  endtask

  task automatic run(input logic [PA_W-1:0] p, input logic [31:0] v, output int cycles);
    @(negedge clk);
    boot_pc = p; boot_vpc = v; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!halted && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  function automatic word_t vreg_val(input logic [5:0] r);
    return dut.u_core.rf[r];
  endfunction

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s = %08h, expected %08h", what, got, exp);
    end
  endtask

  task automatic chk_vax(input int r, input word_t exp);
    chk($sformatf("R%0d", r), vreg_val(vreg(4'(r))), exp);
  endtask

  task automatic load_program;
    logic [7:0] p [];
    p = '{8'hD0, 8'h8F, 8'h78, 8'h56, 8'h34, 8'h12, 8'h51,   // 1000 MOVL #12345678,R1
          8'hD0, 8'h05, 8'h52,                               // 1007 MOVL #5,R2
          8'hC1, 8'h51, 8'h52, 8'h53,                        // 100A ADDL3 R1,R2,R3
          8'hD0, 8'h53, 8'h9F, 8'h00, 8'h20, 8'h00, 8'h00,   // 100E MOVL R3,@#2000
          8'hD0, 8'h9F, 8'h00, 8'h20, 8'h00, 8'h00, 8'h54,   // 1015 MOVL @#2000,R4
          8'hC0, 8'h02, 8'h54,                               // 101C ADDL2 #2,R4
          8'hD0, 8'h8F, 8'h10, 8'h20, 8'h00, 8'h00, 8'h56,   // 101F MOVL #2010,R6
          8'hD0, 8'h86, 8'h57,                               // 1026 MOVL (R6)+,R7
          8'hD0, 8'h66, 8'h58,                               // 1029 MOVL (R6),R8
          8'hD0, 8'h03, 8'h59,                               // 102C MOVL #3,R9
          8'hC0, 8'h01, 8'h5A,                               // 102F ADDL2 #1,R10
          8'hC2, 8'h01, 8'h59,                               // 1032 SUBL2 #1,R9
          8'h12, 8'hF8,                                      // 1035 BNEQ 102F
          8'hD0, 8'h5A, 8'h9F, 8'h04, 8'h20, 8'h00, 8'h00,   // 1037 MOVL R10,@#2004
          8'hD4, 8'h9F, 8'h08, 8'h20, 8'h00, 8'h00,          // 103E CLRL @#2008
          8'hD6, 8'h5A,                                      // 1044 INCL R10
          8'hC3, 8'h52, 8'h5A, 8'h5B,                        // 1046 SUBL3 R2,R10,R11
          8'hD0, 8'hAF, 8'h13, 8'h5C,                        // 104A MOVL 13(PC),R12
          8'hD0, 8'h01, 8'h5D,                               // 104E MOVL #1,R13
          8'hD0, 8'h4D, 8'hA6, 8'hFC, 8'h5E,                 // 1051 MOVL -4(R6)[R13],R14
          8'hD0, 8'h76, 8'h50,                               // 1056 MOVL -(R6),R0
          8'h00};                                            // 1059 HALT
    putbytes(32'h1000, p, p.size());
    putw(32'h1060, 32'hCAFE_F00D);
    putw(32'h2008, 32'hDEAD_BEEF);
    putw(32'h2010, 32'h1111_1111);
    putw(32'h2014, 32'h2222_2222);
  endtask

  // expected results of the program for a given literal in MOVL #lit,R2
  // and starting value r10 of R10
  task automatic check_program(input word_t lit, input word_t r10_in);
    word_t r3, r10;
    r3  = 32'h1234_5678 + lit;
    r10 = r10_in + 32'd3;          // value stored at 2004, before INCL
    chk("halt code", {16'b0, trap_code}, {16'b0, TRAP_HALT});
    chk("VPC at HALT", trap_addr, 32'h1059);
    chk_vax(0, 32'h1111_1111);
    chk_vax(1, 32'h1234_5678);
    chk_vax(2, lit);
    chk_vax(3, r3);
    chk_vax(4, r3 + 32'd2);
    chk_vax(6, 32'h2010);
    chk_vax(7, 32'h1111_1111);
    chk_vax(8, 32'h2222_2222);
    chk_vax(9, 32'h0);
    chk_vax(10, r10 + 32'd1);
    chk_vax(11, r10 + 32'd1 - lit);
    chk_vax(12, 32'hCAFE_F00D);
    chk_vax(13, 32'h1);
    chk_vax(14, 32'h2222_2222);
    chk("NZ", nz, 32'h1111_1111);
    chk("mem 2000", getw(32'h2000), r3);
    chk("mem 2004", getw(32'h2004), r10);
    chk("mem 2008", getw(32'h2008), 32'h0);
  endtask


  int cyc;
  int unsigned target;
  int unsigned miss_ti_before, misses_cached;
  logic [RA_W-1:0] pra;

  initial begin
    load_program();
    // native program at 3000: r20 = 5; loop: r20 += -1 (NZ); BR NE r20, -4;
    // delay slot r21 += 1; then TRAP 55
    putw(32'h3000, ti_mem(OP_LI, 6'd20, 6'd0, 16'd5));
    putw(32'h3004, ti_alu(F_ADD, 6'd20, 6'h3F, 1'b1, 6'd20, CC_NZ));
    putw(32'h3008, {OP_BR, 6'd20, C_NE, 2'b00, 16'hFFFC});
    putw(32'h300C, ti_alu(F_ADD, 6'd21, 6'd1, 1'b1, 6'd21, CC_NONE));
    putw(32'h3010, ti_trap(16'h0055));
    // program 2 at 1400: CLRL @#1070 (a store into the code page); HALT
    putb(32'h1400, 8'hD4); putb(32'h1401, 8'h9F); putb(32'h1402, 8'h70);
    putb(32'h1403, 8'h10); putb(32'h1404, 8'h00); putb(32'h1405, 8'h00);
    putb(32'h1406, 8'h00);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fill(32'h1000); fill(32'h1400); fill(32'h2000); fill(32'h3000);

    // ---- phase 0: native VR code with a delayed branch
    run({7'b0, 32'h3000}, 32'h0, cyc);
    chk("native trap", {16'b0, trap_code}, 32'h55);
    chk("native r20", vreg_val(6'd20), 32'd0);
    chk("native r21", vreg_val(6'd21), 32'd5);

    // ---- phase 1: the VAX program
    run(vpc_to_pc(32'h1000), 32'h1000, cyc);
    $display("phase 1: %0d cycles, %0d TIs executed, %0d translations", cyc, evc[0], evc[15]);
    check_program(32'd5, 32'd0);

    // ---- phase 1b: rerun, translations now come from the cache
    miss_ti_before = evc[5];
    run(vpc_to_pc(32'h1000), 32'h1000, cyc);
    misses_cached = evc[5] - miss_ti_before;
    $display("phase 1b: %0d cycles, %0d conflict misses", cyc, misses_cached);
    check_program(32'd5, 32'd4);

    // ---- phase 2: an i/o device patches MOVL #5,R2 into MOVL #7,R2
    putb(32'h1008, 8'h07);
    pra = ra_of(32'h1008);
    @(negedge clk);
    xs_valid = 1'b1; xs_ra = pra; xs_data = u_mem.mem[pra[RA_W-1:2]];
    while (!xs_done) @(negedge clk);
    @(negedge clk);
    xs_valid = 1'b0;
    run(vpc_to_pc(32'h1000), 32'h1000, cyc);
    check_program(32'd7, 32'd8);

    // ---- phase 3: the VR stores into the code page, then reruns with the
    // SNs of this cycle used up: TIs are executed without being cached
    run(vpc_to_pc(32'h1400), 32'h1400, cyc);
    chk("prog2 halt", trap_addr, 32'h1406);
    run(vpc_to_pc(32'h1000), 32'h1000, cyc);
    $display("phase 3 (uncached): %0d cycles", cyc);
    check_program(32'd7, 32'd12);

    // ---- phase 4: cleanup cycles; then the page can be cached again
    cleanup_en = 1'b1;
    while (evc[14] < 2) @(negedge clk);
    run(vpc_to_pc(32'h1000), 32'h1000, cyc);
    check_program(32'd7, 32'd16);
    // two full cycles with the VR idle, then stop cleanup at a cycle
    // boundary: the lines it kept must still hit
    target = evc[14] + 2;
    while (evc[14] < target) @(negedge clk);
    cleanup_en = 1'b0;
    miss_ti_before = evc[5];
    run(vpc_to_pc(32'h1000), 32'h1000, cyc);
    check_program(32'd7, 32'd20);
    checks++;
    if (evc[5] - miss_ti_before > misses_cached) begin
      failures++;
      $display("FAIL: lines kept by cleanup missed again (%0d misses)", evc[5] - miss_ti_before);
    end

    // ---- phase 5: a VAX PC with no TLB entry
    run(vpc_to_pc(32'h8000), 32'h8000, cyc);
    chk("TLB miss trap", {16'b0, trap_code}, {16'b0, TRAP_TLBMISS});

    // ---- phase 6: logical operations, compare and test in a counting loop
    //   1480 MOVL #0F0F,R1 ; BISL2 #F0,R1 ; BICL2 #3,R1 ; XORL3 #FF,R1,R2
    //   1499 MOVL #0,R3 ; 149C INCL R3 ; CMPL R3,#5 ; BLSS 149C ; TSTL R3 ; HALT
    begin
      logic [7:0] p3 [38] = '{8'hD0, 8'h8F, 8'h0F, 8'h0F, 8'h00, 8'h00, 8'h51,
                              8'hC8, 8'h8F, 8'hF0, 8'h00, 8'h00, 8'h00, 8'h51,
                              8'hCA, 8'h03, 8'h51,
                              8'hCD, 8'h8F, 8'hFF, 8'h00, 8'h00, 8'h00, 8'h51, 8'h52,
                              8'hD0, 8'h00, 8'h53,
                              8'hD6, 8'h53, 8'hD1, 8'h53, 8'h05, 8'h19, 8'hF9,
                              8'hD5, 8'h53, 8'h00};
      for (int i = 0; i < 38; i++) putb(32'h1480 + i, p3[i]);
    end
    run(vpc_to_pc(32'h1480), 32'h1480, cyc);
    chk("prog3 halt", trap_addr, 32'h14A5);
    chk_vax(1, 32'h0FFC);
    chk_vax(2, 32'h0F03);
    chk_vax(3, 32'd5);
    chk("prog3 NZ after TSTL", nz, 32'd5);

    // ---- fast cache indexing: random VA/RA pairs, half with agreeing
    // bits above the page offset; the index at ok must be the real one
    for (int i = 0; i < 40; i++) begin
      logic [6-1:0] want;
      logic agree;
      @(negedge clk);
      fx_va = $urandom;
      fx_ra = RA_W'($urandom);
      fx_ra[8:0] = fx_va[8:0];
      agree = $urandom_range(1);
      if (agree) fx_ra[6+3:9] = fx_va[6+3:9];
      else if (fx_ra[6+3:9] == fx_va[6+3:9]) fx_ra[9] = ~fx_ra[9];
      want = fx_ra[4 +: 6];
      fx_req = 1'b1;
      #1;
      if (!agree) begin
        chk("fast index stalls on disagreement", {31'b0, fx_stall}, 32'd1);
        @(negedge clk);
        #1;
      end
      chk("fast index ok", {31'b0, fx_ok}, 32'd1);
      chk("fast index is the real index", 32'(fx_idx), 32'(want));
      @(negedge clk);
      fx_req = 1'b0;
    end

    // ---- every mechanism must have happened
    begin
      string names [21];
      names = '{"TI executed", "implicit branch", "VAX branch", "delayed branch",
                "cache hit", "TI miss", "ordinary miss", "write-back", "uncached TI",
                "chill", "warm", "SN exhausted", "cleanup keep", "cleanup zap",
                "cleanup cycle", "translation", "join", "pass-through", "external store",
                "fault", "fast-index stall"};
      for (int i = 0; i < 21; i++) begin
        checks++;
        $display("  %-16s %0d", names[i], evc[i]);
        if (evc[i] == 0) begin
          failures++;
          $display("FAIL: mechanism '%s' never happened", names[i]);
        end
      end
      checks++;
      $display("  %-16s %0d", "joined state", joined_cycles);
      if (joined_cycles == 0) begin
        failures++;
        $display("FAIL: joined state never seen");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
