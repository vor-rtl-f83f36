// tb_translator: drives the translator's line port directly, with a
// behavioural memory behind it.  Checks pass-through reads and write-backs
// of ordinary lines, and the TI lines and where/when/joined fields produced
// for a set of VAX instructions: HALT, a reserved opcode, register and
// literal moves (one-TI translations joined with the next VI), compare,
// logical and test instructions, a
// three-operand add with a displacement operand spanning two TI lines, a
// conditional branch, and a VI that runs past its page.
module tb_translator;
  import vor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic lr_req = 0, lr_we = 0, lr_ack;
  line_key_t lr_key = '0;
  word_t lr_wdata [WORDS_PER_LINE], lr_rdata [WORDS_PER_LINE];
  line_meta_t lr_meta;
  logic m_req, m_we, m_ack, ev_translate, ev_join, ev_pass;
  logic [RA_W-3:0] m_addr;
  word_t m_wdata, m_rdata;

  translator #(.JOIN(1'b1)) dut (.*);
  mem_model #(.WORDS(4096), .AW(RA_W-2)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr),
                                               .wdata(m_wdata), .ack(m_ack), .rdata(m_rdata));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  word_t got [WORDS_PER_LINE];
  line_meta_t gm;

  task automatic line(input logic flag, input logic [1:0] tl, input logic [RA_W-1:0] ra,
                      input logic wr);
    @(negedge clk);
    lr_req = 1; lr_we = wr; lr_key = '{flag: flag, tiline: tl, ra: ra};
    while (!lr_ack) @(negedge clk);
    for (int i = 0; i < 4; i++) got[i] = lr_rdata[i];
    gm = lr_meta;
    @(posedge clk);
    #1 lr_req = 0; lr_we = 0;
  endtask

  function automatic string show();
    return $sformatf("%h %h %h %h where=%0d when=%0d j=%0d", got[0], got[1], got[2], got[3],
                     gm.where_off, gm.when_cnt, gm.joined);
  endfunction

  // put VAX bytes at byte address a
  task automatic vax(input int a, input byte b []);
    foreach (b[i]) begin
      int w = (a + i) / 4, s = (a + i) % 4;
      u_mem.mem[w][8*s +: 8] = b[i];
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) lr_wdata[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pass-through
    for (int i = 0; i < 4; i++) u_mem.mem[16 + i] = 32'hA000 + i;
    line(1'b0, 2'd0, 30'd64, 1'b0);
    chk("pass read", got[0] == 32'hA000 && got[3] == 32'hA003);
    for (int i = 0; i < 4; i++) lr_wdata[i] = 32'hB000 + i;
    line(1'b0, 2'd0, 30'd128, 1'b1);
    chk("pass write", u_mem.mem[32] == 32'hB000 && u_mem.mem[35] == 32'hB003);
    // HALT at 0x400
    vax(32'h400, '{8'h00});
    line(1'b1, 2'd0, 30'h400, 1'b0);
    $display("HALT: %s", show());
    chk("HALT", got[0] == ti_trap(TRAP_HALT) && !gm.joined);
    // reserved opcode
    vax(32'h410, '{8'hFD});
    line(1'b1, 2'd0, 30'h410, 1'b0);
    chk("reserved", got[0] == ti_trap(TRAP_RESINSTR));
    // MOVL R1,R2 ; CLRL R3 ; HALT
    vax(32'h420, '{8'hD0, 8'h51, 8'h52, 8'hD4, 8'h53, 8'h00});
    line(1'b1, 2'd0, 30'h420, 1'b0);
    $display("MOVL R1,R2 + CLRL: %s", show());
    chk("MOVL reg", got[0] == ti_alu(F_PASS, 6'd2, 6'd1, 1'b0, 6'd1, CC_NZV0) ||
                    got[0] == ti_alu(F_PASS, 6'd2, 6'd1, 1'b0, 6'd0, CC_NZV0));
    chk("joined", gm.joined && gm.when_cnt == 3'd2 && gm.where_off == 12'(5 << 6));
    chk("fix-up", got[3] == ti_mem(OP_LI, R_VPC, R_VPC, 16'd3));
    // MOVL #5,R4 (short literal)
    vax(32'h430, '{8'hD0, 8'h05, 8'h54, 8'h00});
    line(1'b1, 2'd0, 30'h430, 1'b0);
    $display("MOVL #5,R4: %s", show());
    chk("MOVL literal", got[0][31:28] == OP_ALU && got[0][27:22] == 6'd4 &&
                        got[0][21:16] == 6'd5 && got[0][5] == 1'b1);
    // ADDL3 1000(R1), #40, R6 : M operand with word displacement, C literal
    vax(32'h440, '{8'hC1, 8'hC1, 8'hE8, 8'h03, 8'h28, 8'h56, 8'h00});
    line(1'b1, 2'd0, 30'h440, 1'b0);
    $display("ADDL3 line0: %s", show());
    chk("ADDL3 literal 40 via LI", got[0] == ti_mem(OP_LI, 6'd41, 6'd0, 16'd40));
    chk("ADDL3 load", got[1] == ti_mem(OP_LD, 6'd40, 6'd1, 16'd1000));
    chk("ADDL3 add", got[2] == ti_alu(F_ADD, 6'd6, 6'd40, 1'b0, 6'd41, CC_ALL));
    chk("ADDL3 where/when", gm.when_cnt == 3'd3 && gm.where_off == 12'(6 << 6) && !gm.joined);
    // MOVL R1,R2 joined with a three-TI VI: branch into the middle of it
    vax(32'h460, '{8'hD0, 8'h51, 8'h52, 8'hC1, 8'hC1, 8'hE8, 8'h03, 8'h28, 8'h56});
    line(1'b1, 2'd0, 30'h460, 1'b0);
    $display("MOVL + ADDL3: %s", show());
    chk("join long", gm.joined && gm.when_cnt == 3'd2 && gm.where_off == 12'((3 << 6) + 4) &&
                     got[1] == ti_mem(OP_LI, 6'd41, 6'd0, 16'd40));
    // BNEQ .-2  (displacement -2 -> branch to itself)
    vax(32'h450, '{8'h12, 8'hFE});
    line(1'b1, 2'd0, 30'h450, 1'b0);
    $display("BNEQ: %s", show());
    chk("BNEQ", got[0] == ti_vbr(C_NE, R_VPC, 12'd0) && gm.when_cnt == 3'd2 &&
                gm.where_off == 12'(2 << 6));
    // CMPL R3,#5 : literal to a temporary, subtract into a scratch register
    vax(32'h470, '{8'hD1, 8'h53, 8'h05, 8'h00});
    line(1'b1, 2'd0, 30'h470, 1'b0);
    $display("CMPL: %s", show());
    chk("CMPL", got[0] == ti_alu(F_PASS, 6'd41, 6'd5, 1'b1, 6'd0, CC_NONE) &&
                got[1] == ti_alu(F_SUB, 6'd42, 6'd3, 1'b0, 6'd41, CC_ALL) &&
                gm.when_cnt == 3'd2 && gm.where_off == 12'(3 << 6));
    // BICL2 #3,R1 is one TI: joined with TSTL R1
    vax(32'h480, '{8'hCA, 8'h03, 8'h51, 8'hD5, 8'h51, 8'h00});
    line(1'b1, 2'd0, 30'h480, 1'b0);
    $display("BICL2 + TSTL: %s", show());
    chk("BICL2/TSTL", got[0] == ti_alu(F_BIC, 6'd1, 6'd3, 1'b1, 6'd1, CC_NZV0) &&
                      got[1] == ti_alu(F_PASS, 6'd42, 6'd1, 1'b0, 6'd0, CC_NZV0) &&
                      gm.joined && gm.where_off == 12'(5 << 6));
    // VI running past the page end (0x5FE: D0 8F + 4 bytes)
    vax(32'h5FE, '{8'hD0, 8'h8F});
    line(1'b1, 2'd0, 30'h5FE, 1'b0);
    chk("page cross", got[0] == ti_trap(TRAP_PAGECROSS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
