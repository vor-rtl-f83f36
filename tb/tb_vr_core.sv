// tb_vr_core: runs two small native programs on the VR core from a
// behavioural memory (one-clock acknowledge).  Checks LI/LIH, sized and
// full-width operate with condition codes, ^B load with BN and the byte
// extract/insert, a delayed-branch loop with its delay slot, a 32-bit load
// of a VAX register, the unaligned-reference trap, jump-and-link,
// and the VAX branch VBR (immediate, converts the VPC to a pseudo-address;
// every pseudo-address fetch returns TRAP 0x77 here), and sign extension.
module tb_vr_core;
  import vor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [PA_W-1:0] boot_pc = '0, addr, pc;
  logic [31:0] boot_vpc = '0, trap_addr, vpc, nz;
  logic req, we, ack = 0, running, halted, joined, cc_c, cc_v;
  word_t wdata, rdata = '0, dbg_val;
  line_meta_t rmeta = '0;
  logic fault = 0;
  logic [15:0] trap_code;
  logic [5:0] trap_reg, dbg_reg = '0;
  logic ev_retire, ev_implicit, ev_vbr, ev_delayed;

  vr_core dut (.*);

  word_t mem [1024];

  always @(posedge clk) begin
    ack <= req && !ack;
    if (req && !ack) begin
      if (addr[38]) rdata <= ti_trap(16'h0077);
      else begin
        rdata <= mem[addr[11:2]];
        if (we) mem[addr[11:2]] <= wdata;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic word_t reg_of(input logic [5:0] r);
    return dut.rd(r);
  endfunction

  function automatic word_t alu_sz(input word_t w, input logic [1:0] sz);
    w[2:1] = sz;
    return w;
  endfunction

  task automatic run(input logic [31:0] a);
    @(negedge clk); start = 1; boot_pc = {7'b0, a}; boot_vpc = 32'h0;
    @(negedge clk); start = 0;
    wait (halted);
    @(negedge clk);
  endtask

  int p;
  task automatic put(input word_t w); mem[p] = w; p++; endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = TI_NOP;
    // program 1 at byte 0x100
    p = 'h40;
    put(ti_mem(OP_LI, 6'd20, 6'd0, 16'd5));                  // r20 = 5
    put(ti_mem(OP_LIH, 6'd21, 6'd0, 16'h1234));              // r21 = 0x12340000
    put(ti_mem(OP_LI, 6'd21, 6'd21, 16'h5678));              // r21 = 0x12345678
    put(ti_alu(F_ADD, 6'd22, 6'd20, 1'b0, 6'd21, CC_ALL));   // r22 = r20 + r21
    put(ti_alu(F_SUB, 6'd23, 6'd20, 1'b0, 6'd20, CC_ALL));   // r23 = 0, Z
    put(ti_mem(OP_LI, 6'd24, 6'd0, 16'h800));                // r24 = 0x800
    put(ti_mem(OP_ST, 6'd21, 6'd24, 16'd0));                 // [0x800] = r21
    put(ti_mem(OP_LD, 6'd5, 6'd24, 16'd0));                  // VAX R5 load sets NZ
    put(ti_mem(OP_LDB, 6'd25, 6'd24, 16'd1));                // r25 = [0x800], BN = 1
    put({OP_EXTB, 6'd26, 6'd0, 6'd25, 5'd0, 5'd7});          // r26 = byte 1 of r25
    put(ti_mem(OP_LI, 6'd27, 6'd0, 16'd0));
    put({OP_INS, 6'd27, 6'd0, 6'd20, 5'd0, 5'd7});           // r27 byte 1 = 5
    put(ti_mem(OP_LI, 6'd28, 6'd0, 16'h7F));
    put(alu_sz(ti_alu(F_ADD, 6'd28, 6'd28, 1'b0, 6'd28, CC_ALL), 2'd0)); // byte add, V
    put(ti_mem(OP_LI, 6'd37, 6'd0, 16'h1280));
    put(ti_alu(F_SXB, 6'd38, 6'd0, 1'b0, 6'd37, CC_NONE));   // sign-extend byte 0x80
    put(ti_mem(OP_LI, 6'd37, 6'd37, 16'h7000));              // r37 = 0x8280
    put(ti_alu(F_SXH, 6'd39, 6'd0, 1'b0, 6'd37, CC_NONE));   // sign-extend half 0x8280
    put(ti_mem(OP_LI, 6'd29, 6'd0, 16'd3));
    put(ti_mem(OP_LI, 6'd30, 6'd0, 16'd0));
    put(ti_alu(F_ADD, 6'd29, 6'h3F, 1'b1, 6'd29, CC_NONE)); // loop: r29 += -1
    put({OP_BR, 6'd29, C_NE, 2'b00, 16'hFFFC});             // back to loop
    put(ti_mem(OP_LI, 6'd30, 6'd30, 16'd1));                 // delay slot
    put(ti_mem(OP_LD, 6'd31, 6'd24, 16'd2));                 // unaligned: trap
    put(ti_trap(16'h0099));
    // program 2 at byte 0x200
    p = 'h80;
    put(ti_mem(OP_LI, 6'd33, 6'd0, 16'h300));
    put(ti_mem(OP_JMPL, 6'd34, 6'd33, 16'd0));
    put(ti_mem(OP_LI, 6'd35, 6'd0, 16'd9));                  // delay slot
    put(ti_trap(16'h0066));
    p = 'hC0;
    put(ti_mem(OP_LI, 6'd36, 6'd0, 16'h500));
    put(ti_vbr(C_ALWAYS, 6'd36, 12'd4));                     // VPC = 0x504
    put(ti_trap(16'h0055));

    repeat (2) @(negedge clk);
    rst_n = 1;
    run(32'h100);
    chk("trap unaligned", trap_code == TRAP_UNALIGNED && trap_addr == 32'h802 && trap_reg == 6'd31);
    chk("LI/LIH", reg_of(6'd21) == 32'h12345678 && reg_of(6'd20) == 32'd5);
    chk("ADD", reg_of(6'd22) == 32'h1234567D);
    chk("SUB", reg_of(6'd23) == 32'd0);
    chk("store", mem['h200] == 32'h12345678);
    chk("LDB BN", reg_of(R_BN) == 32'd1 && reg_of(6'd25) == 32'h12345678);
    chk("EXTB", reg_of(6'd26) == 32'h56);
    chk("INS", reg_of(6'd27) == 32'h500);
    chk("byte add keeps high bits", reg_of(6'd28) == 32'hFE);
    chk("byte add V", cc_v == 1'b1 && cc_c == 1'b0);
    chk("SXB", reg_of(6'd38) == 32'hFFFFFF80);
    chk("SXH", reg_of(6'd39) == 32'hFFFF8280);
    chk("loop count", reg_of(6'd29) == 32'd0 && reg_of(6'd30) == 32'd3);
    chk("VAX load", reg_of(6'd5) == 32'h12345678);
    chk("byte NZ sign-extended", nz == 32'hFFFFFFFE);
    run(32'h200);
    chk("JMPL link", reg_of(6'd34) == 32'h20C && reg_of(6'd35) == 32'd9);
    chk("VBR", trap_code == 16'h0077 && vpc == 32'h504 && pc == vpc_to_pc(32'h504));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
