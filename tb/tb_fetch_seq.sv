// tb_fetch_seq: checks the next-PC rules: sequential flow, the implicit
// branch after word when-1 of a line to line base + where (with VPC set to
// the target's VAX address), a delayed branch taking effect one instruction
// late, a VAX branch taking effect at once, and the joined state.
module tb_fetch_seq;
  import vor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 1'b0, advance = 1'b0, br_valid = 1'b0, vbr_taken = 1'b0, vpc_we = 1'b0;
  logic [PA_W-1:0] boot_pc = '0, br_target = '0, pc;
  logic [31:0] boot_vpc = '0, vbr_vpc = '0, vpc_wdata = '0, vpc;
  line_meta_t meta = '0;
  logic joined, ev_implicit, ev_delayed;

  fetch_seq dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input line_meta_t m);
    @(negedge clk);
    meta = m; advance = 1'b1;
    @(negedge clk);
    advance = 1'b0; br_valid = 1'b0; vbr_taken = 1'b0; vpc_we = 1'b0;
  endtask

  task automatic expect_pc(input string s, input logic [PA_W-1:0] p, input logic [31:0] v);
    checks++;
    if (pc !== p || vpc !== v) begin
      failures++;
      $display("FAIL %s: pc=%h vpc=%h expected %h %h", s, pc, vpc, p, v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load = 1'b1; boot_pc = vpc_to_pc(32'h1000); boot_vpc = 32'h1000;
    @(negedge clk);
    load = 1'b0;
    expect_pc("boot", vpc_to_pc(32'h1000), 32'h1000);
    // line with when = 3, where = 3 << 6: branch after word 2
    step('{where_off: 12'(3 << 6), when_cnt: 3'd3, joined: 1'b0});
    expect_pc("seq1", vpc_to_pc(32'h1000) + 4, 32'h1000);
    step('{where_off: 12'(3 << 6), when_cnt: 3'd3, joined: 1'b0});
    expect_pc("seq2", vpc_to_pc(32'h1000) + 8, 32'h1000);
    step('{where_off: 12'(3 << 6), when_cnt: 3'd3, joined: 1'b0});
    expect_pc("implicit", vpc_to_pc(32'h1003), 32'h1003);
    // a 6-TI VI: first line falls through, second branches after word 1
    step('0); step('0); step('0); step('0);
    expect_pc("next line", vpc_to_pc(32'h1003) + 16, 32'h1003);
    step('{where_off: 12'((2 << 6) - 16), when_cnt: 3'd2, joined: 1'b0});
    step('{where_off: 12'((2 << 6) - 16), when_cnt: 3'd2, joined: 1'b0});
    expect_pc("implicit from line 1", vpc_to_pc(32'h1005), 32'h1005);
    // joined line: when 2, where to the middle of the next VI (+4)
    step('{where_off: 12'((3 << 6) + 4), when_cnt: 3'd2, joined: 1'b1});
    checks++;
    if (!joined) begin failures++; $display("FAIL joined not set"); end
    step('{where_off: 12'((3 << 6) + 4), when_cnt: 3'd2, joined: 1'b1});
    expect_pc("joined", vpc_to_pc(32'h1008) + 4, 32'h1008);
    checks++;
    if (joined) begin failures++; $display("FAIL joined not cleared"); end
    // VAX branch: immediate
    @(negedge clk);
    vbr_taken = 1'b1; vbr_vpc = 32'h2000;
    step('{where_off: 12'd64, when_cnt: 3'd4, joined: 1'b0});
    expect_pc("vbr", vpc_to_pc(32'h2000), 32'h2000);
    // delayed branch from native code: one more instruction first
    @(negedge clk);
    load = 1'b1; boot_pc = 39'h100; boot_vpc = 32'h2000;
    @(negedge clk);
    load = 1'b0;
    br_valid = 1'b1; br_target = 39'h400;
    step('0);
    expect_pc("delay slot", 39'h104, 32'h2000);
    step('0);
    expect_pc("delayed target", 39'h400, 32'h2000);
    // VPC write by a TI
    vpc_we = 1'b1; vpc_wdata = 32'h1234;
    step('0);
    expect_pc("vpc write", 39'h404, 32'h1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
