// tb_fast_cache_index: drives random virtual/real address pairs, with the
// dubious bits agreeing in about 70% of them, into fast_cache_index at the
// 64 KB cache size.  For every request it checks that the index at which
// ok is reported is the real-address index (so the tag compare always
// looks at the right line), that a disagreement costs exactly one stall
// clock and an agreement none, and that the stall event count matches.
module tb_fast_cache_index;
  localparam int unsigned IDX_W = 12, OFF_W = 4, PAGE_BITS = 9, RA_W = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             req = 1'b0;
  logic [31:0]      va  = '0;
  logic [RA_W-1:0]  ra  = '0;
  logic [IDX_W-1:0] idx;
  logic             ok, stall, ev_stall;

  fast_cache_index #(.IDX_W(IDX_W), .OFF_W(OFF_W), .PAGE_BITS(PAGE_BITS), .RA_W(RA_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s va=%h ra=%h idx=%h ok=%b stall=%b", what, va, ra, idx, ok, stall);
    end
  endtask

  int n_stall = 0, n_mismatch = 0;
  always @(posedge clk) if (ev_stall) n_stall++;

  initial begin
    logic agree;
    logic [IDX_W-1:0] want;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      va = $urandom;
      ra = RA_W'($urandom);
      ra[PAGE_BITS-1:0] = va[PAGE_BITS-1:0];      // page offset is not translated
      agree = ($urandom % 10) < 7;
      if (agree) ra[OFF_W+IDX_W-1:PAGE_BITS] = va[OFF_W+IDX_W-1:PAGE_BITS];
      else if (ra[OFF_W+IDX_W-1:PAGE_BITS] == va[OFF_W+IDX_W-1:PAGE_BITS])
        ra[PAGE_BITS] = ~ra[PAGE_BITS];
      want = ra[OFF_W +: IDX_W];
      req = 1'b1;
      #1;
      if (agree) begin
        check(ok && !stall, "agreeing bits give a hit check in the first clock");
        check(idx == want, "first-clock index equals the real index");
      end else begin
        n_mismatch++;
        check(!ok && stall, "dubious bits disagree: stall");
        check(idx == va[OFF_W +: IDX_W], "first clock uses the virtual index");
        @(negedge clk);
        va = $urandom;                              // the VA input is not used any more
        #1;
        check(ok && !stall, "second clock is valid");
        check(idx == want, "second clock uses the real index");
      end
      @(negedge clk);
      req = 1'b0;
      if (($urandom % 4) == 0) @(negedge clk);
    end
    @(negedge clk);
    check(n_stall == n_mismatch, "one stall event per disagreement");
    $display("requests=2000 stalls=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
