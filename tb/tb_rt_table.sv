// tb_rt_table: writes random TLB indices into random RT slots and checks
// both read ports against a reference array.
module tb_rt_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] ra_idx = '0, rb_idx = '0, w_idx = '0, w_tlbi = '0;
  logic [9:0] ra_tlbi, rb_tlbi;
  logic we = 1'b0;
  logic [9:0] model [1024];
  bit written [1024];

  rt_table #(.RT_SIZE(1024), .TLB_IW(10)) dut (.clk, .ra_idx, .ra_tlbi, .rb_idx, .rb_tlbi,
                                              .we, .w_idx, .w_tlbi);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) written[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'b1; w_idx = 10'($urandom); w_tlbi = 10'($urandom);
      model[w_idx] = w_tlbi; written[w_idx] = 1;
      @(negedge clk);
      we = 1'b0;
      ra_idx = 10'($urandom); rb_idx = w_idx;
      #1;
      checks++;
      if (rb_tlbi !== model[rb_idx]) begin failures++; $display("FAIL port B %0d", rb_idx); end
      if (written[ra_idx]) begin
        checks++;
        if (ra_tlbi !== model[ra_idx]) begin failures++; $display("FAIL port A %0d", ra_idx); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
