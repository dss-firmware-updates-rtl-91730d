// tb_add_cnt: self-checking test of add_cnt.
// Drives random enable and clear patterns and compares the count with a
// reference count kept in the testbench, including the wrap at 2**WIDTH.
`timescale 1ns/1ps
module tb_add_cnt;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr_n = 1, en = 0;
  logic [4:0] q;
  int unsigned model;

  add_cnt #(.WIDTH(5)) dut (.clk, .rst_n, .clr_n, .en, .q);

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (q !== 5'd0) begin failures++; $display("FAIL reset q=%0d", q); end
    // free run through two wraps
    en = 1;
    for (int i = 0; i < 70; i++) begin
      @(posedge clk); #1;
      model = (model + 1) % 32;
      checks++;
      if (q !== 5'(model)) begin failures++; $display("FAIL run %0d q=%0d exp %0d", i, q, model); end
      @(negedge clk);
    end
    for (int i = 0; i < 1000; i++) begin
      en = 1'($urandom); clr_n = ($urandom % 8) != 0;
      @(posedge clk); #1;
      if (!clr_n) model = 0; else if (en) model = (model + 1) % 32;
      checks++;
      if (q !== 5'(model)) begin failures++; $display("FAIL rnd %0d q=%0d exp %0d", i, q, model); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
