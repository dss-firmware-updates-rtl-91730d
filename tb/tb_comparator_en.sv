// tb_comparator_en: self-checking test of comparator_en.
// Sweeps directed and random operand pairs with the enable on and off and
// checks the active-low equal output against the expected truth table.
`timescale 1ns/1ps
module tb_comparator_en;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic en, neq;

  comparator_en #(.WIDTH(16)) dut (.a, .b, .en, .neq);

  task automatic apply(input logic [15:0] ta, tb_, input logic ten);
    logic expect_neq;
    a = ta; b = tb_; en = ten;
    #1;
    expect_neq = !(ten && (ta == tb_));
    checks++;
    if (neq !== expect_neq) begin
      failures++;
      $display("FAIL a=%h b=%h en=%b neq=%b expected %b", ta, tb_, ten, neq, expect_neq);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h000d, 16'h000d, 1'b1);
    apply(16'h000d, 16'h000d, 1'b0);
    apply(16'h000d, 16'h000c, 1'b1);
    apply(16'h8000, 16'h0000, 1'b1);
    apply(16'hffff, 16'hffff, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] r;
      r = 16'($urandom);
      if (i % 3 == 0) apply(r, r, 1'($urandom));
      else            apply(r, r ^ (16'h1 << ($urandom % 16)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
