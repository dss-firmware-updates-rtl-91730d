// tb_clk_div2: self-checking test of clk_div2.
// Checks that the output starts low, rises on the first edge after reset and
// then changes level on every input edge, i.e. half the input frequency with
// a 50 % duty cycle (25 ns high and 25 ns low for a 25 ns input period).
`timescale 1ns/1ps
module tb_clk_div2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clk_out;
  realtime t_rise, t_fall;

  clk_div2 dut (.clk, .rst_n, .clk_out);

  always #12.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    chk(clk_out == 1'b0, "low in reset");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      chk(clk_out == ((i % 2) == 0), $sformatf("edge %0d level %b", i, clk_out));
    end
    @(posedge clk_out) t_rise = $realtime;
    @(negedge clk_out) t_fall = $realtime;
    chk(t_fall - t_rise == 25.0, $sformatf("high time %0t", t_fall - t_rise));
    @(posedge clk_out);
    chk($realtime - t_fall == 25.0, "low time 25 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
