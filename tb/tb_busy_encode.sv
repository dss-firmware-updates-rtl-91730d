// tb_busy_encode: self-checking test of busy_encode.
// Changes the BUSY input, measures every low pulse on the encoded start net
// and checks its width (1 clock = BUSY, 2 clocks = NOT BUSY), that the codes
// follow the level changes in order, the 3-clock latency from a change to the
// first low clock, and that the original start signal still passes through.
`timescale 1ns/1ps
module tb_busy_encode;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, busy_in = 0, start_in_n = 1;
  logic start_n;
  int low_len = 0;
  int codes [$];                 // widths of low pulses seen
  int cyc = 0, change_cyc = 0, first_low_cyc = -1;

  busy_encode dut (.clk, .rst_n, .busy_in, .start_in_n, .start_n);

  always #12.5 clk = ~clk;

  // sample the net just after each rising edge
  always @(posedge clk) begin
    #1;
    cyc++;
    if (!start_n) begin
      if (low_len == 0 && first_low_cyc < 0) first_low_cyc = cyc;
      low_len++;
    end else if (low_len != 0) begin
      codes.push_back(low_len);
      low_len = 0;
    end
  end

  task automatic check_code(input int expected, input string what);
    checks++;
    if (codes.size() == 0) begin
      failures++; $display("FAIL %s: no pulse seen", what);
    end else begin
      int w;
      w = codes.pop_front();
      if (w != expected) begin failures++; $display("FAIL %s: width %0d expected %0d", what, w, expected); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (codes.size() != 0) begin failures++; $display("FAIL code sent with no change"); end
    // rising BUSY: one-clock code, 3 clocks after the change
    first_low_cyc = -1;
    @(negedge clk) begin busy_in = 1; change_cyc = cyc; end
    repeat (8) @(negedge clk);
    check_code(1, "BUSY");
    checks++;
    if (first_low_cyc - change_cyc != 3) begin
      failures++; $display("FAIL latency %0d expected 3", first_low_cyc - change_cyc);
    end
    @(negedge clk) busy_in = 0;
    repeat (8) @(negedge clk);
    check_code(2, "NOT BUSY");
    // fast toggling: the encoder must end on the final level
    busy_in = 1; @(negedge clk); busy_in = 0; @(negedge clk); busy_in = 1;
    repeat (3) @(negedge clk); busy_in = 0; repeat (2) @(negedge clk); busy_in = 1;
    repeat (20) @(negedge clk);
    checks++;
    begin
      int last;
      last = codes.size() ? codes[codes.size()-1] : 0;
      if (last != 1) begin failures++; $display("FAIL final code %0d expected 1 (BUSY)", last); end
      foreach (codes[i]) begin
        checks++;
        if (codes[i] != 1 && codes[i] != 2) begin failures++; $display("FAIL bad width %0d", codes[i]); end
        if (i > 0) begin
          checks++;
          if (codes[i] == codes[i-1]) begin failures++; $display("FAIL repeated code %0d", codes[i]); end
        end
      end
      codes.delete();
    end
    // original start passes through
    @(negedge clk) start_in_n = 0;
    repeat (5) @(negedge clk);
    start_in_n = 1;
    repeat (3) @(negedge clk);
    check_code(5, "original start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
