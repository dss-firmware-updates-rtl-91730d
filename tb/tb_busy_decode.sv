// tb_busy_decode: self-checking test of busy_decode.
// Sends BUSY (one clock low) and NOT BUSY (two clocks low) codes on the start
// net, long original start pulses that must be ignored, and a code on a single
// copy of the net that the majority vote must reject. Checks the busy level
// and that it changes on the edge after the net returns high.
`timescale 1ns/1ps
module tb_busy_decode;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic s1 = 1, s2 = 1, s3 = 1;
  logic busy;

  busy_decode dut (.clk, .rst_n, .start_1(s1), .start_2(s2), .start_3(s3), .busy);

  always #12.5 clk = ~clk;

  task automatic expect_busy(input logic e, input string what);
    checks++;
    if (busy !== e) begin failures++; $display("FAIL %s: busy=%b expected %b", what, busy, e); end
  endtask

  // drive all three copies low for n clocks, then high; return after the
  // edge at which busy must have changed
  task automatic pulse(input int n, input logic lvl_in, lvl_out);
    @(negedge clk); {s1, s2, s3} = 3'b000;
    repeat (n) begin
      @(negedge clk);
      expect_busy(lvl_in, "during pulse");
    end
    {s1, s2, s3} = 3'b111;
    @(negedge clk);
    expect_busy(lvl_out, $sformatf("lvl_out %0d-clock pulse", n));
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
    expect_busy(1'b0, "lvl_out reset");
    pulse(1, 1'b0, 1'b1);              // BUSY
    repeat (3) @(negedge clk);
    expect_busy(1'b1, "BUSY held");
    pulse(2, 1'b1, 1'b0);              // NOT BUSY
    pulse(1, 1'b0, 1'b1);
    pulse(5, 1'b1, 1'b1);              // original start: ignored
    pulse(3, 1'b1, 1'b1);
    pulse(2, 1'b1, 1'b0);
    pulse(4, 1'b0, 1'b0);
    pulse(2, 1'b0, 1'b0);              // NOT BUSY while not busy
    // a single faulty copy cannot make a code
    @(negedge clk) s2 = 0;
    @(negedge clk) s2 = 1;
    @(negedge clk) expect_busy(1'b0, "single copy low");
    // two of three copies are enough
    @(negedge clk) {s1, s3} = 2'b00;
    @(negedge clk) {s1, s3} = 2'b11;
    @(negedge clk) expect_busy(1'b1, "two copies low");
    // back-to-back codes with one high clock between them
    for (int i = 0; i < 20; i++) begin
      logic b;
      b = 1'($urandom);
      pulse(b ? 1 : 2, busy, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
