// tb_dav_gen: self-checking test of dav_gen.
// Triggers single-slice and multi-slice events with several DAV lengths and
// checks that DAV falls on the edge after the trigger, stays low for exactly
// slices * length clocks with no gap between slices, that rd_en matches it,
// that a trigger during an event is ignored and that zero settings give no
// event.
`timescale 1ns/1ps
module tb_dav_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [7:0] dav_len = 8'd84;
  logic [3:0] n_slices = 4'd1;
  logic dav_n, rd_en;

  dav_gen #(.LEN_W(8), .SLICE_W(4)) dut (.clk, .rst_n, .dav_len, .n_slices, .trigger, .dav_n, .rd_en);

  always #12.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic event_(input int len, input int slices, input bit retrigger);
    int low = 0, gaps = 0;
    int expected;
    expected = len * slices;
    @(negedge clk);
    dav_len = 8'(len); n_slices = 4'(slices); trigger = 1;
    @(negedge clk);
    trigger = 0;
    chk(expected == 0 ? dav_n : !dav_n, $sformatf("DAV one clock after trigger (len %0d x %0d)", len, slices));
    while (!dav_n && low < 5000) begin
      chk(rd_en == 1'b1, "rd_en during DAV");
      low++;
      if (retrigger && low == 3) trigger = 1;
      if (retrigger && low == 4) trigger = 0;
      @(negedge clk);
    end
    chk(low == expected, $sformatf("DAV low %0d clocks, expected %0d (len %0d x %0d)", low, expected, len, slices));
    repeat (4) begin
      @(negedge clk);
      if (!dav_n) gaps++;
    end
    chk(gaps == 0 && rd_en == 0, "idle after event");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(dav_n == 1'b1, "DAV high after reset");
    event_(84, 1, 0);
    event_(84, 2, 0);
    event_(1, 1, 0);
    event_(1, 5, 0);
    event_(10, 3, 1);
    event_(255, 15, 0);
    event_(0, 3, 0);
    event_(7, 0, 0);
    for (int i = 0; i < 10; i++) event_(1 + $urandom % 40, 1 + $urandom % 6, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
