// tb_orbit_counter: self-checking test of orbit_counter.
// Drives the two comparator outputs, busy and the Address Counter Reset as
// single-clock events and checks orbit_countdown and the registered,
// one-clock n_reset request against the published rules: reload on Address
// Counter Reset and at long_mem, reset-and-decrement (with BUSY) at short_mem
// only while the countdown is non-zero.
`timescale 1ns/1ps
module tb_orbit_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rs_count_n = 1, busy = 0, neq_long_mem = 1, neq_short_mem = 1;
  logic [31:0] orbit = 32'd3;
  logic [31:0] orbit_countdown;
  logic n_reset;

  orbit_counter #(.W(32)) dut (.clk, .rst_n, .rs_count_n, .orbit, .busy,
    .neq_long_mem, .neq_short_mem, .orbit_countdown, .n_reset);

  always #12.5 clk = ~clk;

  task automatic expect_state(input logic [31:0] cd, input logic nr, input string what);
    checks++;
    if (orbit_countdown !== cd || n_reset !== nr) begin
      failures++;
      $display("FAIL %s: countdown=%0d n_reset=%b expected %0d %b", what, orbit_countdown, n_reset, cd, nr);
    end
  endtask

  // one event clock, then check the registered result
  task automatic step(input logic rs, sh, lg, bz, input logic [31:0] cd, input logic nr, input string what);
    @(negedge clk);
    rs_count_n = rs; neq_short_mem = sh; neq_long_mem = lg; busy = bz;
    @(negedge clk);
    expect_state(cd, nr, what);
    rs_count_n = 1; neq_short_mem = 1; neq_long_mem = 1;
    @(negedge clk);
    expect_state(cd, 1'b1, {what, " (request gone)"});
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_state(0, 1'b1, "power-up");
    // short_mem with countdown 0: no reset
    step(1, 0, 1, 1, 0, 1'b1, "short, countdown 0");
    // Address Counter Reset copies orbit
    step(0, 1, 1, 0, 3, 1'b1, "address counter reset");
    // short_mem, not busy: reset, no decrement
    step(1, 0, 1, 0, 3, 1'b0, "short, not busy");
    // short_mem, busy: reset and decrement 3 -> 2 -> 1 -> 0
    step(1, 0, 1, 1, 2, 1'b0, "short, busy 1");
    step(1, 0, 1, 1, 1, 1'b0, "short, busy 2");
    step(1, 0, 1, 1, 0, 1'b0, "short, busy 3");
    // countdown exhausted: short_mem ignored
    step(1, 0, 1, 1, 0, 1'b1, "short, exhausted");
    // long_mem: reset and reload
    orbit = 32'd7;
    step(1, 1, 0, 0, 7, 1'b0, "long reload");
    // both at once: long wins
    step(1, 0, 0, 1, 7, 1'b0, "both");
    // large orbit value
    orbit = 32'hFFFF_FFFF;
    step(0, 1, 1, 0, 32'hFFFF_FFFF, 1'b1, "reset large");
    step(1, 0, 1, 1, 32'hFFFF_FFFE, 1'b0, "decrement large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
