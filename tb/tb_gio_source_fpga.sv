// tb_gio_source_fpga: self-checking test of gio_source_fpga.
// Programs the orbit and long/short_mem registers through the register bus,
// sends BUSY codes on the start net and follows the address played. A model
// of the DPRAM chip's own counter, reset by dpram_ncntrst, must stay equal to
// the FPGA's copy on every clock. Checked against the published behaviour:
//   - limit L makes addresses 0..L+2 play ("set 2 less than the last location"),
//     so short_mem = 13 plays 0..15;
//   - orbit_countdown passes over 0..short_mem+2 while non-zero, decrementing
//     only with BUSY, then runs on to long_mem+2 and reloads;
//   - both limits 0 gives the plain 32K rollover;
//   - register read-back and power-up values.
`timescale 1ns/1ps
module tb_gio_source_fpga;
  import dss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [31:0] rdata;
  logic start_n = 1, rs_count_n = 1;
  logic dpram_ncntrst, busy;
  logic [14:0] dpram_addr, chip_addr;
  logic [19:0] chip_data;
  logic [31:0] orbit_countdown;
  logic [15:0] type_code;

  gio_source_fpga #(.ADDR_W(15)) dut (
    .clk, .rst_n, .req, .rdata, .start_1(start_n), .start_2(start_n), .start_3(start_n),
    .rs_count_n, .dpram_ncntrst, .dpram_addr, .orbit_countdown, .busy, .type_code);

  dpram_model #(.AW(15), .DW(20)) chip (
    .clk, .ncntrst(dpram_ncntrst), .cnten(1'b1), .addr(chip_addr), .rdata(chip_data));

  always #12.5 clk = ~clk;

  // the FPGA counter must track the chip's counter on every clock
  int track_errors = 0;
  always @(negedge clk) if (rst_n && chip_addr !== dpram_addr) track_errors++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic reg_write(input bit b, input logic [31:0] d);
    @(negedge clk);
    req = '{sel_a: !b, sel_b: b, we: 1'b1, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic reg_read(input bit b, output logic [31:0] d);
    @(negedge clk);
    req = '{sel_a: !b, sel_b: b, we: 1'b0, wdata: '0};
    #1 d = rdata;
    @(negedge clk);
    req = '0;
  endtask

  task automatic send_busy(input bit b);
    @(negedge clk) start_n = 0;
    if (!b) @(negedge clk);
    @(negedge clk) start_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic addr_counter_reset();
    @(negedge clk) rs_count_n = 0;
    @(negedge clk) rs_count_n = 1;
  endtask

  // wait until the address is 0 at a negedge following a wrap
  task automatic sync_to_zero();
    int n = 0;
    do begin @(negedge clk); n++; end while (dpram_addr != 0 && n < 40000);
  endtask

  // observe one pass starting at address 0; return the last address played
  task automatic one_pass(output int last);
    last = 0;
    @(negedge clk);
    while (dpram_addr != 0) begin last = int'(dpram_addr); @(negedge clk); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int last;
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(type_code == 16'h0612, "type code");
    reg_read(1, d); chk(d == 32'h0, "register B powers up to 0");
    reg_read(0, d); chk(d == 32'h0, "orbit powers up to 0");
    // limits off: plain 32K rollover
    addr_counter_reset();
    sync_to_zero();
    one_pass(last);
    chk(last == 32767, $sformatf("rollover at 32K, last=%0d", last));

    // single wrap: short_mem = 13 plays 0..15 while countdown != 0
    reg_write(0, 32'd2);
    reg_write(1, {16'd40, 16'd13});
    reg_read(1, d); chk(d == {16'd40, 16'd13}, "register B read-back");
    reg_read(0, d); chk(d == 32'd2, "orbit read-back");
    chk(orbit_countdown == 0, "countdown not loaded before address counter reset");
    addr_counter_reset();
    @(negedge clk);
    chk(orbit_countdown == 2, "countdown loaded by address counter reset");
    sync_to_zero();
    // not busy: countdown stays, short passes repeat
    for (int p = 0; p < 3; p++) begin
      one_pass(last);
      chk(last == 15, $sformatf("short pass (not busy) last=%0d expected 15", last));
      chk(orbit_countdown == 2, "no decrement without BUSY");
    end
    // BUSY: decoded early in a pass, so that pass decrements 2 -> 1, the
    // next short pass decrements 1 -> 0, then a long pass reloads
    send_busy(1);
    chk(busy == 1'b1, "busy decoded");
    chk(dpram_addr < 13, "busy decoded before short_mem");
    sync_to_zero();
    chk(orbit_countdown == 1, $sformatf("countdown 1, got %0d", orbit_countdown));
    one_pass(last); chk(last == 15, $sformatf("short pass with BUSY last=%0d", last));
    chk(orbit_countdown == 0, $sformatf("countdown 0, got %0d", orbit_countdown));
    one_pass(last); chk(last == 42, $sformatf("long pass last=%0d expected 42", last));
    chk(orbit_countdown == 2, "countdown reloaded at long_mem");
    one_pass(last); chk(last == 15, $sformatf("short pass after reload last=%0d", last));
    send_busy(0);
    chk(busy == 1'b0, "not busy decoded");

    // only long_mem set
    reg_write(1, {16'd5, 16'd0});
    addr_counter_reset();
    sync_to_zero();
    for (int p = 0; p < 3; p++) begin
      one_pass(last); chk(last == 7, $sformatf("long-only pass last=%0d expected 7", last));
    end
    // only short_mem set, countdown 0: short ignored, plain rollover
    reg_write(0, 32'd0);
    reg_write(1, {16'd0, 16'd9});
    addr_counter_reset();
    sync_to_zero();
    one_pass(last); chk(last == 32767, $sformatf("short with orbit 0 last=%0d", last));
    chk(track_errors == 0, $sformatf("FPGA counter tracks DPRAM counter (%0d mismatches)", track_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
