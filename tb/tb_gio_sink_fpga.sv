// tb_gio_sink_fpga: self-checking test of gio_sink_fpga.
// Feeds received words and DPRAM words, some equal, some differing in masked
// bits and some in compared bits, and checks pattern_match_n (one clock after
// the inputs), the error count, the latched erroneous word, the compare-mask
// register, the pseudo-random reference select, the error clear and the
// below-terminal flag. The terminal value is lowered to 5 to reach it quickly.
`timescale 1ns/1ps
module tb_gio_sink_fpga;
  import dss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [31:0] rdata;
  logic [19:0] dc_data = '0, dpram_data = '0, pseudo_data = '0, dpram_wdata, data_in_error;
  logic dc_valid = 0, pseudo_en = 0, err_clr = 0;
  logic pattern_match_n, err_ovf_n;
  logic [15:0] error_count, type_code;
  int exp_errors = 0;
  logic [19:0] exp_latched = '0;
  logic [19:0] mask = '0;

  gio_sink_fpga #(.WIDTH(20), .ERR_TERMINAL(16'd5)) dut (
    .clk, .rst_n, .req, .rdata, .dc_data, .dc_valid, .dpram_data, .pseudo_data,
    .pseudo_en, .err_clr, .dpram_wdata, .pattern_match_n, .error_count, .err_ovf_n,
    .data_in_error, .type_code);

  always #12.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // present one word; check the compare result one clock later and the
  // counters the clock after that
  task automatic word(input logic [19:0] rx, ref_w, input logic v);
    logic mismatch;
    @(negedge clk);
    dc_data = rx; dc_valid = v;
    if (pseudo_en) pseudo_data = ref_w; else dpram_data = ref_w;
    @(negedge clk);
    dc_valid = 0;
    mismatch = ((rx ^ ref_w) & ~mask) != 0;
    chk(pattern_match_n == mismatch, $sformatf("match rx=%h ref=%h mask=%h", rx, ref_w, mask));
    chk(dpram_wdata == rx, "received word on dpram_wdata");
    if (v && mismatch && exp_errors < 5) exp_errors++;
    if (v && mismatch) exp_latched = rx;
    @(negedge clk);
    chk(error_count == 16'(exp_errors), $sformatf("error count %0d expected %0d", error_count, exp_errors));
    chk(data_in_error == exp_latched, $sformatf("data_in_error %h expected %h", data_in_error, exp_latched));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(type_code == 16'h0A13, "type code");
    chk(err_ovf_n == 1'b1, "flag after reset");
    word(20'h12345, 20'h12345, 1);
    word(20'h12345, 20'h12344, 1);          // error 1
    word(20'h00000, 20'h00001, 0);          // mismatch, not valid: not counted
    // mask the 8 upper bits, as for a 12-bit channel
    mask = 20'hFF000;
    @(negedge clk) req = '{sel_a: 1'b1, sel_b: 1'b0, we: 1'b1, wdata: 32'hFFFF_F000};
    @(negedge clk) req = '{sel_a: 1'b1, sel_b: 1'b0, we: 1'b0, wdata: '0};
    #1 chk(rdata == 32'h000F_F000, $sformatf("mask read-back %h", rdata));
    @(negedge clk) req = '0;
    word(20'hAB123, 20'h00123, 1);          // differs only in masked bits
    word(20'hAB123, 20'h00124, 1);          // error 2
    for (int i = 0; i < 200; i++) begin
      logic [19:0] r;
      r = 20'($urandom);
      word(r, ($urandom % 2) ? r : r ^ 20'($urandom), 1'($urandom));
    end
    chk(error_count == 16'd5, "counter stopped at terminal value");
    chk(err_ovf_n == 1'b0, "flag low at terminal value");
    // clear, then pseudo-random reference
    @(negedge clk) err_clr = 1;
    @(negedge clk) err_clr = 0;
    exp_errors = 0;
    @(negedge clk);
    chk(error_count == 0 && err_ovf_n == 1'b1, "error clear");
    pseudo_en = 1; dpram_data = 20'h55555;
    word(20'h00ABC, 20'h00ABC, 1);
    word(20'h00ABC, 20'h00ABD, 1);
    pseudo_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
