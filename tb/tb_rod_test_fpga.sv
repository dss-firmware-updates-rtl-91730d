// tb_rod_test_fpga: self-checking test of rod_test_fpga.
// Checks the DAV length register: powers up to 84, read-back through the
// register bus, 8 bits wide; then checks that DAV lasts the programmed length
// per slice for one and two slices, and the type code 0216.
`timescale 1ns/1ps
module tb_rod_test_fpga;
  import dss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, trigger = 0;
  reg_req_t req;
  logic [31:0] rdata;
  logic [3:0] n_slices = 4'd1;
  logic dav_n, dpram_cnten;
  logic [15:0] type_code;

  rod_test_fpga #(.SLICE_W(4)) dut (.clk, .rst_n, .req, .rdata, .trigger, .n_slices,
    .dav_n, .dpram_cnten, .type_code);

  always #12.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int slices, input int expected);
    int low = 0;
    @(negedge clk) begin n_slices = 4'(slices); trigger = 1; end
    @(negedge clk) trigger = 0;
    while (!dav_n && low < 5000) begin
      if (!dpram_cnten) begin failures++; $display("FAIL cnten low during DAV"); end
      low++; @(negedge clk);
    end
    chk(low == expected, $sformatf("DAV %0d clocks expected %0d", low, expected));
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
    chk(type_code == 16'h0216, "type code");
    req = '{sel_a: 1'b1, sel_b: 1'b0, we: 1'b0, wdata: '0};
    #1 chk(rdata == 32'd84, $sformatf("power-up DAV length %0d", rdata));
    @(negedge clk) req = '0;
    #1 chk(rdata == 32'd0, "no read data when not selected");
    measure(1, 84);
    measure(2, 168);
    @(negedge clk) req = '{sel_a: 1'b1, sel_b: 1'b0, we: 1'b1, wdata: 32'hFFFF_FF0C};
    @(negedge clk) req = '{sel_a: 1'b0, sel_b: 1'b1, we: 1'b1, wdata: 32'h0000_0033};
    @(negedge clk) req = '{sel_a: 1'b1, sel_b: 1'b0, we: 1'b0, wdata: '0};
    #1 chk(rdata == 32'd12, $sformatf("DAV length read-back %0d", rdata));
    @(negedge clk) req = '0;
    measure(1, 12);
    measure(3, 36);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
