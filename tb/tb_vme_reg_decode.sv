// tb_vme_reg_decode: self-checking test of vme_reg_decode.
// Walks every byte offset 0x000-0x3FF and checks which data-FPGA register is
// selected against the published address lists (card 1: A at 108/10C/110/114,
// B at 130/134/138/13C; card 2: A at 118/11C/120/124, B at 140/144/148/14C),
// that only the selected FPGA's read data comes back, that nothing is
// selected without strobe, and that we/wdata reach the FPGAs.
`timescale 1ns/1ps
module tb_vme_reg_decode;
  import dss_pkg::*;
  int checks = 0, failures = 0;
  logic [11:0] addr;
  logic strobe, we;
  logic [31:0] wdata, rdata;
  logic hit;
  reg_req_t req [8];
  logic [31:0] fpga_rdata [8];

  localparam logic [11:0] A_LIST [8] = '{12'h108, 12'h10C, 12'h110, 12'h114,
                                         12'h118, 12'h11C, 12'h120, 12'h124};
  localparam logic [11:0] B_LIST [8] = '{12'h130, 12'h134, 12'h138, 12'h13C,
                                         12'h140, 12'h144, 12'h148, 12'h14C};

  vme_reg_decode #(.NF(8)) dut (.addr, .strobe, .we, .wdata, .req, .fpga_rdata, .rdata, .hit);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) fpga_rdata[i] = 32'hC0DE_0000 + 32'(i);
    for (int s = 0; s < 2; s++) begin
      for (int a = 0; a < 1024; a++) begin
        int ea, eb;
        logic [31:0] wd;
        wd = $urandom;
        addr = 12'(a); strobe = 1'(s); we = 1'($urandom); wdata = wd;
        #1;
        ea = -1; eb = -1;
        for (int i = 0; i < 8; i++) begin
          if (s == 1 && 12'(a) == A_LIST[i]) ea = i;
          if (s == 1 && 12'(a) == B_LIST[i]) eb = i;
        end
        for (int i = 0; i < 8; i++) begin
          chk(req[i].sel_a == (ea == i) && req[i].sel_b == (eb == i),
              $sformatf("addr %h strobe %0d fpga %0d sel_a=%b sel_b=%b", a, s, i, req[i].sel_a, req[i].sel_b));
          chk(req[i].we == we && req[i].wdata == wd, "we/wdata broadcast");
        end
        chk(hit == (ea >= 0 || eb >= 0), $sformatf("hit at %h", a));
        if (ea >= 0) chk(rdata == 32'hC0DE_0000 + 32'(ea), $sformatf("rdata at %h", a));
        if (eb >= 0) chk(rdata == 32'hC0DE_0000 + 32'(eb), $sformatf("rdata at %h", a));
        if (ea < 0 && eb < 0) chk(rdata == 0, $sformatf("rdata 0 at %h", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
