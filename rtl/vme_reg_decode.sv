// vme_reg_decode: register decoding for the extra data-FPGA registers.
//
// Combinational decoder standing for the VME register CPLD. A VME access with
// byte offset 0x108 + 4*i selects register A of data FPGA i, an access at
// 0x130 + 4*i selects its register B (i = 0..N_FPGA-1). For card 1 this gives
// A at 0x108/0x10C/0x110/0x114 and B at 0x130/0x134/0x138/0x13C; for card 2,
// A at 0x118..0x124 and B at 0x140..0x14C, as published. The decoder turns the
// access into a reg_req_t for the addressed FPGA, returns that FPGA's read
// data and raises hit. Offsets outside these sixteen are ignored (hit low,
// rdata zero); the rest of the board's register map is not modelled.
//
// Interface: addr/strobe/we/wdata describe one access, valid while strobe is
// high; writes take effect at the data FPGA's next clock edge. Timing: purely
// combinational, no latency of its own. An immediate assertion checks that
// no offset selects two FPGAs.
module vme_reg_decode
  import dss_pkg::*;
#(
  parameter int unsigned NF = N_FPGA
) (
  input  logic [VME_AW-1:0] addr,
  input  logic              strobe,
  input  logic              we,
  input  logic [31:0]       wdata,
  output reg_req_t          req      [NF],
  input  logic [31:0]       fpga_rdata [NF],
  output logic [31:0]       rdata,
  output logic              hit
);

  logic [NF-1:0] sel;

  for (genvar i = 0; i < NF; i++) begin : g_sel
    assign req[i].sel_a = strobe && (addr == REG_A_BASE + VME_AW'(i) * REG_STRIDE);
    assign req[i].sel_b = strobe && (addr == REG_B_BASE + VME_AW'(i) * REG_STRIDE);
    assign req[i].we    = we;
    assign req[i].wdata = wdata;
    assign sel[i]       = req[i].sel_a || req[i].sel_b;
  end

  assign hit = |sel;

  // the register offsets of different FPGAs must never overlap
  always_comb begin
    if (strobe) assert ((sel & (sel - 1'b1)) == '0)
      else $error("vme_reg_decode: offset %h selects more than one FPGA", addr);
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < NF; i++)
      if (sel[i]) rdata = fpga_rdata[i];
  end

endmodule
