// tb_gio_loopback: the GIO ramp-data loopback test, run on dss_top.
//
// The DPRAMs of source FPGAs 1 and 2 hold a ramp (word n = n). Their output
// forms the 32-bit GIO word (20 bits from the first, 12 from the second), which
// a loopback cable brings back to the sink FPGAs on slot 2. Each sink compares
// against its own DPRAM, holding the same ramp and stepped by the same counter
// reset, so with the wraparound running (short_mem 13, long_mem 40, orbit 2,
// BUSY present) every word must match. The unused upper 8 bits of the 12-bit
// channel are masked. Then single bits are flipped on the cable and each flip
// must be counted exactly once by the sink that carries that bit.
`timescale 1ns/1ps
module tb_gio_loopback;
  import dss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [11:0] vme_addr = '0, rod_vme_addr = '0;
  logic vme_strobe = 0, vme_we = 0, rod_vme_strobe = 0, rod_vme_we = 0;
  logic [31:0] vme_wdata = '0, vme_rdata, rod_vme_wdata = '0, rod_vme_rdata;
  logic vme_hit, rod_vme_hit;
  logic front_busy = 0, start_in_n = 1, start_n, rs_count_n = 1;
  logic        src_dpram_ncntrst [4];
  logic [14:0] src_dpram_addr [4];
  logic [31:0] src_orbit_countdown [4];
  logic        src_busy [4];
  logic [31:0] gio_rx_data;
  logic        gio_rx_valid = 0;
  logic [19:0] snk_dpram_data [4], snk_pseudo_data [4];
  logic        snk_pseudo_en = 0, snk_err_clr = 0;
  logic [19:0] snk_dpram_wdata [4], snk_data_in_error [4];
  logic        snk_pattern_match_n [4], snk_err_ovf_n [4];
  logic [15:0] snk_error_count [4];
  logic        rod_trigger = 0;
  logic [3:0]  rod_n_slices = 4'd1;
  logic        rod_dav_n [8], rod_dpram_cnten [8];
  logic [15:0] gio_type_code [8], rod_type_code [8];
  logic        cp_clk;

  dss_top dut (.*);

  always #12.5 clk = ~clk;

  // source DPRAMs (channel A, B) and the sink's reference DPRAMs
  logic [14:0] sa_addr, sb_addr, ra_addr, rb_addr;
  logic [19:0] sa_data, sb_data, ra_data, rb_data;
  dpram_model #(.AW(15), .DW(20)) u_src_a (.clk, .ncntrst(src_dpram_ncntrst[0]), .cnten(1'b1), .addr(sa_addr), .rdata(sa_data));
  dpram_model #(.AW(15), .DW(20)) u_src_b (.clk, .ncntrst(src_dpram_ncntrst[1]), .cnten(1'b1), .addr(sb_addr), .rdata(sb_data));
  dpram_model #(.AW(15), .DW(20)) u_ref_a (.clk, .ncntrst(src_dpram_ncntrst[0]), .cnten(1'b1), .addr(ra_addr), .rdata(ra_data));
  dpram_model #(.AW(15), .DW(20)) u_ref_b (.clk, .ncntrst(src_dpram_ncntrst[1]), .cnten(1'b1), .addr(rb_addr), .rdata(rb_data));

  logic [31:0] inject = '0;
  assign gio_rx_data = {sb_data[11:0], sa_data} ^ inject;
  always_comb begin
    snk_dpram_data[0] = ra_data;
    snk_dpram_data[1] = rb_data;
    snk_dpram_data[2] = '0;
    snk_dpram_data[3] = '0;
    for (int i = 0; i < 4; i++) snk_pseudo_data[i] = '0;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic vme_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    vme_addr = a; vme_wdata = d; vme_we = 1; vme_strobe = 1;
    @(negedge clk);
    vme_strobe = 0; vme_we = 0;
  endtask

  int words = 0, max_addr = 0;
  always @(negedge clk) if (gio_rx_valid) begin
    words++;
    if (int'(sa_addr) > max_addr) max_addr = int'(sa_addr);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2; i++) begin
      vme_write(12'h108 + 12'(4 * i), 32'd2);
      vme_write(12'h130 + 12'(4 * i), {16'd40, 16'd13});
    end
    vme_write(12'h10C + 12'h010, 32'hFF000);   // sink FPGA 6: 12-bit channel
    front_busy = 1;
    repeat (6) @(negedge clk);
    @(negedge clk) rs_count_n = 0;
    @(negedge clk) rs_count_n = 1;
    repeat (4) @(negedge clk);
    @(negedge clk) snk_err_clr = 1;
    @(negedge clk) begin snk_err_clr = 0; gio_rx_valid = 1; end
    repeat (5000) @(negedge clk);
    chk(snk_error_count[0] == 0 && snk_error_count[1] == 0,
        $sformatf("clean loopback: errors %0d / %0d", snk_error_count[0], snk_error_count[1]));
    chk(max_addr == 42, $sformatf("highest address played %0d, expected 42", max_addr));
    // single-bit faults on the cable
    ea = 0; eb = 0;
    for (int k = 0; k < 40; k++) begin
      int bitn;
      bitn = $urandom % 32;
      @(negedge clk) inject = 32'h1 << bitn;
      @(negedge clk) inject = '0;
      if (bitn < 20) ea++; else eb++;
      repeat (3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(snk_error_count[0] == 16'(ea), $sformatf("channel A counted %0d of %0d flips", snk_error_count[0], ea));
    chk(snk_error_count[1] == 16'(eb), $sformatf("channel B counted %0d of %0d flips", snk_error_count[1], eb));
    $display("loopback: %0d words, %0d + %0d injected bit errors", words, ea, eb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
