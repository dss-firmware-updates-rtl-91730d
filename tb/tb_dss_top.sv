// tb_dss_top: end-to-end test of dss_top at its default sizes (32K DPRAMs,
// 20-bit sink channels).
//
// GIO system: every data-FPGA register is written and read back through the
// register bus at its published offset. The four source FPGAs get different
// wraparound settings and each drives a model of its DPRAM chip, whose own
// counter must track the FPGA's on every clock. The front-panel BUSY is
// toggled, so codes travel over the start net. The sink FPGAs receive a
// 32-bit GIO word split into a 20-bit and a 12-bit channel, with masked and
// unmasked differences and the pseudo-random reference select.
// ROD Test system: DAV length programmed per FPGA, one- and two-slice events.
// Each mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module tb_dss_top;
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
  logic [31:0] gio_rx_data = '0;
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
  int          n_cp_edges = 0;
  always @(posedge cp_clk) n_cp_edges++;

  dss_top dut (.*);

  always #12.5 clk = ~clk;

  // DPRAM chips of the four source FPGAs
  logic [14:0] chip_addr [4];
  logic [19:0] chip_data [4];
  for (genvar i = 0; i < 4; i++) begin : g_chip
    dpram_model #(.AW(15), .DW(20)) u_chip (.clk, .ncntrst(src_dpram_ncntrst[i]),
      .cnten(1'b1), .addr(chip_addr[i]), .rdata(chip_data[i]));
  end

  // mechanism counters
  int n_busy_on = 0, n_busy_off = 0, n_short_wrap = 0, n_long_wrap = 0, n_decrement = 0;
  int n_reload = 0, n_rollover = 0, n_masked_ok = 0, n_error = 0, n_pseudo = 0;
  int n_dav_single = 0, n_dav_multi = 0, n_track_err = 0;

  // per-source wrap observation
  int unsigned last_addr [4];
  logic [31:0] last_cd [4];
  logic        last_busy [4];
  int          wrap_at [4][$];
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (chip_addr[i] !== src_dpram_addr[i]) n_track_err++;
      if (src_dpram_addr[i] == 0 && last_addr[i] != 0) wrap_at[i].push_back(int'(last_addr[i]));
      if (src_orbit_countdown[i] == last_cd[i] - 1) n_decrement++;
      if (src_busy[i] && !last_busy[i]) n_busy_on++;
      if (!src_busy[i] && last_busy[i]) n_busy_off++;
      last_addr[i] = src_dpram_addr[i];
      last_cd[i]   = src_orbit_countdown[i];
      last_busy[i] = src_busy[i];
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic vme_write(input bit rod, input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    if (rod) begin rod_vme_addr = a; rod_vme_wdata = d; rod_vme_we = 1; rod_vme_strobe = 1; end
    else     begin vme_addr = a; vme_wdata = d; vme_we = 1; vme_strobe = 1; end
    @(negedge clk);
    rod_vme_strobe = 0; rod_vme_we = 0; vme_strobe = 0; vme_we = 0;
  endtask

  task automatic vme_read(input bit rod, input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    if (rod) begin rod_vme_addr = a; rod_vme_strobe = 1; #1 d = rod_vme_rdata; chk(rod_vme_hit, "rod hit"); end
    else     begin vme_addr = a; vme_strobe = 1; #1 d = vme_rdata; chk(vme_hit, "hit"); end
    @(negedge clk);
    rod_vme_strobe = 0; vme_strobe = 0;
  endtask

  function automatic logic [11:0] a_off(int i); return 12'h108 + 12'(4 * i); endfunction
  function automatic logic [11:0] b_off(int i); return 12'h130 + 12'(4 * i); endfunction

  // one sink word; returns after its counters have settled
  task automatic sink_word(input logic [31:0] rx, input logic [31:0] exp_w, input bit expect_err);
    logic [15:0] before0, before1;
    before0 = snk_error_count[0]; before1 = snk_error_count[1];
    @(negedge clk);
    gio_rx_data = rx; gio_rx_valid = 1;
    if (snk_pseudo_en) begin snk_pseudo_data[0] = exp_w[19:0]; snk_pseudo_data[1] = {8'h0, exp_w[31:20]}; end
    else               begin snk_dpram_data[0]  = exp_w[19:0]; snk_dpram_data[1]  = {8'h0, exp_w[31:20]}; end
    @(negedge clk);
    gio_rx_valid = 0;
    @(negedge clk);
    chk(((snk_error_count[0] != before0) || (snk_error_count[1] != before1)) == expect_err,
        $sformatf("sink error on %h vs %h expected %0d", rx, exp_w, expect_err));
    if (expect_err) n_error++; else if (rx != exp_w) n_masked_ok++;
    if (snk_pseudo_en) n_pseudo++;
  endtask

  task automatic dav_event(input int slices, input int len);
    int low [8];
    @(negedge clk) begin rod_n_slices = 4'(slices); rod_trigger = 1; end
    @(negedge clk) rod_trigger = 0;
    for (int i = 0; i < 8; i++) low[i] = 0;
    repeat (slices * 255 + 10) begin
      for (int i = 0; i < 8; i++) if (!rod_dav_n[i]) low[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++)
      chk(low[i] == slices * (len + i), $sformatf("rod fpga %0d DAV %0d expected %0d", i, low[i], slices * (len + i)));
    if (slices == 1) n_dav_single++; else n_dav_multi++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 4; i++) begin
      snk_dpram_data[i] = '0; snk_pseudo_data[i] = '0;
      last_addr[i] = 0; last_cd[i] = 0; last_busy[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // type codes and power-up values
    for (int i = 0; i < 4; i++) chk(gio_type_code[i] == 16'h0612, "source type code");
    for (int i = 4; i < 8; i++) chk(gio_type_code[i] == 16'h0A13, "sink type code");
    for (int i = 0; i < 8; i++) chk(rod_type_code[i] == 16'h0216, "rod type code");
    for (int i = 0; i < 8; i++) begin
      vme_read(1, a_off(i), d); chk(d == 32'd84, $sformatf("rod fpga %0d DAV length powers up to 84", i));
    end

    // 32K rollover with the power-up (disabled) limits
    @(negedge clk) rs_count_n = 0;
    @(negedge clk) rs_count_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 4; i++) wrap_at[i].delete();
    repeat (32768 + 10) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      chk(wrap_at[i].size() == 1 && wrap_at[i][0] == 32767, $sformatf("source %0d 32K rollover", i));
      if (wrap_at[i].size() == 1 && wrap_at[i][0] == 32767) n_rollover++;
    end

    // program the sources: orbit (A) and {long_mem, short_mem} (B)
    vme_write(0, a_off(0), 32'd2);  vme_write(0, b_off(0), {16'd40, 16'd13});
    vme_write(0, a_off(1), 32'd0);  vme_write(0, b_off(1), {16'd5,  16'd0});
    vme_write(0, a_off(2), 32'd9);  vme_write(0, b_off(2), {16'd0,  16'd0});
    vme_write(0, a_off(3), 32'd1);  vme_write(0, b_off(3), {16'd30, 16'd20});
    vme_read(0, b_off(0), d); chk(d == {16'd40, 16'd13}, "source 0 register B");
    vme_read(0, a_off(3), d); chk(d == 32'd1, "source 3 orbit");
    // sinks: mask the unused upper 8 bits of the 12-bit channel, all of 7 and 8
    vme_write(0, a_off(5), 32'hFF000);
    vme_write(0, a_off(6), 32'hFFFFF);
    vme_write(0, a_off(7), 32'hFFFFF);
    vme_read(0, a_off(5), d); chk(d == 32'hFF000, "sink mask read-back");

    // BUSY on, Address Counter Reset, run
    front_busy = 1;
    @(negedge clk) rs_count_n = 0;
    @(negedge clk) rs_count_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 4; i++) wrap_at[i].delete();
    repeat (400) @(negedge clk);
    front_busy = 0;
    repeat (400) @(negedge clk);

    // source 0: (busy) 15,15 then 42, then repeats; later without BUSY only 15s
    chk(wrap_at[0].size() > 6 && wrap_at[0][0] == 15 && wrap_at[0][1] == 15 && wrap_at[0][2] == 42,
        "source 0 wrap sequence 15,15,42");
    foreach (wrap_at[0][k]) begin
      if (wrap_at[0][k] == 15) n_short_wrap++;
      if (wrap_at[0][k] == 42) begin n_long_wrap++; n_reload++; end
      chk(wrap_at[0][k] == 15 || wrap_at[0][k] == 42, "source 0 wraps only at 15 or 42");
    end
    chk(wrap_at[0][wrap_at[0].size()-1] == 15 && wrap_at[0][wrap_at[0].size()-2] == 15,
        "source 0 without BUSY keeps to short passes");
    foreach (wrap_at[1][k]) chk(wrap_at[1][k] == 7, "source 1 long-only wraps at 7");
    chk(wrap_at[2].size() == 0, "source 2 limits off: no wrap within 800 clocks");
    chk(wrap_at[3].size() > 2 && wrap_at[3][0] == 22 && wrap_at[3][1] == 32, "source 3 wrap sequence 22,32");
    chk(n_track_err == 0, $sformatf("FPGA counters track DPRAM counters (%0d mismatches)", n_track_err));

    // original start still passes onto the start net (three clocks or more,
    // so it is not taken for a BUSY code)
    @(negedge clk) start_in_n = 0;
    @(negedge clk) chk(start_n == 1'b0, "original start on start net");
    repeat (3) @(negedge clk);
    start_in_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 4; i++) chk(src_busy[i] == 1'b0, "original start not taken as a code");

    // sinks
    sink_word(32'h1234_5678, 32'h1234_5678, 0);
    sink_word(32'h1234_5678, 32'h1234_5679, 1);          // channel A bit 0
    sink_word(32'h8234_5678, 32'h1234_5678, 1);          // channel B bit 31
    sink_word(32'hABCD_E012, 32'hABCD_E012, 0);
    snk_pseudo_en = 1;
    sink_word(32'h0F0F_0F0F, 32'h0F0F_0F0F, 0);
    sink_word(32'h0F0F_0F0F, 32'h0F0F_1F0F, 1);
    snk_pseudo_en = 0;
    chk(snk_data_in_error[0] == 20'hF0F0F, "channel A error word latched");
    // masked bits: drive differences into the masked (upper 8) bits of channel B
    // through the sink DPRAM word, which the mask must hide
    @(negedge clk);
    gio_rx_data = 32'h0000_0001; gio_rx_valid = 1;
    snk_dpram_data[0] = 20'h00001; snk_dpram_data[1] = 20'hFF000;
    @(negedge clk) gio_rx_valid = 0;
    @(negedge clk);
    chk(snk_pattern_match_n[1] == 1'b0, "masked bits ignored in channel B");
    if (!snk_pattern_match_n[1]) n_masked_ok++;
    vme_read(0, a_off(4), d); chk(d == 32'h0, "channel A mask 0");

    // ROD Test: DAV length 20+i on FPGA i
    for (int i = 0; i < 8; i++) vme_write(1, a_off(i), 32'(20 + i));
    dav_event(1, 20);
    dav_event(2, 20);

    chk(n_cp_edges > 0,   "mechanism: CP clock divider running");
    chk(n_busy_on > 0,    "mechanism: BUSY code");
    chk(n_busy_off > 0,   "mechanism: NOT BUSY code");
    chk(n_short_wrap > 0, "mechanism: short_mem wrap");
    chk(n_long_wrap > 0,  "mechanism: long_mem wrap");
    chk(n_decrement > 0,  "mechanism: orbit countdown decrement");
    chk(n_reload > 0,     "mechanism: orbit countdown reload");
    chk(n_rollover > 0,   "mechanism: 32K rollover");
    chk(n_masked_ok > 0,  "mechanism: masked compare");
    chk(n_error > 0,      "mechanism: compare error");
    chk(n_pseudo > 0,     "mechanism: pseudo-random reference");
    chk(n_dav_single > 0, "mechanism: single-slice DAV");
    chk(n_dav_multi > 0,  "mechanism: multi-slice DAV");
    $display("mechanisms: busy_on=%0d busy_off=%0d short_wrap=%0d long_wrap=%0d decrement=%0d reload=%0d rollover=%0d masked=%0d error=%0d pseudo=%0d dav1=%0d dav2=%0d",
      n_busy_on, n_busy_off, n_short_wrap, n_long_wrap, n_decrement, n_reload, n_rollover,
      n_masked_ok, n_error, n_pseudo, n_dav_single, n_dav_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
