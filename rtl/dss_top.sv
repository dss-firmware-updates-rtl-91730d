// dss_top: the DSS data-FPGA firmware after the PCO 001 changes.
//
// Two firmware sets stand side by side, each with its own register bus:
//
// GIO test system. A front-panel BUSY enters busy_encode and travels on the
// start net to the data FPGAs. Daughter-card slot 1 (data FPGAs 1-4) runs the
// GIO source firmware: each FPGA replays its DPRAM with the programmable
// short_mem / long_mem / orbit wraparound and drives its DPRAM chips' counter
// reset. Slot 2 (data FPGAs 5-8) runs the GIO sink firmware: each compares
// one 20-bit channel with its DPRAM under a compare mask and counts errors.
// The 32-bit GIO word is split as on the card: bits 19:0 to the first sink
// FPGA (channel A, 20 bits), bits 31:20 to the second (channel B, 12 bits,
// upper 8 bits tied to 0 so they should be masked); the third and fourth
// sink FPGAs have no GIO channel and see 0. Which slot holds the source and
// which the sink, and the bit order of the split, are this design's choices.
//
// CP chip clock. A divide-by-two of the 40 MHz clock, a separate small
// request, stands on its own output.
//
// ROD Test system. Eight data FPGAs run the ROD Test firmware, each with its
// DAV length register at its register-A offset, all started by one trigger.
//
// The DPRAM chips, the daughter cards and the pseudo-random reference
// generator are outside: their signals are ports. Register offsets follow
// dss_pkg (A at 0x108+4i, B at 0x130+4i). Everything is synchronous to clk
// (40 MHz, one DPRAM word per 25 ns); rst_n is the asynchronous power-up
// reset.
module dss_top
  import dss_pkg::*;
#(
  parameter int unsigned ADDR_W  = 15,        // 32K-word DPRAMs
  parameter int unsigned SINK_W  = 20,        // bits per sink channel
  parameter int unsigned SLICE_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,

  // GIO system register bus
  input  logic [VME_AW-1:0]  vme_addr,
  input  logic               vme_strobe,
  input  logic               vme_we,
  input  logic [31:0]        vme_wdata,
  output logic [31:0]        vme_rdata,
  output logic               vme_hit,

  // BUSY and the start net
  input  logic               front_busy,
  input  logic               start_in_n,
  output logic               start_n,
  input  logic               rs_count_n,      // Address Counter Reset

  // GIO source, slot 1
  output logic               src_dpram_ncntrst [FPGAS_PER_CARD],
  output logic [ADDR_W-1:0]  src_dpram_addr    [FPGAS_PER_CARD],
  output logic [31:0]        src_orbit_countdown [FPGAS_PER_CARD],
  output logic               src_busy          [FPGAS_PER_CARD],

  // GIO sink, slot 2
  input  logic [31:0]        gio_rx_data,
  input  logic               gio_rx_valid,
  input  logic [SINK_W-1:0]  snk_dpram_data    [FPGAS_PER_CARD],
  input  logic [SINK_W-1:0]  snk_pseudo_data   [FPGAS_PER_CARD],
  input  logic               snk_pseudo_en,
  input  logic               snk_err_clr,
  output logic [SINK_W-1:0]  snk_dpram_wdata   [FPGAS_PER_CARD],
  output logic               snk_pattern_match_n [FPGAS_PER_CARD],
  output logic [15:0]        snk_error_count   [FPGAS_PER_CARD],
  output logic               snk_err_ovf_n     [FPGAS_PER_CARD],
  output logic [SINK_W-1:0]  snk_data_in_error [FPGAS_PER_CARD],

  // ROD Test system
  input  logic [VME_AW-1:0]  rod_vme_addr,
  input  logic               rod_vme_strobe,
  input  logic               rod_vme_we,
  input  logic [31:0]        rod_vme_wdata,
  output logic [31:0]        rod_vme_rdata,
  output logic               rod_vme_hit,
  input  logic               rod_trigger,
  input  logic [SLICE_W-1:0] rod_n_slices,
  output logic               rod_dav_n       [N_FPGA],
  output logic               rod_dpram_cnten [N_FPGA],

  // version/type code of each data FPGA
  output logic [15:0]        gio_type_code [N_FPGA],
  output logic [15:0]        rod_type_code [N_FPGA],

  // divided clock for the CP chip
  output logic               cp_clk
);

  localparam int unsigned NC = FPGAS_PER_CARD;

  // ---------------- GIO system ----------------
  reg_req_t    req   [N_FPGA];
  logic [31:0] fpga_rdata [N_FPGA];
  logic [SINK_W-1:0] snk_rx [NC];

  vme_reg_decode #(.NF(N_FPGA)) u_decode (
    .addr(vme_addr), .strobe(vme_strobe), .we(vme_we), .wdata(vme_wdata),
    .req, .fpga_rdata, .rdata(vme_rdata), .hit(vme_hit)
  );

  busy_encode u_busy_encode (
    .clk, .rst_n, .busy_in(front_busy), .start_in_n, .start_n
  );

  for (genvar i = 0; i < NC; i++) begin : g_source
    gio_source_fpga #(.ADDR_W(ADDR_W)) u_src (
      .clk, .rst_n, .req(req[i]), .rdata(fpga_rdata[i]),
      .start_1(start_n), .start_2(start_n), .start_3(start_n),
      .rs_count_n,
      .dpram_ncntrst(src_dpram_ncntrst[i]), .dpram_addr(src_dpram_addr[i]),
      .orbit_countdown(src_orbit_countdown[i]), .busy(src_busy[i]),
      .type_code(gio_type_code[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NC; i++) snk_rx[i] = '0;
    snk_rx[0] = gio_rx_data[SINK_W-1:0];
    snk_rx[1] = SINK_W'(gio_rx_data[31:SINK_W]);
  end

  for (genvar i = 0; i < NC; i++) begin : g_sink
    gio_sink_fpga #(.WIDTH(SINK_W)) u_snk (
      .clk, .rst_n, .req(req[NC+i]), .rdata(fpga_rdata[NC+i]),
      .dc_data(snk_rx[i]), .dc_valid(gio_rx_valid),
      .dpram_data(snk_dpram_data[i]), .pseudo_data(snk_pseudo_data[i]),
      .pseudo_en(snk_pseudo_en), .err_clr(snk_err_clr),
      .dpram_wdata(snk_dpram_wdata[i]), .pattern_match_n(snk_pattern_match_n[i]),
      .error_count(snk_error_count[i]), .err_ovf_n(snk_err_ovf_n[i]),
      .data_in_error(snk_data_in_error[i]), .type_code(gio_type_code[NC+i])
    );
  end

  // ---------------- ROD Test system ----------------
  reg_req_t    rod_req   [N_FPGA];
  logic [31:0] rod_rdata [N_FPGA];

  vme_reg_decode #(.NF(N_FPGA)) u_rod_decode (
    .addr(rod_vme_addr), .strobe(rod_vme_strobe), .we(rod_vme_we),
    .wdata(rod_vme_wdata), .req(rod_req), .fpga_rdata(rod_rdata),
    .rdata(rod_vme_rdata), .hit(rod_vme_hit)
  );

  for (genvar i = 0; i < N_FPGA; i++) begin : g_rod
    rod_test_fpga #(.SLICE_W(SLICE_W)) u_rod (
      .clk, .rst_n, .req(rod_req[i]), .rdata(rod_rdata[i]),
      .trigger(rod_trigger), .n_slices(rod_n_slices),
      .dav_n(rod_dav_n[i]), .dpram_cnten(rod_dpram_cnten[i]),
      .type_code(rod_type_code[i])
    );
  end

  // ---------------- CP chip clock ----------------
  clk_div2 u_cp_clk (.clk, .rst_n, .clk_out(cp_clk));

endmodule
