// gio_source_fpga: data FPGA of the "LVDS Source for GIO" firmware (type 0612).
//
// The DSS plays the contents of a 32K dual-port memory (DPRAM) out through
// the GIO daughter card, one word every 25 ns. The DPRAM chips step their own
// address counter; this FPGA keeps an identical counter (dpram_addr) and
// decides when both go back to 0 through the chips' synchronous counter reset
// dpram_ncntrst. The wrap point is programmable instead of the fixed 32K:
//   - register A (orbit, 32 bit) sets how many single-orbit passes are
//     played over 0..short_mem before the multi-orbit data set runs on to
//     long_mem;
//   - register B holds long_mem in bits 31:16 and short_mem in bits 15:0;
//     a limit of 0x0000 switches its comparator off, so both at 0 gives the
//     plain 32K rollover. Register B powers up to 0 (wraparound off).
//   - orbit_countdown is decremented at short_mem only while the front-panel
//     BUSY is present; BUSY arrives encoded on the start net (busy_decode).
// Latency: a match at address L asserts the orbit counter's request one clock
// later, the counter-reset flop one clock after that, and the counters clear
// on the next edge, so addresses 0..L+2 are played. A limit must therefore be
// set 2 below the last location wanted (13 to play 0..15), as published.
// After writing orbit an Address Counter Reset (rs_count_n) copies it into
// orbit_countdown.
//
// Published: the register map and fields, the comparator/orbit counter/counter
// reset structure and the two-less rule. This design's own: the register bus,
// the 15-bit address counter width taken from the 32K depth, and the
// zero-extension of the address to the 16-bit limits.
//
// Interface: req/rdata is one register access (rdata combinational);
// start_1..3 are the start net copies; rs_count_n is the active-low Address
// Counter Reset; dpram_ncntrst goes to the DPRAM chips' counter reset.
module gio_source_fpga
  import dss_pkg::*;
#(
  parameter int unsigned ADDR_W = 15          // 32K-word DPRAM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          req,
  output logic [31:0]       rdata,
  input  logic              start_1,
  input  logic              start_2,
  input  logic              start_3,
  input  logic              rs_count_n,
  output logic              dpram_ncntrst,
  output logic [ADDR_W-1:0] dpram_addr,
  output logic [31:0]       orbit_countdown,
  output logic              busy,
  output logic [15:0]       type_code
);

  logic [31:0] orbit;
  logic [15:0] long_mem, short_mem;
  logic [15:0] addr16;
  logic        neq_long_mem, neq_short_mem;
  logic        n_reset, counter_reset, counter_reset_int;

  assign type_code = TYPE_GIO_SOURCE;

  // registers A and B
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orbit     <= '0;
      long_mem  <= '0;
      short_mem <= '0;
    end else if (req.we) begin
      if (req.sel_a) orbit <= req.wdata;
      if (req.sel_b) {long_mem, short_mem} <= req.wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (req.sel_a) rdata = orbit;
    if (req.sel_b) rdata = {long_mem, short_mem};
  end

  busy_decode u_busy_decode (
    .clk, .rst_n, .start_1, .start_2, .start_3, .busy
  );

  assign addr16 = 16'(dpram_addr);

  comparator_en #(.WIDTH(16)) u_cmp_long (
    .a(long_mem), .b(addr16), .en(long_mem != '0), .neq(neq_long_mem)
  );

  comparator_en #(.WIDTH(16)) u_cmp_short (
    .a(short_mem), .b(addr16), .en(short_mem != '0), .neq(neq_short_mem)
  );

  orbit_counter #(.W(32)) u_orbit_counter (
    .clk, .rst_n, .rs_count_n, .orbit, .busy,
    .neq_long_mem, .neq_short_mem, .orbit_countdown, .n_reset
  );

  // active-low counter reset: Address Counter Reset or a wraparound request
  assign counter_reset = rs_count_n && n_reset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) counter_reset_int <= 1'b0;
    else        counter_reset_int <= counter_reset;
  end

  assign dpram_ncntrst = counter_reset_int;

  add_cnt #(.WIDTH(ADDR_W)) u_addr_cnt (
    .clk, .rst_n, .clr_n(counter_reset_int), .en(1'b1), .q(dpram_addr)
  );

endmodule
