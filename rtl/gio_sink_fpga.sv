// gio_sink_fpga: data FPGA of the "LVDS Sink for GIO" firmware (type 0A13).
//
// Each sink FPGA receives one WIDTH-bit channel from the daughter card and
// compares it, word by word, with a reference: the word read from its DPRAM,
// or an external pseudo-random pattern when pseudo_en is high. The board was
// built for four 20-bit channels (80 bits); the GIO card has only 32 bits,
// 20 on the first FPGA of a slot and 12 on the second, so a 20-bit compare
// mask (register A) removes bits from the comparison: a mask bit at 1
// disables that bit. Both operands are ORed with the mask and then tested for
// equality, as published.
//
// Pipeline: the received word and the DPRAM word are registered first
// (dc_data_int, dpram_data_int, with dc_valid delayed alongside), then
// compared combinationally. pattern_match_n is low while the registered
// words agree. On a valid mismatch the 16-bit error counter counts up and
// the received word is latched into data_in_error. err_ovf_n is the registered
// flag "error count below its terminal value"; the counter stops at that
// terminal value (0xFFFF). err_clr, the valid qualifier and the stop at the
// terminal value are this design's choices. The received word also leaves on
// dpram_wdata towards the DPRAM write port.
//
// Interface: req/rdata is one register access (rdata combinational).
// Timing: one clock from dc_data/dpram_data to pattern_match_n, two to the
// error counter and data_in_error.
module gio_sink_fpga
  import dss_pkg::*;
#(
  parameter int unsigned WIDTH = 20,
  parameter logic [15:0] ERR_TERMINAL = 16'hFFFF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_req_t         req,
  output logic [31:0]      rdata,
  input  logic [WIDTH-1:0] dc_data,
  input  logic             dc_valid,
  input  logic [WIDTH-1:0] dpram_data,
  input  logic [WIDTH-1:0] pseudo_data,
  input  logic             pseudo_en,
  input  logic             err_clr,
  output logic [WIDTH-1:0] dpram_wdata,
  output logic             pattern_match_n,
  output logic [15:0]      error_count,
  output logic             err_ovf_n,
  output logic [WIDTH-1:0] data_in_error,
  output logic [15:0]      type_code
);

  logic [WIDTH-1:0] compare_mask;
  logic [WIDTH-1:0] dc_data_int, dpram_data_int, comp_data, a, b;
  logic             valid_int, error;

  assign type_code = TYPE_GIO_SINK;

  // register A: compare mask
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  compare_mask <= '0;
    else if (req.we && req.sel_a) compare_mask <= req.wdata[WIDTH-1:0];
  end

  assign rdata = req.sel_a ? 32'(compare_mask) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_data_int    <= '0;
      dpram_data_int <= '0;
      valid_int      <= 1'b0;
    end else begin
      dc_data_int    <= dc_data;
      dpram_data_int <= dpram_data;
      valid_int      <= dc_valid;
    end
  end

  assign dpram_wdata     = dc_data_int;
  assign comp_data       = pseudo_en ? pseudo_data : dpram_data_int;
  assign a               = comp_data | compare_mask;
  assign b               = dc_data_int | compare_mask;
  assign pattern_match_n = (a != b);
  assign error           = valid_int && pattern_match_n;

  add_cnt #(.WIDTH(16)) u_err_cnt (
    .clk, .rst_n, .clr_n(!err_clr),
    .en(error && error_count != ERR_TERMINAL), .q(error_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_ovf_n     <= 1'b1;
      data_in_error <= '0;
    end else begin
      err_ovf_n <= error_count < ERR_TERMINAL;
      if (error) data_in_error <= dc_data_int;
    end
  end

endmodule
