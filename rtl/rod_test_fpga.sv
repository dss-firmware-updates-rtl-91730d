// rod_test_fpga: data FPGA of the "ROD Test" firmware (type 0216).
//
// Uses the DPRAM as a test source for other ROD firmware: on each trigger the
// memory is read out under a DAV whose length comes from the 8-bit DAV length
// register (register A, same offsets as the GIO source's orbit register). The
// register powers up to 84, the length of one slice of data, as published;
// bits 31:8 read back as 0.
//
// Interface: req/rdata is one register access (rdata combinational); trigger
// and n_slices start an event; dav_n and dpram_cnten go to the daughter card
// and the DPRAM. Timing: as dav_gen, one clock from trigger to DAV.
module rod_test_fpga
  import dss_pkg::*;
#(
  parameter int unsigned SLICE_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_req_t           req,
  output logic [31:0]        rdata,
  input  logic               trigger,
  input  logic [SLICE_W-1:0] n_slices,
  output logic               dav_n,
  output logic               dpram_cnten,
  output logic [15:0]        type_code
);

  logic [7:0] dav_len;

  assign type_code = TYPE_ROD_TEST;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   dav_len <= DAV_LEN_RESET;
    else if (req.we && req.sel_a) dav_len <= req.wdata[7:0];
  end

  assign rdata = req.sel_a ? {24'h0, dav_len} : '0;

  dav_gen #(.LEN_W(8), .SLICE_W(SLICE_W)) u_dav_gen (
    .clk, .rst_n, .dav_len, .n_slices, .trigger, .dav_n, .rd_en(dpram_cnten)
  );

endmodule
