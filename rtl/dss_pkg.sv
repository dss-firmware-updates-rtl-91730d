// dss_pkg: constants and types shared by the DSS data-FPGA firmware.
//
// The DSS carries eight data FPGAs, four per daughter-card slot (FPGA 1-4 on
// card 1, FPGA 5-8 on card 2). Each data FPGA owns two extra VME registers:
// register A at byte offset 0x108 + 4*i and register B at 0x130 + 4*i, where
// i = 0..7 is the FPGA index. Those offsets, the type codes of the three
// firmware variants and the DAV length power-up value are the published
// numbers; the register request struct is this design's own local bus between
// the VME register decoder and the data FPGAs.
package dss_pkg;

  localparam int unsigned N_FPGA         = 8;   // data FPGAs on one DSS
  localparam int unsigned FPGAS_PER_CARD = 4;   // data FPGAs per daughter-card slot

  localparam int unsigned VME_AW = 12;          // byte offset bits decoded
  localparam logic [VME_AW-1:0] REG_A_BASE = 12'h108;
  localparam logic [VME_AW-1:0] REG_B_BASE = 12'h130;
  localparam logic [VME_AW-1:0] REG_STRIDE = 12'h004;

  // version/type codes of the firmware variants
  localparam logic [15:0] TYPE_ROD_TEST   = 16'h0216;
  localparam logic [15:0] TYPE_GIO_SOURCE = 16'h0612;
  localparam logic [15:0] TYPE_GIO_SINK   = 16'h0A13;

  localparam logic [7:0] DAV_LEN_RESET = 8'd84; // one slice of data

  // One register access as seen by a data FPGA. sel_a / sel_b are one-hot
  // (at most one set); we qualifies a write, otherwise the access is a read
  // and the FPGA returns the selected register on its read-data port.
  typedef struct packed {
    logic        sel_a;
    logic        sel_b;
    logic        we;
    logic [31:0] wdata;
  } reg_req_t;

endpackage
