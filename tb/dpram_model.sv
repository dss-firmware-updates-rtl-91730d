// dpram_model: behavioural model of one side of a dual-port memory chip with
// an internal address counter, for testbenches only (not synthesizable
// intent). The counter steps by one on every clock edge while cnten is high
// and wraps at 2**AW; ncntrst low clears it to 0 on the next edge
// (synchronous counter reset). rdata is the word at the current counter
// value. The memory is initialised with word n = n so the data read back
// identifies its address.

module dpram_model #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 20
) (
  input  logic          clk,
  input  logic          ncntrst,
  input  logic          cnten,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    addr = '0;
    for (int i = 0; i < 2**AW; i++) mem[i] = DW'(i);
  end

  always @(posedge clk) begin
    if (!ncntrst)   addr <= '0;
    else if (cnten) addr <= addr + 1'b1;
  end

  assign rdata = mem[addr];
endmodule
