// add_cnt: binary up counter with synchronous clear and count enable.
//
// Counts up by one on each clock edge with en high and wraps at 2**WIDTH.
// clr_n low clears it to zero on the next edge and overrides en; rst_n is the
// asynchronous power-up reset to zero. In the GIO source it is the FPGA's copy
// of the DPRAM's own address counter, cleared by the same synchronous counter
// reset as the memory so that both stay in step; in the GIO sink it counts
// comparison errors. The published design names the counter only; its
// insides are this design's.
//
// Interface: q is the registered count. Timing: one clock from en/clr_n to q.
module add_cnt #(
  parameter int unsigned WIDTH = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_n,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (!clr_n) q <= '0;
    else if (en)     q <= q + 1'b1;
  end

endmodule
