// clk_div2: divide-by-two of the 40 MHz board clock for the CP chip.
//
// A single toggle flip-flop: clk_out changes level on every rising edge of
// clk, giving a 20 MHz clock with a 50 % duty cycle. The division ratio and
// the 40 MHz input are published; the asynchronous reset to 0 is this
// design's choice, so that the phase of clk_out relative to clk is known.
//
// Interface: clk_out is a registered output and should be routed on a clock
// net by the user. Timing: clk_out rises on the first clk edge after reset
// is released and on every second edge after that.
module clk_div2 (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= !clk_out;
  end

endmodule
