// orbit_counter: orbit countdown and address-reset request of the GIO source.
//
// The source plays its DPRAM from address 0 upward, one word per clock. Two
// programmable limits cut the playback short: reaching short_mem ends one
// orbit's data set and reaching long_mem ends a multi-orbit data set. This
// block holds orbit_countdown and decides, at each limit, whether the address
// counter is sent back to 0:
//   - Address Counter Reset (rs_count_n low): orbit_countdown <= orbit.
//   - address == long_mem (neq_long_mem low): request an address reset and
//     reload orbit_countdown from orbit.
//   - address == short_mem (neq_short_mem low) and orbit_countdown != 0:
//     request an address reset and, if busy is high, decrement
//     orbit_countdown.
// These rules are the published ones. Giving long_mem priority when both
// limits match at once, and clearing orbit_countdown at power-up (the orbit
// register itself powers up to 0), are this design's choices.
//
// Interface: n_reset is an active-low request, registered, one clock long per
// match; the caller combines it with the Address Counter Reset into the
// synchronous DPRAM counter reset. Timing: n_reset falls one clock after the
// comparator output does.
module orbit_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rs_count_n,
  input  logic [W-1:0] orbit,
  input  logic         busy,
  input  logic         neq_long_mem,
  input  logic         neq_short_mem,
  output logic [W-1:0] orbit_countdown,
  output logic         n_reset
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orbit_countdown <= '0;
      n_reset         <= 1'b1;
    end else if (!rs_count_n) begin
      orbit_countdown <= orbit;
      n_reset         <= 1'b1;
    end else if (!neq_long_mem) begin
      orbit_countdown <= orbit;
      n_reset         <= 1'b0;
    end else if (!neq_short_mem && orbit_countdown != '0) begin
      if (busy) orbit_countdown <= orbit_countdown - 1'b1;
      n_reset <= 1'b0;
    end else begin
      n_reset <= 1'b1;
    end
  end

endmodule
