// busy_decode: recovers the front-panel BUSY level from the start net.
//
// The start net carries BUSY as pulse-width codes: low for one clock (25 ns)
// means BUSY, low for two clocks (50 ns) means NOT BUSY. The decoder counts
// the clocks the net stays low (saturating at 3) and, when it returns high,
// sets busy for a count of 1, clears it for a count of 2 and leaves it alone
// for longer lows, which are the net's original start pulses. busy holds its
// level between codes and is low after reset.
//
// The block has three start inputs, start_1..start_3, as the board delivers
// three copies of the net; how they are combined is not published, and this
// design takes a two-of-three majority of the low level so that a single
// faulty copy cannot fake a code.
//
// Interface: start_1..3 are active-low and synchronous to clk. Timing: busy
// changes on the clock edge after the net returns high, i.e. 2 clocks after
// the start of a BUSY code and 3 after the start of a NOT BUSY code.
module busy_decode (
  input  logic clk,
  input  logic rst_n,
  input  logic start_1,
  input  logic start_2,
  input  logic start_3,
  output logic busy
);

  logic       low;            // majority of the three copies is low
  logic [1:0] low_cnt;        // clocks low so far, saturating

  assign low = (!start_1 && !start_2) || (!start_1 && !start_3) || (!start_2 && !start_3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_cnt <= '0;
      busy    <= 1'b0;
    end else if (low) begin
      if (low_cnt != 2'd3) low_cnt <= low_cnt + 2'd1;
    end else begin
      low_cnt <= '0;
      if (low_cnt == 2'd1) busy <= 1'b1;
      if (low_cnt == 2'd2) busy <= 1'b0;
    end
  end

endmodule
