// busy_encode: carries the front-panel BUSY level to the data FPGAs on the
// existing "start" net.
//
// BUSY enters the board at a CPLD that has no spare pin left towards the data
// FPGAs, so its level is encoded as the length of a low pulse on the start
// net: one clock low (25 ns at 40 MHz) means BUSY, two clocks low (50 ns)
// means NOT BUSY. Those two codes are the published scheme. Sending a code
// only when the synchronised level differs from the last code sent, and
// following each code with at least one high clock, are this design's own
// choices. After reset the last code is taken to be NOT BUSY, so a BUSY level
// present at reset is sent at once.
//
// The start net keeps its original use: start_in_n is the original active-low
// start and is ANDed with the code pulses. Original start pulses must stay low
// for three clocks or more so the decoder can tell them from a code.
//
// Interface: busy_in may be asynchronous (two-flop synchroniser); start_n is
// the encoded net. Timing: a change of busy_in appears as a code 3 clocks
// later (2 synchroniser stages, 1 state register) if no code is in flight.
module busy_encode (
  input  logic clk,
  input  logic rst_n,
  input  logic busy_in,
  input  logic start_in_n,
  output logic start_n
);

  typedef enum logic [1:0] {IDLE, LOW1, LOW2, GAP} state_t;

  state_t     state;
  logic [1:0] sync;
  logic       sent;           // level carried by the last code sent

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      sent  <= 1'b0;
      state <= IDLE;
    end else begin
      sync <= {sync[0], busy_in};
      unique case (state)
        IDLE: if (sync[1] != sent) begin
                sent  <= sync[1];
                state <= LOW1;
              end
        LOW1: state <= sent ? GAP : LOW2;
        LOW2: state <= GAP;
        GAP:  state <= IDLE;
      endcase
    end
  end

  assign start_n = start_in_n && !(state == LOW1 || state == LOW2);

endmodule
