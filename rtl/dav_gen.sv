// dav_gen: data-available (DAV) generator of the ROD Test firmware.
//
// The DSS feeds test data from its DPRAM to a ROD; DAV marks the words that
// belong to an event. Its low time is programmable: one slice (or ROI) holds
// DAV low for dav_len words, and multiple-slice operation holds it low for
// dav_len words per slice, back to back with no gap, as published. On a
// trigger pulse while idle, dav_n falls on the next clock edge and stays low
// for n_slices * dav_len clocks; rd_en (the DPRAM read/count enable) is high
// over the same clocks. A trigger during an event is ignored, and dav_len or
// n_slices of 0 gives no event. The trigger, the slice-count input and the
// unit (one word per 25 ns clock) are this design's choices.
//
// Interface: dav_len is sampled at the trigger. Timing: dav_n low from the
// edge after trigger for exactly n_slices*dav_len clocks.
module dav_gen #(
  parameter int unsigned LEN_W   = 8,
  parameter int unsigned SLICE_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LEN_W-1:0]   dav_len,
  input  logic [SLICE_W-1:0] n_slices,
  input  logic               trigger,
  output logic               dav_n,
  output logic               rd_en
);

  logic [LEN_W-1:0]   len, word_cnt;
  logic [SLICE_W-1:0] slice_cnt;
  logic               active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      len       <= '0;
      word_cnt  <= '0;
      slice_cnt <= '0;
    end else if (!active) begin
      if (trigger && dav_len != '0 && n_slices != '0) begin
        active    <= 1'b1;
        len       <= dav_len;
        word_cnt  <= dav_len - 1'b1;
        slice_cnt <= n_slices - 1'b1;
      end
    end else if (word_cnt != '0) begin
      word_cnt <= word_cnt - 1'b1;
    end else if (slice_cnt != '0) begin
      word_cnt  <= len - 1'b1;
      slice_cnt <= slice_cnt - 1'b1;
    end else begin
      active <= 1'b0;
    end
  end

  assign dav_n = !active;
  assign rd_en = active;

endmodule
