// comparator_en: equality comparator with enable and active-low result.
//
// neq goes low while en is high and a equals b; it is high otherwise. In the
// GIO source it compares the DPRAM address with short_mem or long_mem, and en
// is high only while that limit is non-zero, so a limit of 0x0000 switches
// its wraparound off. The active-low output and the enable input are as
// published; the enable-from-zero-test lives with the caller.
//
// Interface: a, b WIDTH bits wide. Timing: combinational.
module comparator_en #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             en,
  output logic             neq
);

  assign neq = !(en && (a == b));

endmodule
