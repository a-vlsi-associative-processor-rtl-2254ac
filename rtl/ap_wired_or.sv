// ap_wired_or: communication cell, the global 1-bit output bus.
//
// The bus is high when at least one PE output is high and low only when all
// are low (a wired-OR on the chip, written here as an OR reduction). A chip
// also ORs in the bus of the chip after it, so the first chip of a chain
// presents the OR over all PEs of the machine. Searches for an extremum use
// it. The function is the document's; the chip chaining is this design's
// choice. Combinational.
module ap_wired_or #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0] pe_out,
  input  logic         bus_in,
  output logic         bus_out
);
  assign bus_out = bus_in | (|pe_out);
endmodule
