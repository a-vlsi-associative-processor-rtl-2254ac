// ap_pe_status: activity status macro-cell of one PE (block 7).
//
// Holds the 1-bit status register S and derives the PE's activity from the
// operating mode: normal (active = S), forced (always active) and one-active
// (active only if this PE holds the token of the first-active selection,
// first_sel). S can be loaded from the output selection multiplexer on a
// compute cycle, but only while the PE is active, so inactive PEs keep their
// status. Modes follow the document; the load gating and reset value 0 are
// this design's choice.
module ap_pe_status
  import ap_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  first_sel,
  input  logic  load,
  input  logic  d,
  output logic  status_q,
  output logic  active
);
  always_comb begin
    unique case (mode)
      MODE_NORMAL: active = status_q;
      MODE_FORCED: active = 1'b1;
      MODE_ONE:    active = first_sel;
      default:     active = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               status_q <= 1'b0;
    else if (load && active)  status_q <= d;
  end
endmodule
