// ap_pe_outsel: output selection macro-cell of one PE (block 5).
//
// A 4-to-1 multiplexer picks the adder sum, the comparator's "finished" or
// "decision" bit, or the status register, and latches it in the output
// latch on compute cycles. An inactive PE latches 0, as the document
// requires. The latch also records whether the PE was active (valid_q),
// which gates the memory write in the next cycle so inactive PEs leave their
// memory untouched (this design's choice; the document only says
// instructions are conditionally processed). sel_o is the multiplexer
// output before gating, used to load the status register directly.
module ap_pe_outsel
  import ap_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    active,
  input  outsel_e out_sel,
  input  logic    sum,
  input  logic    done,
  input  logic    dec,
  input  logic    status,
  output logic    sel_o,
  output logic    out_q,
  output logic    valid_q
);
  always_comb begin
    unique case (out_sel)
      OUT_ARITH:  sel_o = sum;
      OUT_DONE:   sel_o = done;
      OUT_DEC:    sel_o = dec;
      OUT_STATUS: sel_o = status;
      default:    sel_o = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q   <= 1'b0;
      valid_q <= 1'b0;
    end else if (en) begin
      out_q   <= active & sel_o;
      valid_q <= active;
    end
  end
endmodule
