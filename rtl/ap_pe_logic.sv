// ap_pe_logic: comparison macro-cell of one PE (block 4).
//
// Compares two operands presented MSB first, one bit per enabled cycle.
// A 2-bit state holds whether the comparison is finished (the first
// differing bit has been seen) and its decision. The decision is the bit of
// operand p at the first difference (p > a) or, with inv set, its inverse
// (a > p). done_o/dec_o already include the current bit, so the output
// latch captures the final result on the LSB cycle. cmp_clr restarts the
// comparison at the current bit. MSB-first order and the 2-bit result are
// from the document; the encoding and the inv rule are this design's choice.
module ap_pe_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic cmp_clr,
  input  logic p,
  input  logic a,
  input  logic inv,
  output logic done_o,
  output logic dec_o
);
  logic done_q, dec_q, done_in, dec_in;

  always_comb begin
    done_in = cmp_clr ? 1'b0 : done_q;
    dec_in  = cmp_clr ? 1'b0 : dec_q;
    if (!done_in && (p != a)) begin
      done_o = 1'b1;
      dec_o  = p ^ inv;
    end else begin
      done_o = done_in;
      dec_o  = dec_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q <= 1'b0;
      dec_q  <= 1'b0;
    end else if (en) begin
      done_q <= done_o;
      dec_q  <= dec_o;
    end
  end
endmodule
