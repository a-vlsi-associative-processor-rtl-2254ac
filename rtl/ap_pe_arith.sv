// ap_pe_arith: arithmetic macro-cell of one PE (block 3).
//
// A full adder and a carry latch process one bit per enabled cycle, LSB
// first, for bit-serial addition and subtraction. The carry entering the
// first bit comes from c_init/c_val (0 for add, 1 for subtract, where the
// memory operand is inverted upstream). The carry latch only updates when
// en is high, so two-clock memory/memory operations keep it between bits.
// The full adder and latch follow the document; the explicit carry
// initialisation is this design's choice.
module ap_pe_arith (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic p,
  input  logic a,
  input  logic c_init,
  input  logic c_val,
  output logic sum
);
  logic carry_q, cin;

  always_comb begin
    cin = c_init ? c_val : carry_q;
    sum = p ^ a ^ cin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= (p & a) | (p & cin) | (a & cin);
  end
endmodule
