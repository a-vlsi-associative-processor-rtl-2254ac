// ap_pe_operand: input buffer and operand generation of one PE
// (macro-cells 1 and 2 of the elementary processing unit).
//
// The input buffer latches the bit read from memory, so the ALU works in
// cycle t on the bit read in cycle t-1. The hold register keeps a memory
// bit for one more cycle so that it can replace the external data bit when
// both operands come from memory (two clocks per bit). The memory operand
// can be inverted for subtraction. All of this follows the document; the
// read-enable gating (input buffer loads 0 when no read is issued) is this
// design's own choice, used to zero-extend operands.
//
// Interface: mem_bit/rd_en in the read stage; hold_en, op2_sel, inv, ext_bit
// act in the compute stage. Outputs: a_raw (buffered memory bit), a_op (a_raw
// after optional inversion) and p_op (second operand: external bit or held bit).
module ap_pe_operand
  import ap_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic mem_bit,
  input  logic rd_en,
  input  logic hold_en,
  input  op2_e op2_sel,
  input  logic inv,
  input  logic ext_bit,
  output logic a_raw,
  output logic a_op,
  output logic p_op
);
  logic in_buf_q, hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_buf_q <= 1'b0;
      hold_q   <= 1'b0;
    end else begin
      in_buf_q <= rd_en & mem_bit;
      if (hold_en) hold_q <= in_buf_q;
    end
  end

  always_comb begin
    a_raw = in_buf_q;
    a_op  = in_buf_q ^ inv;
    p_op  = (op2_sel == OP2_HOLD) ? hold_q : ext_bit;
  end
endmodule
