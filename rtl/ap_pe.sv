// ap_pe: one elementary processing unit (ALU and status register).
//
// Chains the macro-cells of the document's PE: input buffer and operand
// generation (1, 2), full adder with carry latch (3), MSB-first comparator
// (4), output selection with output latch (5) and activity status (7). The
// communication cell (6) is the chip-level wired-OR of out_q.
//
// Timing, driven by one micro-instruction u per clock:
//   cycle t   read stage:    mem_bit (row selected by u.rd_addr) -> input buffer
//   cycle t+1 compute stage: operands -> adder / comparator -> output latch
//   cycle t+2 write stage:   out_q written to memory when wr_en_o is high
// The three stages of different bits overlap, as in the document. wr_en_o is
// u.wr_en gated by the activity the PE had when out_q was computed.
module ap_pe
  import ap_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  uinstr_t u,
  input  logic    mem_bit,
  input  logic    first_sel,
  output logic    out_q,
  output logic    wr_en_o,
  output logic    status_q,
  output logic    active
);
  logic a_raw, a_op, p_op, sum, done, dec, sel, valid_q;

  ap_pe_operand u_operand (
    .clk, .rst_n, .mem_bit, .rd_en(u.rd_en), .hold_en(u.hold_en),
    .op2_sel(u.op2_sel), .inv(u.inv), .ext_bit(u.ext_bit),
    .a_raw, .a_op, .p_op
  );

  ap_pe_arith u_arith (
    .clk, .rst_n, .en(u.alu_en), .p(p_op), .a(a_op),
    .c_init(u.c_init), .c_val(u.c_val), .sum
  );

  ap_pe_logic u_logic (
    .clk, .rst_n, .en(u.alu_en), .cmp_clr(u.cmp_clr), .p(p_op), .a(a_raw),
    .inv(u.inv), .done_o(done), .dec_o(dec)
  );

  ap_pe_status u_status (
    .clk, .rst_n, .mode(u.mode), .first_sel, .load(u.st_load & u.alu_en),
    .d(sel), .status_q, .active
  );

  ap_pe_outsel u_outsel (
    .clk, .rst_n, .en(u.alu_en), .active, .out_sel(u.out_sel), .sum, .done,
    .dec, .status(status_q), .sel_o(sel), .out_q, .valid_q
  );

  assign wr_en_o = u.wr_en & valid_q;
endmodule
