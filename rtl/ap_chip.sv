// ap_chip: one associative processor chip.
//
// N_PE processing elements, each with its own MEM_BITS-bit memory bank, work
// in lockstep on one micro-instruction per clock (bit-serial, word-parallel:
// every PE processes the same bit-column of its own word). The chip holds
// the dual-bus memory array with its read and write decoders, the
// programmable ALU-memory links, the PEs, and the two collective functions:
// selection of the first active PE and the pipelined adder tree over all PE
// outputs. PE outputs also drive a wired-OR bus to the outside.
//
// Chaining: tok_*, bus_*, the *_rd and *_w* ports connect a chip to its
// neighbours so that several chips form one longer PE array.
//
// Timing: micro-instruction fields act on three overlapping stages (see
// ap_pkg and ap_pe). pe_out and bus_out show the output latches, i.e. the
// result of the previous compute cycle. The adder tree takes the output
// latches; sum_bit follows them by log2(N_PE) clocks.
// Structure and sizes (128 PEs x 256 bits) follow the document; chaining
// ports and the micro-instruction format are this design's own.
module ap_chip
  import ap_pkg::*;
#(
  parameter int unsigned N_PE     = 128,
  parameter int unsigned MEM_BITS = 256,
  parameter int unsigned GROUP    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  uinstr_t         u,
  // wired-OR output bus
  input  logic            bus_in,
  output logic            bus_out,
  // first-active token chain
  input  logic            tok_in,
  output logic            tok_out,
  // adder tree
  output logic            sum_bit,
  output logic            sum_start,
  // memory links to the previous chip (row/PE 0 side)
  input  logic            prev_rd_in,
  input  logic            prev_wd_in,
  input  logic            prev_wen_in,
  output logic            prev_rd_out,
  output logic            prev_wd_out,
  output logic            prev_wen_out,
  // memory links to the next chip (last row/PE side)
  input  logic            next_rd_in,
  input  logic            next_wd_in,
  input  logic            next_wen_in,
  output logic            next_rd_out,
  output logic            next_wd_out,
  output logic            next_wen_out,
  // observation
  output logic [N_PE-1:0] pe_out,
  output logic [N_PE-1:0] status,
  output logic [N_PE-1:0] pe_active
);
  logic [N_PE-1:0] row_rd, pe_rd, pe_wen, row_wd, row_wen, first_sel;

  ap_memory_array #(.ROWS(N_PE), .BITS(MEM_BITS)) u_mem (
    .clk, .rd_addr(u.rd_addr), .rd_bit(row_rd), .wr_addr(u.wr_addr),
    .wr_en(u.wr_en), .row_wen, .row_wd
  );

  ap_ram_links #(.ROWS(N_PE)) u_links (
    .rd_link(u.rd_link), .row_rd, .prev_rd_in, .next_rd_in, .pe_rd,
    .wr_link(u.wr_link), .pe_wd(pe_out), .pe_wen, .prev_wd_in, .prev_wen_in,
    .next_wd_in, .next_wen_in, .row_wd, .row_wen
  );

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    ap_pe u_pe (
      .clk, .rst_n, .u, .mem_bit(pe_rd[i]), .first_sel(first_sel[i]),
      .out_q(pe_out[i]), .wr_en_o(pe_wen[i]), .status_q(status[i]),
      .active(pe_active[i])
    );
  end

  ap_first_active #(.N(N_PE), .GROUP(GROUP)) u_first (
    .status, .tok_in, .sel(first_sel), .tok_out
  );

  ap_wired_or #(.N(N_PE)) u_bus (
    .pe_out, .bus_in, .bus_out
  );

  ap_adder_tree #(.N(N_PE)) u_tree (
    .clk, .rst_n, .in_bits(pe_out), .start(u.sum_start), .sum_bit, .sum_start
  );

  always_comb begin
    prev_rd_out  = row_rd[0];
    next_rd_out  = row_rd[N_PE-1];
    prev_wd_out  = pe_out[0];
    prev_wen_out = pe_wen[0];
    next_wd_out  = pe_out[N_PE-1];
    next_wen_out = pe_wen[N_PE-1];
  end
endmodule
