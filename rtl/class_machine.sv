// class_machine: the classification machine, a control unit driving a chain
// of associative processor chips.
//
// The control unit turns each high-level host instruction into one
// micro-instruction per clock, broadcast to all N_CHIPS chips. The chips are
// chained: the first-active token runs from chip 0 to the last chip, the
// wired-OR bus is ORed from the last chip back to chip 0, whose bus output
// the control unit reads, and the memory links join the last row of one chip
// to the first row of the next. Each chip returns its own bit-serial
// adder-tree sum; the control unit adds them. The ends of the chain read and
// write nothing (their neighbour inputs are tied low).
//
// Interface: h_valid/h_ready/h host instruction port; res_valid pulses when
// an instruction with a result ends, with res_data/res_flag valid from then
// until the next instruction; busy is high while an instruction runs.
// pe_status shows the status register of every PE, chip 0 first.
// The split into control unit and chips follows the document; the default
// of one 128-PE chip is its prototype.
module class_machine
  import ap_pkg::*;
#(
  parameter int unsigned N_CHIPS  = 1,
  parameter int unsigned N_PE     = 128,
  parameter int unsigned MEM_BITS = 256,
  parameter int unsigned RES_W    = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    h_valid,
  output logic                    h_ready,
  input  hinstr_t                 h,
  output logic                    res_valid,
  output logic [RES_W-1:0]        res_data,
  output logic                    res_flag,
  output logic                    busy,
  output logic [N_CHIPS*N_PE-1:0] pe_status
);
  uinstr_t u;
  logic [N_CHIPS-1:0] bus_out, tok_out, sum_bit, sum_start;
  logic [N_CHIPS-1:0] prev_rd_out, prev_wd_out, prev_wen_out;
  logic [N_CHIPS-1:0] next_rd_out, next_wd_out, next_wen_out;
  logic [N_PE-1:0]    chip_status [N_CHIPS];
  logic [N_PE-1:0]    chip_out    [N_CHIPS];
  logic [N_PE-1:0]    chip_active [N_CHIPS];

  ap_control_unit #(
    .N_CHIPS(N_CHIPS), .TREE_LEVELS($clog2(N_PE)), .RES_W(RES_W)
  ) u_ctrl (
    .clk, .rst_n, .h_valid, .h_ready, .h, .res_valid, .res_data, .res_flag,
    .busy, .u, .bus_in(bus_out[0]), .any_status(tok_out[N_CHIPS-1]),
    .sum_bits(sum_bit)
  );

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    logic bus_in, tok_in, prev_rd_in, prev_wd_in, prev_wen_in;
    logic next_rd_in, next_wd_in, next_wen_in;
    if (c == 0) begin : g_first
      assign tok_in      = 1'b0;
      assign prev_rd_in  = 1'b0;
      assign prev_wd_in  = 1'b0;
      assign prev_wen_in = 1'b0;
    end else begin : g_mid
      assign tok_in      = tok_out[c-1];
      assign prev_rd_in  = next_rd_out[c-1];
      assign prev_wd_in  = next_wd_out[c-1];
      assign prev_wen_in = next_wen_out[c-1];
    end
    if (c == N_CHIPS - 1) begin : g_last
      assign bus_in      = 1'b0;
      assign next_rd_in  = 1'b0;
      assign next_wd_in  = 1'b0;
      assign next_wen_in = 1'b0;
    end else begin : g_notlast
      assign bus_in      = bus_out[c+1];
      assign next_rd_in  = prev_rd_out[c+1];
      assign next_wd_in  = prev_wd_out[c+1];
      assign next_wen_in = prev_wen_out[c+1];
    end

    ap_chip #(.N_PE(N_PE), .MEM_BITS(MEM_BITS)) u_chip (
      .clk, .rst_n, .u,
      .bus_in, .bus_out(bus_out[c]),
      .tok_in, .tok_out(tok_out[c]),
      .sum_bit(sum_bit[c]), .sum_start(sum_start[c]),
      .prev_rd_in, .prev_wd_in, .prev_wen_in,
      .prev_rd_out(prev_rd_out[c]), .prev_wd_out(prev_wd_out[c]),
      .prev_wen_out(prev_wen_out[c]),
      .next_rd_in, .next_wd_in, .next_wen_in,
      .next_rd_out(next_rd_out[c]), .next_wd_out(next_wd_out[c]),
      .next_wen_out(next_wen_out[c]),
      .pe_out(chip_out[c]), .status(chip_status[c]), .pe_active(chip_active[c])
    );

    assign pe_status[c*N_PE +: N_PE] = chip_status[c];
  end
endmodule
