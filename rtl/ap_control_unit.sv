// ap_control_unit: control unit of the classification machine.
//
// Accepts one high-level instruction at a time (valid/ready) and expands it
// into the stream of micro-instructions, one per clock, that all chips
// execute. It also reads back what the chips return: the wired-OR bus, the
// first-active token and the bit-serial adder-tree sums, and delivers a
// result word for the instructions that produce one.
//
// Schedules (n = operand width, X = external operand, A, B, C = bit
// addresses of fields in every PE's memory, LSB at the lowest address):
//   ADD_X, WRITE_X  n+2 clocks   one bit per clock, read/compute/write overlap
//   SUB_X           n+3 clocks   as ADD_X with an extra sign bit (n+1 result bits)
//   ADD_B          2n+2 clocks   two clocks per bit: read B, read A, compute
//   SUB_B          2n+3 clocks   the sign bit needs no read slot
//   CMP_X / CMP_B  n+1 / 2n+1    MSB first, decision loaded into the status
//   LOAD_S, STORE_S, SET_S  2 clocks
//   COUNT          n+2L+2 clocks (L = adder tree depth)
//   MAX            4n clocks     MSB-first search with the wired-OR bus
//   READ1          n+2 clocks    one-active mode readout, then clears that PE
// The arithmetic, compare and write instructions read through the link
// rlink and write through wlink, so an operand or result can sit in the
// neighbouring PE's memory row (ADD_X with X=0 and wlink=DOWN shifts a field
// one PE down the chain).
// The add and subtract clock counts reproduce the rates the document gives
// for 1024 PEs at 100 MHz. The instruction set, its encoding and the
// schedules are this design's own: the document says only that the control
// unit splits high-level instructions into micro-instructions.
// The micro-instruction output is a combinational decode of registered
// state. After an instruction, busy drops for at least one clock; res_valid
// pulses then and res_data holds the result until the next instruction.
module ap_control_unit
  import ap_pkg::*;
#(
  parameter int unsigned N_CHIPS     = 1,
  parameter int unsigned TREE_LEVELS = 7,
  parameter int unsigned RES_W       = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               h_valid,
  output logic               h_ready,
  input  hinstr_t            h,
  output logic               res_valid,
  output logic [RES_W-1:0]   res_data,
  output logic               res_flag,     // some PE had its status set
  output logic               busy,
  // chip side
  output uinstr_t            u,
  input  logic               bus_in,
  input  logic               any_status,
  input  logic [N_CHIPS-1:0] sum_bits
);
  localparam int unsigned L = TREE_LEVELS;

  hinstr_t     ins_q;
  logic [9:0]  t_q;
  logic        bus_q, flag_q;
  logic [RES_W-1:0] acc_q;

  logic [9:0]  n, nb, last;
  logic        is_x, is_b, is_sub, is_cmp;

  function automatic logic [9:0] bit_of(input logic [9:0] k, input logic msb_first,
                                        input logic [9:0] width);
    return msb_first ? width - 10'd1 - k : k;
  endfunction

  function automatic logic xbit(input logic [31:0] x, input logic [9:0] b);
    return (b < 10'd32) ? x[b[4:0]] : 1'b0;
  endfunction

  always_comb begin
    n      = 10'(ins_q.n);
    is_sub = ins_q.op inside {HOP_SUB_X, HOP_SUB_B};
    is_cmp = ins_q.op inside {HOP_CMP_X, HOP_CMP_B};
    is_x   = ins_q.op inside {HOP_ADD_X, HOP_SUB_X, HOP_CMP_X, HOP_WRITE_X};
    is_b   = ins_q.op inside {HOP_ADD_B, HOP_SUB_B, HOP_CMP_B};
    nb     = is_sub ? n + 10'd1 : n;
    unique case (1'b1)
      is_x:                     last = is_cmp ? nb : nb + 10'd1;
      is_b:                     last = is_cmp ? 10'd2 * n : 10'd2 * n + (is_sub ? 10'd2 : 10'd1);
      ins_q.op == HOP_COUNT:    last = n + 10'(2 * L) + 10'd1;
      ins_q.op == HOP_MAX:      last = 10'd4 * n - 10'd1;
      ins_q.op == HOP_READ1:    last = n + 10'd1;
      default:                  last = 10'd1;
    endcase
  end

  // Micro-instruction for step t_q of the current instruction.
  always_comb begin
    logic [9:0] j, b;
    u      = UINSTR_NOP;
    u.mode = ins_q.mode;
    j      = '0;
    b      = '0;
    if (busy) begin
      if (is_x || is_b) begin
        // read stage
        if (is_x && t_q < nb) begin
          b         = bit_of(t_q, is_cmp, n);
          u.rd_en   = (b < n) && (ins_q.op != HOP_WRITE_X);
          u.rd_addr = ins_q.a + ADDR_W'(b);
          u.rd_link = ins_q.rlink;
        end
        if (is_b && t_q < 10'd2 * n) begin
          b         = bit_of(t_q >> 1, is_cmp, n);
          u.rd_en   = (b < n);
          u.rd_addr = (t_q[0] ? ins_q.a : ins_q.b) + ADDR_W'(b);
          u.hold_en = t_q[0];
          u.rd_link = ins_q.rlink;
        end
        // compute stage
        if (is_x && t_q >= 10'd1 && t_q <= nb) begin
          j = t_q - 10'd1;
          u.alu_en = 1'b1;
        end
        if (is_b && t_q >= 10'd2 && !t_q[0] && t_q <= 10'd2 * n) begin
          j = (t_q - 10'd2) >> 1;
          u.alu_en = 1'b1;
        end
        // sign bit of SUB_B: both operands are zero, so no read slot is needed
        if (is_b && is_sub && t_q == 10'd2 * n + 10'd1) begin
          j = n;
          u.alu_en = 1'b1;
        end
        if (u.alu_en) begin
          b         = bit_of(j, is_cmp, n);
          u.op2_sel = (is_b && j < n) ? OP2_HOLD : OP2_EXT;
          u.ext_bit = is_b ? 1'b0 : xbit(ins_q.x, b);
          u.inv     = is_sub | (is_cmp & ins_q.inv);
          u.c_init  = (j == 0);
          u.c_val   = is_sub;
          u.cmp_clr = (j == 0);
          u.out_sel = is_cmp ? OUT_DEC : OUT_ARITH;
          u.st_load = is_cmp && (j == nb - 10'd1);
        end
        // write stage
        if (!is_cmp && is_x && t_q >= 10'd2 && t_q <= nb + 10'd1) begin
          u.wr_en   = 1'b1;
          u.wr_addr = ins_q.c + ADDR_W'(t_q - 10'd2);
          u.wr_link = ins_q.wlink;
        end
        if (!is_cmp && is_b && t_q >= 10'd3 &&
            ((t_q[0] && t_q <= 10'd2 * n + 10'd1) || (is_sub && t_q == 10'd2 * n + 10'd2))) begin
          u.wr_en   = 1'b1;
          u.wr_addr = ins_q.c + ((is_sub && t_q == 10'd2 * n + 10'd2) ? ADDR_W'(n)
                                                                     : ADDR_W'((t_q - 10'd3) >> 1));
          u.wr_link = ins_q.wlink;
        end
      end else begin
        unique case (ins_q.op)
          HOP_LOAD_S: begin
            u.rd_en   = (t_q == 0);
            u.rd_addr = ins_q.a;
            u.alu_en  = (t_q == 1);
            u.c_init  = 1'b1;
            u.st_load = 1'b1;
          end
          HOP_STORE_S: begin
            u.alu_en  = (t_q == 0);
            u.out_sel = OUT_STATUS;
            u.wr_en   = (t_q == 1);
            u.wr_addr = ins_q.c;
          end
          HOP_SET_S: begin
            u.alu_en  = (t_q == 1);
            u.ext_bit = ins_q.x[0];
            u.c_init  = 1'b1;
            u.st_load = 1'b1;
          end
          HOP_COUNT: begin
            u.rd_en     = (t_q < n);
            u.rd_addr   = ins_q.a + ADDR_W'(t_q);
            u.alu_en    = (t_q >= 10'd1) && (t_q <= n + 10'(L));
            u.c_init    = 1'b1;
            u.sum_start = (t_q == 10'd2);
          end
          HOP_MAX: begin
            b         = n - 10'd1 - (t_q >> 2);
            u.rd_en   = (t_q[1:0] == 2'd0) || (t_q[1:0] == 2'd2);
            u.rd_addr = ins_q.a + ADDR_W'(b);
            u.alu_en  = t_q[0];
            u.c_init  = 1'b1;
            u.st_load = (t_q[1:0] == 2'd3) && bus_q;
          end
          HOP_READ1: begin
            u.mode    = MODE_ONE;
            u.rd_en   = (t_q < n);
            u.rd_addr = ins_q.a + ADDR_W'(t_q);
            u.alu_en  = (t_q >= 10'd1) && (t_q <= n + 10'd1);
            u.c_init  = 1'b1;
            u.st_load = (t_q == n + 10'd1);
          end
          default: ;
        endcase
      end
    end
  end

  assign h_ready = !busy;

  // Number of chips whose adder tree delivers a 1 in this clock.
  logic [RES_W-1:0] pc;
  always_comb begin
    pc = '0;
    for (int unsigned c = 0; c < N_CHIPS; c++)
      pc = pc + RES_W'(sum_bits[c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      ins_q     <= '0;
      t_q       <= '0;
      bus_q     <= 1'b0;
      flag_q    <= 1'b0;
      acc_q     <= '0;
      res_valid <= 1'b0;
      res_flag  <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (!busy) begin
        if (h_valid) begin
          busy   <= 1'b1;
          ins_q  <= h;
          t_q    <= '0;
          acc_q  <= '0;
          flag_q <= 1'b0;
        end
      end else begin
        if (t_q == 0) flag_q <= any_status;
        unique case (ins_q.op)
          HOP_COUNT: begin
            if (t_q >= 10'(2 + L) && t_q <= last) begin
              acc_q <= acc_q + (pc << (t_q - 10'(2 + L)));
            end
          end
          HOP_MAX: begin
            if (t_q[1:0] == 2'd2) bus_q <= bus_in;
            if (t_q[1:0] == 2'd3) acc_q[6'(n - 10'd1 - (t_q >> 2))] <= bus_q;
          end
          HOP_READ1: begin
            if (t_q >= 10'd2 && t_q <= n + 10'd1) acc_q[6'(t_q - 10'd2)] <= bus_in;
          end
          default: ;
        endcase
        if (t_q == last) begin
          busy      <= 1'b0;
          res_valid <= ins_q.op inside {HOP_COUNT, HOP_MAX, HOP_READ1};
        end else begin
          t_q <= t_q + 10'd1;
        end
      end
      if (busy && t_q == last) begin
        res_flag <= (t_q == 0) ? any_status : flag_q;
      end
    end
  end

  // The accumulator is stable from the end of an instruction until the next
  // one is accepted.
  assign res_data = acc_q;
endmodule
