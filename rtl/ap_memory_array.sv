// ap_memory_array: the static RAM of the associative processor.
//
// ROWS banks (one per PE) of BITS one-bit cells. The memory has separate
// read and write buses, each with its own address broadcast to all rows, so
// one bit-column can be read while another is written in the same cycle.
// The read and write address decoders are the address ports of the banks.
// Read: combinational, every row presents the bit addressed by rd_addr
// (read-before-write when both addresses match). Write: on the clock edge,
// when wr_en is set, every row whose row_wen is set stores row_wd at
// wr_addr. The two-bus organisation and the sizes follow the document; the
// custom 8-transistor cell is modelled as a register array, one small RAM
// per row. Contents are not reset.
module ap_memory_array
  import ap_pkg::*;
#(
  parameter int unsigned ROWS = 128,
  parameter int unsigned BITS = 256
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [ROWS-1:0]   rd_bit,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_en,
  input  logic [ROWS-1:0]   row_wen,
  input  logic [ROWS-1:0]   row_wd
);
  localparam int unsigned AW = (BITS > 1) ? $clog2(BITS) : 1;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic bank [BITS];

    always_ff @(posedge clk)
      if (wr_en && row_wen[r]) bank[wr_addr[AW-1:0]] <= row_wd[r];

    assign rd_bit[r] = bank[rd_addr[AW-1:0]];
  end
endmodule
