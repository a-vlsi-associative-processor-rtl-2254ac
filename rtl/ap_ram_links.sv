// ap_ram_links: programmable links between the ALUs and the memory rows.
//
// Each PE can read from, and write to, the memory row above it, in front of
// it or below it, selected for the whole array by rd_link and wr_link. This
// lets a PE use its neighbours' banks (three times the memory) and lets data
// move along the PE chain for systolic computations. At the ends of the
// array the neighbour comes from the adjacent chip through the prev_*/next_*
// ports, so a chain of chips behaves as one long array. "Up" means towards
// row 0. The three-way link is the document's; the port names and the
// chip-to-chip wiring are this design's choice. Combinational.
module ap_ram_links
  import ap_pkg::*;
#(
  parameter int unsigned ROWS = 128
) (
  // read side
  input  link_e           rd_link,
  input  logic [ROWS-1:0] row_rd,       // bit read from each memory row
  input  logic            prev_rd_in,   // last row of the previous chip
  input  logic            next_rd_in,   // first row of the next chip
  output logic [ROWS-1:0] pe_rd,        // bit delivered to each PE
  // write side
  input  link_e           wr_link,
  input  logic [ROWS-1:0] pe_wd,        // data from each PE
  input  logic [ROWS-1:0] pe_wen,       // write request of each PE
  input  logic            prev_wd_in,   // last PE of the previous chip
  input  logic            prev_wen_in,
  input  logic            next_wd_in,   // first PE of the next chip
  input  logic            next_wen_in,
  output logic [ROWS-1:0] row_wd,
  output logic [ROWS-1:0] row_wen
);
  always_comb begin
    for (int unsigned i = 0; i < ROWS; i++) begin
      unique case (rd_link)
        LINK_UP:   pe_rd[i] = (i == 0) ? prev_rd_in : row_rd[(i == 0) ? 0 : i - 1];
        LINK_DOWN: pe_rd[i] = (i == ROWS - 1) ? next_rd_in : row_rd[(i == ROWS - 1) ? i : i + 1];
        default:   pe_rd[i] = row_rd[i];
      endcase
      // Row i receives from the PE below it when PEs write upwards, and from
      // the PE above it when they write downwards.
      unique case (wr_link)
        LINK_UP: begin
          row_wd[i]  = (i == ROWS - 1) ? next_wd_in  : pe_wd[(i == ROWS - 1) ? i : i + 1];
          row_wen[i] = (i == ROWS - 1) ? next_wen_in : pe_wen[(i == ROWS - 1) ? i : i + 1];
        end
        LINK_DOWN: begin
          row_wd[i]  = (i == 0) ? prev_wd_in  : pe_wd[(i == 0) ? 0 : i - 1];
          row_wen[i] = (i == 0) ? prev_wen_in : pe_wen[(i == 0) ? 0 : i - 1];
        end
        default: begin
          row_wd[i]  = pe_wd[i];
          row_wen[i] = pe_wen[i];
        end
      endcase
    end
  end
endmodule
