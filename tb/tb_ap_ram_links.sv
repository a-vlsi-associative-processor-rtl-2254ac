// tb_ap_ram_links: checks the read and write routing for the three link
// settings, including the rows at both ends that take the neighbouring
// chip's signals.
module tb_ap_ram_links;
  import ap_pkg::*;
  localparam int N = 16;
  link_e rd_link, wr_link;
  logic [N-1:0] row_rd, pe_rd, pe_wd, pe_wen, row_wd, row_wen;
  logic prev_rd_in, next_rd_in, prev_wd_in, prev_wen_in, next_wd_in, next_wen_in;
  logic e_rd, e_wd, e_wen;
  int checks = 0, failures = 0;
  ap_ram_links #(.ROWS(N)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 300; i++) begin
      rd_link = link_e'($urandom % 3); wr_link = link_e'($urandom % 3);
      row_rd = N'($urandom); pe_wd = N'($urandom); pe_wen = N'($urandom);
      {prev_rd_in, next_rd_in, prev_wd_in, prev_wen_in, next_wd_in, next_wen_in} = 6'($urandom);
      #1;
      for (int k = 0; k < N; k++) begin
        case (rd_link)
          LINK_UP:   e_rd = (k == 0) ? prev_rd_in : row_rd[k-1];
          LINK_DOWN: e_rd = (k == N-1) ? next_rd_in : row_rd[k+1];
          default:   e_rd = row_rd[k];
        endcase
        case (wr_link)
          LINK_UP:   begin e_wd = (k == N-1) ? next_wd_in : pe_wd[k+1]; e_wen = (k == N-1) ? next_wen_in : pe_wen[k+1]; end
          LINK_DOWN: begin e_wd = (k == 0) ? prev_wd_in : pe_wd[k-1];   e_wen = (k == 0) ? prev_wen_in : pe_wen[k-1]; end
          default:   begin e_wd = pe_wd[k]; e_wen = pe_wen[k]; end
        endcase
        checks++;
        if (pe_rd[k] !== e_rd || row_wd[k] !== e_wd || row_wen[k] !== e_wen) begin
          failures++; $display("FAIL %0d row %0d", i, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
