// tb_ap_first_active: checks the first-active selection against a simple
// scan: exactly the lowest-numbered PE with status 1 is selected, none if
// the token was taken by an earlier chip, and tok_out reports any status.
module tb_ap_first_active;
  localparam int N = 128;
  logic [N-1:0] status, sel, exp_sel;
  logic tok_in, tok_out;
  int checks = 0, failures = 0;
  ap_first_active #(.N(N), .GROUP(8)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 600; i++) begin
      status = '0;
      case (i % 4)
        0: status = {$urandom, $urandom, $urandom, $urandom};
        1: status[$urandom % N] = 1'b1;
        2: begin status[$urandom % N] = 1'b1; status[$urandom % N] = 1'b1; end
        default: ;
      endcase
      tok_in = (i % 7 == 0);
      exp_sel = '0;
      if (!tok_in)
        for (int k = 0; k < N; k++) if (status[k]) begin exp_sel[k] = 1'b1; break; end
      #1;
      checks++;
      if (sel !== exp_sel || tok_out !== (tok_in || status != 0)) begin
        failures++; $display("FAIL %0d status=%h sel=%h", i, status, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
