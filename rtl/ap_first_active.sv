// ap_first_active: collective selection of the first active PE.
//
// A token runs along the PEs and stops at the first one whose status bit is
// set; that PE gets sel=1 and all others 0. tok_in says that a PE of an
// earlier chip already took the token; tok_out tells the next chip the same
// (it is tok_in OR any status bit here). Combinational, as in the document.
// To avoid a ripple through all N PEs, PEs are grouped by GROUP: each group
// computes "any status set" in parallel and the token skips whole groups, in
// the manner of a carry look-ahead adder, then ripples inside its group.
// The look-ahead idea is the document's; the group size is this design's
// choice.
module ap_first_active #(
  parameter int unsigned N     = 128,
  parameter int unsigned GROUP = 8
) (
  input  logic [N-1:0] status,
  input  logic         tok_in,
  output logic [N-1:0] sel,
  output logic         tok_out
);
  localparam int unsigned NG = (N + GROUP - 1) / GROUP;

  logic [NG-1:0] grp_any;
  logic [NG:0]   grp_tok;     // token already taken before group g

  always_comb begin
    grp_any = '0;
    for (int unsigned i = 0; i < N; i++)
      if (status[i]) grp_any[i / GROUP] = 1'b1;

    begin
      logic t;
      t = tok_in;
      for (int unsigned g = 0; g <= NG; g++) begin
        grp_tok[g] = t;
        if (g < NG) t = t | grp_any[g];
      end
    end

    for (int unsigned g = 0; g < NG; g++) begin
      logic taken;
      taken = grp_tok[g];
      for (int unsigned k = 0; k < GROUP; k++) begin
        if (g * GROUP + k < N) begin
          sel[g * GROUP + k] = status[g * GROUP + k] & ~taken;
          taken = taken | status[g * GROUP + k];
        end
      end
    end
    tok_out = grp_tok[NG];
  end
endmodule
