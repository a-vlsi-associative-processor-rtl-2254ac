// ap_adder_tree: collective sum of all PE outputs.
//
// A binary tree of 1-bit serial full adders. Each node adds two bit-serial
// streams (LSB first) with a carry latch and registers its sum bit, so data
// move one tree level per clock and the total comes out bit-serially from
// the root, LEVELS = log2(N) clocks after it enters. start marks the LSB of
// a new sum: it travels down the tree with the data and clears each node's
// carry for that bit. Feed a W-bit value followed by LEVELS zero bits to get
// the full W+LEVELS-bit sum. Counting active PEs is the case W = 1. The
// tree of full adders and its pipelining are the document's; the start flag
// is this design's choice. N must be a power of two.
module ap_adder_tree #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_bits,
  input  logic         start,
  output logic         sum_bit,
  output logic         sum_start
);
  localparam int unsigned LEVELS = $clog2(N);

  // Level l holds N >> l streams; level 0 is the input.
  logic [N-1:0]      lvl   [LEVELS+1];
  logic [N-1:0]      carry [LEVELS+1];
  logic [LEVELS:0]   st;

  always_comb begin
    lvl[0] = in_bits;
    st[0]  = start;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NO = N >> (l + 1);
    logic [NO-1:0] s, c;
    always_comb begin
      for (int unsigned j = 0; j < NO; j++) begin
        logic a, b, ci;
        a = lvl[l][2*j];
        b = lvl[l][2*j+1];
        ci = st[l] ? 1'b0 : carry[l+1][j];
        s[j] = a ^ b ^ ci;
        c[j] = (a & b) | (a & ci) | (b & ci);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lvl[l+1]   <= '0;
        carry[l+1] <= '0;
        st[l+1]    <= 1'b0;
      end else begin
        lvl[l+1]   <= N'(s);
        carry[l+1] <= N'(c);
        st[l+1]    <= st[l];
      end
    end
  end

  assign sum_bit   = lvl[LEVELS][0];
  assign sum_start = st[LEVELS];
endmodule
