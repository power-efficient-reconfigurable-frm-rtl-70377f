// ppa_tree: adds N signed words with a balanced tree of N-1 parallel prefix
// adders. The words are sign-extended to OW = W + clog2(N) bits, so the sum
// cannot overflow. The tree is laid out like a heap: leaves are nodes
// N..2N-1, and internal node i (1 <= i < N) adds nodes 2i and 2i+1; node 1 is
// the sum. This balances the tree for any N, not only powers of two.
// Combinational. Summing the RAM outputs with a tree of prefix adders
// follows the filter's processing unit; the heap layout is this design's.
module ppa_tree
  import frm_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned W    = 18,
  parameter ppa_kind_e   KIND = PPA_BK,
  localparam int unsigned OW  = W + $clog2(N)
) (
  input  logic signed [W-1:0]  in  [N],
  output logic signed [OW-1:0] sum
);

  logic [OW-1:0] node [1:2*N-1];

  for (genvar i = 0; i < int'(N); i++) begin : g_leaf
    assign node[N+i] = OW'(in[i]);   // sign extension: in[] is signed
  end

  for (genvar i = 1; i < int'(N); i++) begin : g_add
    logic unused_cout;
    ppa_adder #(.W(OW), .KIND(KIND)) u_add (
      .a(node[2*i]), .b(node[2*i+1]), .cin(1'b0), .s(node[i]), .cout(unused_cout)
    );
  end

  assign sum = signed'(node[1]);

endmodule
