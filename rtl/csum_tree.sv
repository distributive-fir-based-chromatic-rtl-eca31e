// csum_tree: complex summation block of the distributive FIR-CDE.
//
// Adds the NIN complex values din[OFF] .. din[OFF+NIN-1] of a routed array of
// NTOT values with a fully parallel binary adder tree. Leaves beyond NIN are
// tied to zero; those adders fold away, leaving NIN-1 complex adders, the
// count the original architecture budgets for a set of multiplicity NIN.
// NIN = 0 (a level no tap uses) gives a constant zero sum. Purely
// combinational, depth ceil(log2(NIN)) adders.
module csum_tree
  import cde_pkg::*;
#(
  parameter int NTOT = 8,
  parameter int OFF  = 0,
  parameter int NIN  = 8
) (
  input  cacc_t din [NTOT],
  output cacc_t sum
);

  localparam int L = (NIN <= 1) ? 0 : $clog2(NIN);  // tree depth

  initial assert (OFF + NIN <= NTOT)
    else $error("csum_tree: slice runs past the input array");

  localparam int P = 1 << L;  // leaves after padding

  // heap-ordered tree: node 1 is the root, leaves are P..2P-1
  cacc_t node [2*P];

  always_comb begin
    node[0] = '0;
    for (int i = 0; i < P; i++) node[P+i] = (i < NIN) ? din[OFF+i] : '0;
    for (int i = P - 1; i >= 1; i--) node[i] = cadd(node[2*i], node[2*i+1]);
  end

  assign sum = (NIN == 0) ? '0 : node[1];

endmodule
