// ldpca_deaccumulator: turns accumulated syndrome bits back into the
// syndrome bit of a merged check node.
//
// A merged check node covering basic check nodes j..k of a group has the
// syndrome A[k] xor A[j-1] (or A[k] alone when j = 0), where A is the running
// XOR of the group's syndrome bits. The segment is given by the parameters
// FIRST and LAST, so each instance is a single XOR gate wired to the
// syndrome buffer. Combinational.
module ldpca_deaccumulator #(
  parameter int GROUP = 66,
  parameter int FIRST = 0,
  parameter int LAST  = 0
) (
  input  logic [GROUP-1:0] acc_syn,   // accumulated syndrome bits of a group
  output logic             syn        // syndrome of the merged check node
);
  if (FIRST == 0) begin : g_first
    assign syn = acc_syn[LAST];
  end else begin : g_rest
    assign syn = acc_syn[LAST] ^ acc_syn[FIRST-1];
  end
endmodule
