// parity_tree: XOR of the data bits selected by MASK, built as a balanced tree of two-input
// XOR gates. It computes one check bit of the SEC-DED encoder.
//
// The selected bits are the leaves of a complete binary tree kept in the array `node`
// (node 0 is the root, node p has children 2p+1 and 2p+2). With S selected bits the tree has
// S-1 gates and a depth of ceil(log2 S). The module is marked keep_hierarchy so that a
// synthesis tool keeps every instance as its own netlist and cannot share gates between two
// check bits: a fault on any gate here then reaches only this instance's output. Purely
// combinational; parity_o follows data_i with the delay of the tree.
(* keep_hierarchy *)
module parity_tree #(
  parameter int unsigned W = 16,
  parameter logic [W-1:0] MASK = '1
) (
  input  logic [W-1:0] data_i,
  output logic         parity_o
);

  function automatic int unsigned count_sel();
    int unsigned n = 0;
    for (int unsigned i = 0; i < W; i++) n += int'(MASK[i]);
    return n;
  endfunction

  // Position in data_i of the n-th selected bit.
  function automatic int unsigned sel_index(input int unsigned n);
    int unsigned seen = 0;
    for (int unsigned i = 0; i < W; i++) begin
      if (MASK[i]) begin
        if (seen == n) return i;
        seen++;
      end
    end
    return 0;
  endfunction

  localparam int unsigned S = count_sel();
  localparam int unsigned NODES = (S == 0) ? 1 : 2 * S - 1;

  logic [NODES-1:0] node;

  if (S == 0) begin : g_empty
    assign node[0] = 1'b0;
  end else begin : g_tree
    for (genvar n = 0; n < S; n++) begin : g_leaf
      assign node[S - 1 + n] = data_i[sel_index(n)];
    end
    for (genvar p = 0; p < S - 1; p++) begin : g_gate
      logic y;  // output of gate p
      assign y       = node[2*p+1] ^ node[2*p+2];
      assign node[p] = y;
    end
  end

  assign parity_o = node[0];

endmodule
