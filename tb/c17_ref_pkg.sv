// c17_ref_pkg: reference models used by the testbenches.
//
// The C17 reference is written in sum-of-products form rather than as the
// NAND network, so that it checks the gate netlist independently:
//   N11' = N3 & N6 (the complement of the shared NAND)
//   N22  = (N1 & N3) | (N2 & ~N11')
//   N23  = ~N11' & (N2 | N7)
// Majority is computed by counting ones.
package c17_ref_pkg;

  function automatic logic [1:0] c17_ref(input logic n1, n2, n3, n6, n7);
    logic both36;
    both36 = n3 & n6;
    return {(n1 & n3) | (n2 & ~both36), ~both36 & (n2 | n7)};
  endfunction

  function automatic logic maj_ref(input logic a, b, c);
    int unsigned n;
    n = 32'(a) + 32'(b) + 32'(c);
    return n >= 2;
  endfunction

  function automatic int unsigned ones3(input logic [2:0] v);
    return 32'(v[0]) + 32'(v[1]) + 32'(v[2]);
  endfunction

endpackage : c17_ref_pkg
