// tdn_pkg: constants and helpers shared by the easily testable AND/EOR
// networks.
//
// The networks built here realize a Boolean function as an exclusive-OR
// (ring) sum of product terms: AND gates form the terms and a chain of
// two-input EOR gates, the collector, adds them up. The helpers below size
// the complement-control input of the "Network (II)" input stage: an odd
// number of input lines can share one control z, an even number needs two
// controls z1/z2 that each drive an odd number of lines, so that a fault on
// either control always flips the parity output w.
package tdn_pkg;

  // Number of complement-control inputs for a bus of n lines.
  function automatic int z_width(int n);
    return (n % 2 == 1) ? 1 : 2;
  endfunction

  // Number of lines driven by z1 (the rest are driven by z2). For an odd
  // bus z1 drives everything; for an even bus z1 drives the first n-1 lines
  // (odd) and z2 the last one (odd).
  function automatic int z1_lines(int n);
    return (n % 2 == 1) ? n : n - 1;
  endfunction

endpackage
