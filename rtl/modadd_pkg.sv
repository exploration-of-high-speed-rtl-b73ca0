// modadd_pkg: shared helper for the modulo 2^n-1 adders.
//
// In a modulo 2^n-1 adder the carry chain is cyclic: bit 0 receives the
// carry of bit n-1 (end-around carry). Every prefix equation in the adders
// therefore names bits such as i-6 or i-37 that are taken modulo n. The
// function wrap() turns such an offset index into a bit position 0..n-1 at
// elaboration time; it creates no logic.
package modadd_pkg;

  // Bit position (i mod n), correct for negative i.
  function automatic int wrap(input int i, input int n);
    int r;
    r = i % n;
    if (r < 0) r += n;
    return r;
  endfunction

endpackage
