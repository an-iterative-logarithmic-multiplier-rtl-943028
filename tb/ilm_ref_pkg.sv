// ilm_ref_pkg: reference arithmetic for the multiplier testbenches.
//
// The reference does not copy the hardware's shift-and-add structure. It uses
// the identity N1*N2 = P(i) + E(i): after i corrections the error E(i) is the
// product of the two residues left once i+1 leading ones have been removed
// from each operand, so P(i) = N1*N2 - r1*r2 with ordinary multiplication.
package ilm_ref_pkg;

  // Index of the highest set bit (0 for a zero input), found by scanning.
  function automatic int msb_index(longint unsigned v);
    int idx = 0;
    for (int i = 0; i < 64; i++) if (v[i]) idx = i;
    return idx;
  endfunction

  // Remove the highest set bit.
  function automatic longint unsigned drop_lead(longint unsigned v);
    if (v == 0) return 0;
    return v - (longint'(1) << msb_index(v));
  endfunction

  // Expected product after `ecc` correction circuits.
  function automatic longint unsigned ref_product(longint unsigned a,
                                                  longint unsigned b,
                                                  int ecc);
    longint unsigned r1 = a, r2 = b;
    if (a == 0 || b == 0) return 0;
    for (int i = 0; i <= ecc; i++) begin
      r1 = drop_lead(r1);
      r2 = drop_lead(r2);
    end
    return a * b - r1 * r2;
  endfunction

  // Number of set bits.
  function automatic int ones(longint unsigned v);
    int c = 0;
    for (int i = 0; i < 64; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
