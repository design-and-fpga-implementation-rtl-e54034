// adder_pkg: types and functions shared by the adders of the hybrid 64-bit adder family.
//
// gp_t is one generate/propagate pair. gp_combine is the prefix ("dot") operator of carry
// lookahead and parallel prefix adders: a higher-order pair (Gk, Pk) absorbs a lower-order
// pair (Gj, Pj) as (Gk + Pk*Gj, Pk*Pj). The result generates a carry if the upper span
// generates one, or propagates one that the lower span generates, and it propagates only
// if both spans propagate. The operator is the standard one; carry-in handling is left to
// the adders that use it.
package adder_pkg;

  typedef struct packed {
    logic g;  // generate
    logic p;  // propagate
  } gp_t;

  // Prefix operator: hi covers the higher-order bits, lo the lower-order bits next to them.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Carry out of a span with group pair gp when cin enters it.
  function automatic logic gp_carry(gp_t gp, logic cin);
    return gp.g | (gp.p & cin);
  endfunction

endpackage
