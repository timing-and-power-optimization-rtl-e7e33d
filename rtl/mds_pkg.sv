// Shared types for the mixed dynamic/static arithmetic blocks.
//
// cmp_res_t is the three-wire result that every comparator stage produces
// and the next one consumes: "A greater than B" (Ag), "A less than B" (Al)
// and "A equal to B" (eq). Exactly one of the three is set for a valid
// result. The field order {gt, lt, eq} is this design's own choice; the
// signal names follow the comparator truth tables. res_valid() tells
// whether a result is one of the three legal values.
package mds_pkg;

  typedef struct packed {
    logic gt;  // Ag: A > B
    logic lt;  // Al: A < B
    logic eq;  // eq: A = B
  } cmp_res_t;

  // True when exactly one of the three flags is set.
  function automatic logic res_valid(cmp_res_t r);
    return (r.gt ^ r.lt ^ r.eq) & ~(r.gt & r.lt & r.eq);
  endfunction

endpackage
