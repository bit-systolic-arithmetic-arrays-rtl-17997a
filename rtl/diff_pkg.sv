// diff_pkg: the dual-rail bit shared by every cell of the bit-systolic arrays.
//
// The arithmetic cells are differential: each logical bit travels on a true
// rail and a complement rail, and every cell computes both output rails from
// the true-form rails of its inputs. A valid bit has exactly one rail high.
// The package holds that type and the helpers used to enter and leave the
// dual-rail domain and to test a bit for a rail fault. The differential
// signalling follows the document; the struct layout and the helper names are
// this design's own.
package diff_pkg;

  // One differential bit: t is the true rail, f the complement rail.
  typedef struct packed {
    logic t;
    logic f;
  } diff_t;

  // Drive both rails from a single-ended bit.
  function automatic diff_t to_diff(input logic b);
    return '{t: b, f: ~b};
  endfunction

  // A bit is valid when its rails disagree.
  function automatic logic diff_valid(input diff_t d);
    return d.t ^ d.f;
  endfunction

endpackage
