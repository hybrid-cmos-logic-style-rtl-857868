// sc_pkg: types and helpers shared by the self-checking adders.
//
// A two-rail (dual-rail) pair carries one bit on two wires that must be
// complementary. 01 and 10 are the code words, 00 and 11 signal an error. Every
// checker in this design delivers its verdict as such a pair (outputs f and fd).
package sc_pkg;

  // Error-indication pair of a two-rail checker: valid when f != fd.
  typedef struct packed {
    logic f;
    logic fd;
  } tworail_t;

  // True when the pair is a code word (no error indicated).
  function automatic logic tr_ok(tworail_t p);
    return p.f ^ p.fd;
  endfunction

endpackage
