// cascade_pkg: types and sizing helpers shared by the LUT cascade.
//
// The cascade evaluates a multiple-output function one output at a time
// through its encoded characteristic function for non-zero outputs (ECFN):
// f_j(x) = ECFN(x, z) with z = j.  Each cascade cell is one page of a LUT
// memory; a page's K address bits are taken from the rails of the previous
// cell, from the auxiliary variables z and from the primary inputs x.
//
// This package holds the sequencer state type and the encoding of the
// address-bit source codes used by rail_input_select.  Both encodings are
// this design's own choice.
package cascade_pkg;

  // Sequencer states: waiting, stepping through pages, last read returning.
  typedef enum logic [1:0] {
    SEQ_IDLE  = 2'd0,
    SEQ_RUN   = 2'd1,
    SEQ_DRAIN = 2'd2
  } seq_state_e;

  // Number of address-bit sources: R rails, W auxiliary variables, N_IN
  // primary inputs, plus one code that stands for constant 0.
  function automatic int unsigned num_sources(int unsigned r, int unsigned w,
                                              int unsigned n_in);
    return r + w + n_in + 1;
  endfunction

  // Width of an output index z for m outputs, w = ceil(log2 m), at least 1.
  function automatic int unsigned z_width(int unsigned m);
    return (m > 1) ? $clog2(m) : 1;
  endfunction

endpackage
