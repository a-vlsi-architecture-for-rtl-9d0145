// mdwta_pkg: sizes shared by the Manhattan-distance / winner-take-all pattern matcher.
//
// The defaults are the configuration of the letter-recognition experiment: eight template
// vectors, 32 elements per vector and 8-bit elements. The distance accumulator then needs
// DATA_W + clog2(M_ELEM) = 13 bits, which is also the number of clocks the bit-serial
// winner-take-all search takes. The function below derives that width for other sizes.
package mdwta_pkg;

  localparam int unsigned N_TEMPL_DEF = 8;   // number of template vectors
  localparam int unsigned M_ELEM_DEF  = 32;  // elements per vector
  localparam int unsigned DATA_W_DEF  = 8;   // bits per element

  // Width of a sum of m unsigned values of data_w bits each.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned m_elem);
    return data_w + ((m_elem > 1) ? $clog2(m_elem) : 0);
  endfunction

endpackage
