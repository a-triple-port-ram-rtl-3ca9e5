// tr_pkg: types and small functions shared by the triple-port-RAM (TR)
// commutator of a radix-4 pipelined FFT stage.
//
// A radix-4 stage with word separation N consumes, in every word slot, the
// four words x(N*p + q), p = 0..3, of one frame of 4N words.  The slot
// index s = N*m + q of the output frame gives m (0..3) and q (0..N-1).
// The three 2:1 output multiplexers of the commutator are steered by three
// select lines c1..c3 whose values per m are the table printed with the
// general commutator: m=0 -> 111, m=1 -> 011, m=2 -> 001, m=3 -> 000.
// A select of 1 picks the "early" source (input, A, B), 0 picks the late
// source (D, E, F).
package tr_pkg;

  // Select lines of the output multiplexers O2, O3, O4.
  typedef struct packed {
    logic c1;  // O2: 1 = input word, 0 = D
    logic c2;  // O3: 1 = A,          0 = E
    logic c3;  // O4: 1 = B,          0 = F
  } sel_t;

  // Select lines as a function of m (table printed with the general
  // commutator): c_k is 1 while m < k.
  function automatic sel_t sel_of_m(input logic [1:0] m);
    sel_t s;
    s.c1 = (m < 2'd1);
    s.c2 = (m < 2'd2);
    s.c3 = (m < 2'd3);
    return s;
  endfunction

  // Width of an index 0..n-1, at least one bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
