// cube_map_pkg: the mapping of a three-label Cube Graph onto a linear
// systolic array, evaluated at elaboration time.
//
// A Cube Graph has its computation vertices on an h1 x h2 x h3 integer grid;
// edges labelled l1, l2 and l3 step by one along the first, second and third
// axis. Matrix multiplication C = A * B with A of h2 x h3 and B of h3 x h1 is
// such a graph: vertex <x1,x2,x3> = <j,i,k> adds a(i,k)*b(k,j) to c(i,j), the
// l1 stream carries A, the l2 stream B and the l3 stream the partial sums.
//
// A diagonalisation factor w = <w1,w2,w3>, each +1 or -1, groups the vertices
// into diagonals of equal weight w1*x1 + w2*x2 + w3*x3. Each diagonal becomes
// one processor, so the array has h1+h2+h3-2 processors. The functions below
// follow the document's three phases:
//   phase one   n_l = w_l (or -w_l when w1 = -1); PA(v) = diagonal index,
//               reversed when w1 = -1;
//   phase two   d1 = 1; d2 = 2 if n2 = +1, else 1; TA(v) = t_i + x1*d1 + x2*d2;
//   phase three d3 from h1, h2 and n3 (four cases), t_i = t_1 + i*d3.
// Processors are numbered 1..|N| here as in the document; the RTL array uses
// index 0..|N|-1 for processor p-1. Times are relative to t_1 = 0.
//
// Where the statement of phase three and the appendix's proof give different
// d3 for two of its cases, this package uses the statement of phase three.
// Its results are only meaningful when every h is at least 1 and the chosen
// case gives d3 >= 1; the array checks that at elaboration.
package cube_map_pkg;

  // Width of every data stream. The document gives no word length.
  parameter int unsigned DATA_W = 32;
  typedef logic [DATA_W-1:0] word_t;

  // One value per label: the k-tuple of a processor's ports, k = 3.
  typedef struct packed {
    word_t l1;
    word_t l2;
    word_t l3;
  } port_triple_t;

  // Phase one: neighbourhood constant of label 1, 2 or 3.
  function automatic int nbr(int w1, int w2, int w3, int label);
    int w;
    w = (label == 1) ? w1 : (label == 2) ? w2 : w3;
    return (w1 == -1) ? -w : w;
  endfunction

  // Number of processors: the number of distinct diagonal weights. With every
  // w_l = +/-1 the weights cover a contiguous range of h1+h2+h3-2 integers.
  function automatic int num_procs(int h1, int h2, int h3);
    return h1 + h2 + h3 - 2;
  endfunction

  // Phases two and three: delay constant of label 1, 2 or 3.
  function automatic int dly(int h1, int h2, int w1, int w2, int w3, int label);
    int n1, n2, n3;
    n1 = nbr(w1, w2, w3, 1);
    n2 = nbr(w1, w2, w3, 2);
    n3 = nbr(w1, w2, w3, 3);
    if (label == 1) return 1;
    if (label == 2) return (n2 == 1) ? 2 : 1;
    if (n1 == n2) begin
      if (h1 - h2 + n3 >= 0) return h1 + 2 * n3;
      else                   return h2 + n3;
    end else begin
      if (h2 - h1 + n3 >= 0) return 2 * h2 - 1 + n3;
      else                   return 2 * h1 - 1 - n3;
    end
  endfunction

  // Smallest diagonal weight over the grid.
  function automatic int min_weight(int h1, int h2, int h3, int w1, int w2, int w3);
    return ((w1 < 0) ? -(h1 - 1) : 0) + ((w2 < 0) ? -(h2 - 1) : 0) +
           ((w3 < 0) ? -(h3 - 1) : 0);
  endfunction

  // Phase one: processor (1..|N|) of vertex <x1,x2,x3>.
  function automatic int proc_of(int h1, int h2, int h3, int w1, int w2, int w3,
                                 int x1, int x2, int x3);
    int idx;
    idx = w1 * x1 + w2 * x2 + w3 * x3 - min_weight(h1, h2, h3, w1, w2, w3) + 1;
    return (w1 == -1) ? num_procs(h1, h2, h3) + 1 - idx : idx;
  endfunction

  // Phases two and three: time step of vertex <x1,x2,x3>, relative to t_1.
  function automatic int time_of(int h1, int h2, int w1, int w2, int w3,
                                 int x1, int x2, int x3);
    return x1 * dly(h1, h2, w1, w2, w3, 1) + x2 * dly(h1, h2, w1, w2, w3, 2) +
           x3 * dly(h1, h2, w1, w2, w3, 3);
  endfunction

endpackage
