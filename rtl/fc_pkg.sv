// fc_pkg: constants and elaboration-time training functions shared by the
// Fast Classification (FC) network modules.
//
// An FC network is trained "prescriptively": the first pass over the
// training set copies every exemplar into a hidden neuron as its input
// weight vector and its target into the output weight; the second pass sets
// each hidden neuron's radius of generalization to half the distance to its
// nearest other exemplar. Training happens before synthesis, so here it is a
// set of constant functions evaluated while the design elaborates; their
// results become parameters that the subtractors and comparators fold in.
//
// Training sets are passed as one wide packed vector (train_vec_t) so the
// functions can serve any network size up to MAX_TRAIN_BITS. Element (i, j)
// of an input set with n elements of b bits sits at bits
// [(i*n + j)*b +: b]; output weight i of b bits sits at [i*b +: b].
//
// Distances follow the hardware exactly: city-block distance, each partial
// sum saturated at 2**b - 1 (see fc_distance), so the radius the network
// compares against is computed in the same arithmetic it runs with.
//
// The default training set is this design's own (none is given for the
// network): exemplar i, element j takes the value of a 32-bit linear
// congruential sequence s <- s*1103515245 + 12345 (seed 1), bits [23:16],
// reduced modulo floor((2**b - 1)/n) + 1 so that no distance can saturate;
// output weight i is (16*i - 64) mod 2**b read as a signed number.
package fc_pkg;

  // Number of nearest neighbours; the output neuron's fuzzy grades are
  // written for exactly four.
  localparam int unsigned K_NN = 4;

  // Largest training set (inputs or radii) the functions can carry.
  localparam int unsigned MAX_TRAIN_BITS = 8192;
  typedef logic [MAX_TRAIN_BITS-1:0] train_vec_t;

  // Element j of exemplar i.
  function automatic int unsigned train_elem(train_vec_t tx, int unsigned i,
                                             int unsigned j, int unsigned n,
                                             int unsigned b);
    int unsigned v = 0;
    for (int unsigned k = 0; k < b; k++)
      if (tx[(i*n + j)*b + k]) v |= (32'd1 << k);
    return v;
  endfunction

  // Saturating city-block distance between exemplars a and c.
  function automatic int unsigned city_block(train_vec_t tx, int unsigned a,
                                             int unsigned c, int unsigned n,
                                             int unsigned b);
    int unsigned top = (32'd1 << b) - 1;
    int unsigned acc = 0;
    for (int unsigned j = 0; j < n; j++) begin
      int unsigned ea = train_elem(tx, a, j, n, b);
      int unsigned ec = train_elem(tx, c, j, n, b);
      acc += (ea > ec) ? ea - ec : ec - ea;
      if (acc > top) acc = top;
    end
    return acc;
  endfunction

  // Second training pass: r_i = d_min / 2 (rounded down), d_min being the
  // distance from exemplar i to its nearest other exemplar. With a single
  // exemplar there is no neighbour and the radius is 0.
  function automatic train_vec_t prescribe_radii(train_vec_t tx, int unsigned m,
                                                 int unsigned n, int unsigned b);
    train_vec_t r = '0;
    for (int unsigned i = 0; i < m; i++) begin
      int unsigned dmin = (32'd1 << b) - 1;
      int unsigned rad;
      for (int unsigned c = 0; c < m; c++)
        if (c != i) begin
          int unsigned d = city_block(tx, i, c, n, b);
          if (d < dmin) dmin = d;
        end
      rad = (m > 1) ? dmin / 2 : 0;
      for (int unsigned k = 0; k < b; k++) r[i*b + k] = rad[k];
    end
    return r;
  endfunction

  // Default exemplar inputs (see the header for the formula).
  function automatic train_vec_t default_train_x(int unsigned m, int unsigned n,
                                                 int unsigned b);
    train_vec_t t = '0;
    logic [31:0] s = 32'd1;
    int unsigned span = ((32'd1 << b) - 1) / n + 1;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < n; j++) begin
        int unsigned v;
        s = s * 32'd1103515245 + 32'd12345;
        v = 32'(s[23:16]) % span;
        for (int unsigned k = 0; k < b; k++) t[(i*n + j)*b + k] = v[k];
      end
    return t;
  endfunction

  // Default output weights: 16*i - 64, two's complement in b bits.
  function automatic train_vec_t default_train_v(int unsigned m, int unsigned b);
    train_vec_t t = '0;
    for (int unsigned i = 0; i < m; i++) begin
      int v = 16 * int'(i) - 64;
      for (int unsigned k = 0; k < b; k++) t[i*b + k] = v[k];
    end
    return t;
  endfunction

endpackage
