// wbc_pkg -- types and elaboration-time helpers shared by the weight-based
// code checkers.
//
// A weight-based code gives every output bit of a monitored circuit a small
// positive weight; the check symbol is the sum of the weights of the outputs
// that are 1.  Output i takes its weight from a short weight set, used
// cyclically: weight(i) = set[i mod |set|].  With the set {2,3} the first,
// third, ... outputs weigh 2 and the second, fourth, ... weigh 3.  A set of
// one weight equal to 1 is the Berger code.
//
// The weight set is a packed array of MAX_SET entries, entry 0 first; unused
// entries are 0 and the set ends at the first 0.  Use weight_set(...) to
// write a short set.  A table as long as the output word gives every output
// its own weight, which covers any clustering of outputs;
// consecutive_weights(n) builds the positional code in which output i
// weighs i+1.  All functions here are evaluated at elaboration time only.
//
// Two-rail pairs (t, f) carry one bit of checker state: (1,0) and (0,1) are
// valid, (0,0) and (1,1) signal an error.  This encoding is the usual one for
// totally self-checking checkers and is this design's choice of interface.
package wbc_pkg;

  localparam int unsigned MAX_SET = 64;  // longest weight table
  localparam int unsigned WW      = 8;   // bits per stored weight

  typedef logic [WW-1:0]             weight_t;
  typedef weight_t [MAX_SET-1:0]     wset_t;

  typedef struct packed {
    logic t;
    logic f;
  } tr_pair_t;

  // Builds a short weight set from up to eight weights, first weight first.
  function automatic wset_t weight_set(weight_t w0, weight_t w1 = '0,
                                       weight_t w2 = '0, weight_t w3 = '0,
                                       weight_t w4 = '0, weight_t w5 = '0,
                                       weight_t w6 = '0, weight_t w7 = '0);
    wset_t ws;
    ws = '0;
    ws[0] = w0;  ws[1] = w1;  ws[2] = w2;  ws[3] = w3;
    ws[4] = w4;  ws[5] = w5;  ws[6] = w6;  ws[7] = w7;
    return ws;
  endfunction

  // Positional code: weights 1, 2, ..., n.
  function automatic wset_t consecutive_weights(int unsigned n);
    wset_t ws;
    ws = '0;
    for (int unsigned k = 0; k < n && k < MAX_SET; k++) ws[k] = weight_t'(k + 1);
    return ws;
  endfunction

  // Number of weights in the set: the entries before the first zero.
  function automatic int unsigned set_size(wset_t ws);
    int unsigned n;
    n = 0;
    for (int k = 0; k < MAX_SET; k++) begin
      if (ws[k] == '0) break;
      n++;
    end
    return n;
  endfunction

  // Weight given to output bit i.
  function automatic int unsigned weight_of(wset_t ws, int unsigned i);
    int unsigned s;
    s = set_size(ws);
    if (s == 0) return 0;
    return int'(ws[i % s]);
  endfunction

  // Largest possible check value: every output at 1.
  function automatic int unsigned total_weight(int unsigned n_out, wset_t ws);
    int unsigned t;
    t = 0;
    for (int unsigned i = 0; i < n_out; i++) t += weight_of(ws, i);
    return t;
  endfunction

  // Check bits needed to hold the full weighted sum.
  function automatic int unsigned check_bits(int unsigned n_out, wset_t ws);
    return $clog2(total_weight(n_out, ws) + 1);
  endfunction

  function automatic int unsigned max_weight(wset_t ws);
    int unsigned m;
    m = 0;
    for (int k = 0; k < MAX_SET; k++)
      if (int'(ws[k]) > m) m = int'(ws[k]);
    return m;
  endfunction

  // Partitions of the general checker: one per bit of the binary weight.
  function automatic int unsigned n_partitions(wset_t ws);
    return $clog2(max_weight(ws) + 1);
  endfunction

  // Number of outputs whose weight has bit j set (members of partition j).
  function automatic int unsigned part_members(int unsigned n_out, wset_t ws,
                                               int unsigned j);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < n_out; i++)
      if (((weight_of(ws, i) >> j) & 1) != 0) c++;
    return c;
  endfunction

  // Output index of the m-th member (counting from 0) of partition j.
  function automatic int unsigned member_bit(int unsigned n_out, wset_t ws,
                                             int unsigned j, int unsigned m);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < n_out; i++) begin
      if (((weight_of(ws, i) >> j) & 1) != 0) begin
        if (c == m) return i;
        c++;
      end
    end
    return 0;
  endfunction

  function automatic logic tr_valid(tr_pair_t p);
    return p.t ^ p.f;
  endfunction

endpackage
