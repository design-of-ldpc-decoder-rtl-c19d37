// ldpc_pkg: constants, message type and code construction shared by the
// min-max LDPC decoder.
//
// Messages are binary-domain min-max "cost pairs": one non-negative cost for
// the bit value 0 and one for the bit value 1, each W = 12 bits, packed into a
// 24-bit word (the 12/24-bit widths are those of the check-node core's ports).
// A normalised pair has at least one zero cost; the value with the lower cost
// is the more likely one.
//
// The code is a regular quasi-cyclic LDPC code with variable degree 3 and
// check degree 6 (the degrees used by the decoder).  Its parity-check matrix
// is a 3 x 6 array of Z x Z circulant permutation matrices; the block in
// block-row i, block-column j is the identity shifted by s(i,j) = (i*j) mod Z.
// Check m = i*Z + r therefore meets variable n = j*Z + ((r + s(i,j)) mod Z),
// one per block column, so every check has exactly one edge in each block
// column.  With Z prime and above 10 the matrix has no 4-cycles.  The code
// length, the lifting size and the circulant shifts are this design's own
// choice: only the node degrees, the 12-bit message width and the iteration
// count come from the decoder description.
package ldpc_pkg;

  localparam int W        = 12;   // width of one cost
  localparam int DV       = 3;    // variable-node degree
  localparam int DC       = 6;    // check-node degree
  localparam int ZDEF     = 17;   // default lifting size (assumed)
  localparam int MAX_ITER = 10;   // decoding iterations
  localparam int QW       = 8;    // input LLR width (assumed)

  localparam logic [W-1:0] COST_MAX = '1;

  typedef struct packed {
    logic [W-1:0] c1;   // cost of bit value 1
    logic [W-1:0] c0;   // cost of bit value 0
  } cost_pair_t;

  // Circulant shift of block (i, j).
  function automatic int circ_shift(int i, int j, int z);
    return (i * j) % z;
  endfunction

  // Variable node attached to edge k (= block column) of check m.
  function automatic int check_var(int m, int k, int z);
    int i, r;
    i = m / z;
    r = m % z;
    return k * z + ((r + circ_shift(i, k, z)) % z);
  endfunction

  // Check node attached to the i-th edge (= block row) of variable n.
  function automatic int var_check(int n, int i, int z);
    int j, c;
    j = n / z;
    c = n % z;
    return i * z + ((c - circ_shift(i, j, z) + z) % z);
  endfunction

  // Saturating addition of two costs.
  function automatic logic [W-1:0] sat_add(logic [W-1:0] a, logic [W-1:0] b);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[W] ? COST_MAX : s[W-1:0];
  endfunction

endpackage
