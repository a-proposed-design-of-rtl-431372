// fcsr_pkg - constants shared by the FCSR stream cipher.
//
// Each of the eight feedback-with-carry shift registers (FCSRs) is defined by an odd prime p
// and an exponent e. Its connection integer is q = p^e, its length is r = floor(log2(q+1)),
// and its taps are the set bits of q+1 = sum q_k 2^k (k = 1..r). These (p, e) pairs and the
// resulting q, r and periods q(p-1)/p follow the document. The tap sets are computed here from
// q rather than typed in, so they always agree with q.
//
// The combining Boolean function f_d is an 8-input, 256-entry truth table, also from the
// document. Entry 0 is the leftmost bit of the printed hexadecimal string (a design choice: the
// bit order is not stated).
//
// The default seed values c are this design's own: the document chooses c at random for every
// session and prints none. Each one is below its q and not a multiple of its p.
package fcsr_pkg;

  // Width of a seed value c and of a connection integer; q3 = 19^30 needs 128 bits.
  localparam int unsigned CW = 128;
  localparam int unsigned NUM_FCSR = 8;

  typedef logic [CW-1:0] wide_t;

  localparam int unsigned FCSR_P [NUM_FCSR] = '{11, 13, 19, 11, 3, 13, 61, 61};
  localparam int unsigned FCSR_E [NUM_FCSR] = '{9, 10, 30, 31, 35, 19, 14, 17};

  // Truth table of f_d: entry x (x = 0..255) is FD_TABLE[255-x].
  localparam logic [255:0] FD_TABLE =
      256'h6F4FC635EE280B7135159C4BB472512B_CA8A932DD2E4A84D90D0C977CABEF217;

  localparam wide_t DEFAULT_C [NUM_FCSR] = '{
      128'h52e6b439,
      128'h9f2a74de5,
      128'h128b2f330c5c7fd0a6a3a4506513270f,
      128'h5d91818e811892f902bd23f0825,
      128'hed9049531985e,
      128'h1b81e74ef5e8e25d95,
      128'h6f0361600a35a099950d9,
      128'h23d9c172411e20b8f6b0d549c
  };

  // q = p^e, computed at elaboration time.
  function automatic wide_t conn_int(input int unsigned p, input int unsigned e);
    wide_t q;
    q = wide_t'(1);
    for (int unsigned i = 0; i < e; i++) q = q * wide_t'(p);
    return q;
  endfunction

  // r = floor(log2(q+1)): the index of the highest set bit of q+1.
  function automatic int unsigned reg_len(input wide_t q);
    wide_t       qp1;
    int unsigned r;
    qp1 = q + wide_t'(1);
    r   = 0;
    for (int unsigned i = 0; i < CW; i++) if (qp1[i]) r = i;
    return r;
  endfunction

  // Tap mask over the register cells. Cell j (j = 0 is the output cell a_0, j = r-1 the cell
  // that takes the feedback) is multiplied by q_{r-j}, bit r-j of q+1.
  function automatic wide_t tap_mask(input wide_t q, input int unsigned r);
    wide_t qp1, m;
    qp1 = q + wide_t'(1);
    m   = '0;
    for (int unsigned j = 0; j < r; j++) m[j] = qp1[r-j];
    return m;
  endfunction

endpackage
