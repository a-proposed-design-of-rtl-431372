// tb_ref_pkg - reference values and models shared by the testbenches.
//
// The connection integers q_i = p_i^e_i are written out as literals (not computed by the design's
// functions), the register lengths r_i as numbers, and f_d is read from the printed hexadecimal
// string one character at a time. twoadic_t produces the 2-adic expansion of -c/q bit by bit,
// which is the output sequence an FCSR seeded with c must give.
package tb_ref_pkg;

  localparam int NF = 8;

  localparam logic [127:0] REF_Q [NF] = '{
      128'h8c8b6d2b,
      128'h201901a5c9,
      128'had62418d14ea824701c4b4886cc66f59,
      128'h976aaa7d50312ba42b26cabcc23,
      128'hb1bf6cd930979b,
      128'h4f40383682c46121d5,
      128'h82b802a1c7e9b777e48f9,
      128'h1c4bd19b59c28ba9c314f2ce7d
  };
  localparam int REF_R [NF] = '{31, 37, 127, 107, 55, 70, 83, 100};
  localparam int REF_P [NF] = '{11, 13, 19, 11, 3, 13, 61, 61};

  localparam string FD_HEX = "6F4FC635EE280B7135159C4BB472512BCA8A932DD2E4A84D90D0C977CABEF217";

  // f_d(x), x = 8-bit index; entry 0 is the leftmost printed bit.
  function automatic bit fd_ref(input int x);
    byte ch;
    int  nib;
    ch = FD_HEX[x / 4];
    nib = (ch >= "A") ? (ch - "A" + 10) : (ch - "0");
    return nib[3 - (x % 4)];
  endfunction

  // Index formed from eight FCSR bits, FCSR1 (bit 0) most significant.
  function automatic int fd_index(input logic [7:0] bits);
    int idx = 0;
    for (int i = 0; i < 8; i++) idx = idx * 2 + int'(bits[i]);
    return idx;
  endfunction

  // c mod p computed bit-serially from the most significant end.
  function automatic int mod_serial(input logic [127:0] c, input int p);
    int rem = 0;
    for (int i = 127; i >= 0; i--) rem = (rem * 2 + int'(c[i])) % p;
    return rem;
  endfunction

  class twoadic_t;
    logic signed [131:0] x, qs;
    function new(input logic [127:0] c, input logic [127:0] q);
      x  = -$signed({4'b0, c});
      qs = $signed({4'b0, q});
    endfunction
    function bit next();
      bit b;
      b = x[0];
      if (b) x = x - qs;
      x = x >>> 1;
      return b;
    endfunction
  endclass

  // A random seed in 1..q-1 that is not a multiple of p.
  function automatic logic [127:0] rand_seed(input int i);
    logic [127:0] v;
    do begin
      v = {$urandom, $urandom, $urandom, $urandom} % REF_Q[i];
    end while (v == 0 || mod_serial(v, REF_P[i]) == 0);
    return v;
  endfunction

endpackage
