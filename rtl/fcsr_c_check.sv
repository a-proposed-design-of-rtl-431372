// fcsr_c_check - validity check for the seed value c of one FCSR.
//
// A session seeds each FCSR with a value c that must lie in 1..q-1 and be coprime to p. The
// document draws c at random and redraws until gcd(c, p) = 1; since p is prime this is the
// same as c mod p != 0, which is what is tested here. The range 1..q-1 follows from the
// document's draw over 1..q-1. The check is purely combinational; the FCSR samples its result
// when it takes c. Raising a flag rather than redrawing is this design's choice, because the
// random source is outside the design.
//
// Parameters: P and E give q = P**E. Ports: c (the seed, fcsr_pkg::CW bits), ok (1 when c is
// usable).
module fcsr_c_check
  import fcsr_pkg::*;
#(
    parameter int unsigned P = 11,
    parameter int unsigned E = 9
) (
    input  wide_t c,
    output logic  ok
);

  localparam wide_t Q = conn_int(P, E);

  logic nonzero, below_q, coprime;

  always_comb begin
    nonzero = (c != '0);
    below_q = (c < Q);
    coprime = ((c % wide_t'(P)) != '0);
    ok      = nonzero && below_q && coprime;
  end

endmodule
