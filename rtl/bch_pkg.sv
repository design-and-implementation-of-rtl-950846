// bch_pkg: constants shared by the (15,k) binary BCH encoders.
//
// All three codes have length n = 15 over GF(2^4), built on the primitive
// polynomial 1 + x + x^4. A generator polynomial g(x) of degree n-k is held
// as an (n-k+1)-bit vector whose bit i is the coefficient of x^i, so bit 0
// and bit n-k are always 1.
//
//   t = 1, (15,11): g(x) = 1 + x + x^4                        (minimal poly of alpha)
//   t = 2, (15,7) : g(x) = 1 + x^4 + x^6 + x^7 + x^8          (LCM of phi1, phi3)
//   t = 3, (15,5) : g(x) = 1 + x + x^2 + x^4 + x^5 + x^8 + x^10 (LCM of phi1, phi3, phi5)
//
// The polynomials are those of the standard BCH construction; the phase type
// names the two halves of a codeword frame.
package bch_pkg;

  localparam int unsigned BCH_N = 15;

  localparam int unsigned K_T1 = 11;
  localparam int unsigned K_T2 = 7;
  localparam int unsigned K_T3 = 5;

  localparam logic [BCH_N-K_T1:0] G_T1 = 5'b1_0011;
  localparam logic [BCH_N-K_T2:0] G_T2 = 9'b1_1101_0001;
  localparam logic [BCH_N-K_T3:0] G_T3 = 11'b101_0011_0111;

  // Frame phase: information bits pass through (S1 on, S2 in position 2),
  // then the parity held in the LFSR is shifted out (S1 off, S2 in position 1).
  typedef enum logic {
    PH_INFO   = 1'b1,
    PH_PARITY = 1'b0
  } phase_e;

endpackage
