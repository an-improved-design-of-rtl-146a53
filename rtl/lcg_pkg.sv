// lcg_pkg: default wordlengths of the reduced-wordlength linear congruential
// generator X(k+1) = (a*X(k) + c) mod 2^N.
//
// The generator is built for applications that only ever use a small
// multiplier and increment, so those two inputs are narrow while the state
// is N bits wide. The defaults below are the example configuration the
// design is presented in: an 8-bit state (modulus 2^8), a 3-bit multiplier
// and a 2-bit increment. The same RTL has also been characterised at N=16
// and N=31 with the same narrow multiplier and increment.
package lcg_pkg;
  parameter int unsigned N_DEFAULT  = 8;  // state / seed / output width
  parameter int unsigned AW_DEFAULT = 3;  // multiplier a width
  parameter int unsigned CW_DEFAULT = 2;  // increment c width
endpackage
