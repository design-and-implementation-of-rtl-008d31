// sc_pkg: constants shared by the LFSR-reseeded CRC hash stream cipher.
//
// A polynomial of degree N over GF(2) is held as an N-bit vector whose bit j
// is the coefficient of x^j; the leading x^N term is implied. The functions
// below give the default feedback polynomial of the reseeding LFSR and the
// default generator polynomial of the CRC hash for a key size N.
//
// For N = 8 both polynomials are the published ones:
//   LFSR feedback  x^8 + x^6 + x^5 + x^4 + 1
//   CRC generator  x^8 + x^7 + x^6 + x^5 + x^4 + x^2 + 1
// For N = 16 and N = 128 the polynomials are this design's own choice, picked
// from standard tables and checked to be primitive (hence irreducible):
//   LFSR feedback  x^16 + x^15 + x^13 + x^4 + 1,   x^128 + x^126 + x^101 + x^99 + 1
//   CRC generator  x^16 + x^5 + x^3 + x^2 + 1,     x^128 + x^7 + x^2 + x + 1
// Any other N must be given explicit polynomials by the user; the functions
// then return x^1 + 1 as a placeholder, which is not maximum length.
package sc_pkg;

  localparam int unsigned MAX_N = 128;

  typedef logic [MAX_N-1:0] poly_t;

  function automatic poly_t default_lfsr_poly(int unsigned n);
    poly_t p;
    p = '0;
    case (n)
      8:       p[7:0]  = 8'h71;            // bits 6,5,4,0
      16:      p[15:0] = 16'hA011;         // bits 15,13,4,0
      128: begin
               p[0]   = 1'b1;
               p[99]  = 1'b1;
               p[101] = 1'b1;
               p[126] = 1'b1;
           end
      default: p[1:0]  = 2'b11;
    endcase
    return p;
  endfunction

  function automatic poly_t default_crc_poly(int unsigned n);
    poly_t p;
    p = '0;
    case (n)
      8:       p[7:0]  = 8'hF5;            // bits 7,6,5,4,2,0
      16:      p[15:0] = 16'h002D;         // bits 5,3,2,0
      128:     p[7:0]  = 8'h87;            // bits 7,2,1,0
      default: p[1:0]  = 2'b11;
    endcase
    return p;
  endfunction

endpackage
