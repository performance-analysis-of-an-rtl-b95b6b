// gray_enc_pkg -- types and constants shared by the coupling-aware link coding blocks.
//
// A link word is W bits wide: W-1 body-flit bits in [W-2:0] and one inversion bit in
// [W-1]. Before coding, bit W-1 holds a constant 0, so after an inversion that touches
// odd positions it reads 1 on the link. The inversion modes carry the two-bit code the
// scheme III decision block uses: odd '10', even '01', full '11', none '00'. Bit 1 of the
// code selects odd-position inversion and bit 0 even-position inversion, so the full
// inversion is simply both at once. The decision blocks weigh coupling transitions as
// Type I = 1, Type II = 2, Types III and IV = 0, a choice of this design.
package gray_enc_pkg;

  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_EVEN = 2'b01,
    INV_ODD  = 2'b10,
    INV_FULL = 2'b11
  } inv_mode_e;

  // Link word width of the reference configuration: 7 body bits and 1 inversion bit.
  localparam int unsigned LINK_W = 8;

endpackage
