// vedic_pkg: types shared by the RSA and ECC datapaths.
//
// mult_kind_e selects which Vedic multiplier a modular multiplier is built
// around: Urdhva-Tiryagbhyam (vertically and crosswise) or Nikhilam (base and
// deviation). field_e is the field-select encoding of the dual-field ECC
// processor; 1 selects the prime field, as the field-select line does in the
// 192-bit prime-field waveform this design follows, 0 the binary field.
package vedic_pkg;

  typedef enum logic {
    MULT_URDHVA   = 1'b0,
    MULT_NIKHILAM = 1'b1
  } mult_kind_e;

  typedef enum logic {
    FIELD_BINARY = 1'b0,
    FIELD_PRIME  = 1'b1
  } field_e;

  // Point operation requested from the ECC processor.
  typedef enum logic {
    EC_ADD = 1'b0,   // mixed addition: projective P plus affine Q
    EC_DBL = 1'b1    // doubling of projective P
  } ec_op_e;

endpackage
