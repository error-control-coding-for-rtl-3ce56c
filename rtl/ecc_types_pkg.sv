// ecc_types_pkg: enumerated types shared by the coding blocks.
// dup_mode_e selects the variant of the duplication code in dup_codec.
package ecc_types_pkg;
  typedef enum logic [1:0] {
    DUP_PLAIN      = 2'd0,
    DUP_COMPLEMENT = 2'd1,
    DUP_SWAP       = 2'd2
  } dup_mode_e;
endpackage
