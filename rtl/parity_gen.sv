// parity_gen: parity for data the module sends on the AD lines (the PAR
// blocks of each port).
//
// Combinational. When enabled (CSR#2 bit 1, "parity generate") pa is the
// even parity of ad: AD plus PA then hold an even number of ones. When
// disabled the module drives PA low. Even parity and the low level when
// disabled are this design's choices; the document only says that the module
// generates parity and that generation can be switched off in CSR#2.
module parity_gen
  import fb_pkg::*;
(
  input  logic [31:0] ad,
  input  logic        enable,
  output logic        pa
);

  always_comb pa = enable && even_parity(ad);

endmodule
