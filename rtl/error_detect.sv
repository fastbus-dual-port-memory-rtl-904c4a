// error_detect: parity check of a word received on the AD lines, and the
// slave status it calls for (the Error Detect Logic of each port).
//
// Combinational. With checking enabled (CSR#2 bit 0) and a strobe for a
// received word, perr is set when AD plus PA hold an odd number of ones. The
// status code follows the document: SS=7 for a parity error in data space,
// SS=6 in CSR space; ss is SS_OK when there is no error. err_count is the
// pulse that advances the error counter (CSR#1). The parity convention (even)
// is this design's choice.
module error_detect
  import fb_pkg::*;
(
  input  logic        strobe,     // a received word is being used
  input  logic        check_en,   // CSR#2 bit 0
  input  logic        csr_space,  // the word is for CSR space
  input  logic [31:0] ad,
  input  logic        pa,
  output logic        perr,
  output logic        err_count,
  output logic [2:0]  ss
);

  always_comb begin
    perr      = strobe && check_en && (even_parity(ad) != pa);
    err_count = perr;
    if (!perr)          ss = SS_OK;
    else if (csr_space) ss = SS_CSR_PARITY;
    else                ss = SS_DATA_PARITY;
  end

endmodule
