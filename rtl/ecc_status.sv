// ecc_status: error status monitor and single-bit corrector.
//
// Takes the raw data and the syndrome gen from ecc_decoder. With ecc_en low the
// data passes through unchanged and ind is 00. With ecc_en high:
//   gen == 0                        -> ind 00, data unchanged
//   gen[0] == 1, gen[6:1] == 0      -> ind 01, CB6 itself was hit, data unchanged
//   gen[0] == 1, gen[6:1] == data position p
//                                   -> ind 01, the data bit at position p is flipped back
//   gen[0] == 0, gen[6:1] != 0      -> ind 10, two-bit error, data passed uncorrected
//   gen[0] == 1, gen[6:1] a check-bit position or above 38
//                                   -> ind 11, invalid syndrome, data uncorrected
// CB6 covers only the data bits, so a single flipped CB0..CB5 bit gives the
// same syndrome shape as a two-bit error; this block then reports 10 (the data
// itself is intact). Choosing 10 over 01 there keeps a two-bit data error from
// ever being reported as corrected. The 00/01/10/11 encoding of ind follows the
// design; the treatment of odd syndromes and check-bit hits is this design's choice.
//
// Ports: sts_in[31:0], gen[6:0], ecc_en -> sts_out[31:0], ind[1:0]. Combinational.
module ecc_status
  import ecc_pkg::*;
(
  input  data_t      sts_in,
  input  check_t     gen,
  input  logic       ecc_en,
  output data_t      sts_out,
  output logic [1:0] ind
);

  logic [CHECK_W-2:0] syn;
  data_t              mask;
  ind_t               st;

  always_comb begin
    syn  = gen[CHECK_W-1:1];
    mask = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      if (data_pos(i) == int'(syn)) mask[i] = 1'b1;

    if (!ecc_en || gen == '0) begin
      st   = IND_NONE;
      mask = '0;
    end else if (!gen[0]) begin
      st   = IND_DOUBLE;
      mask = '0;
    end else if (syn == '0 || mask != '0) begin
      st   = IND_SINGLE;
    end else begin
      st   = IND_INVALID;
      mask = '0;
    end
    sts_out = sts_in ^ mask;
    ind     = st;
  end

endmodule
