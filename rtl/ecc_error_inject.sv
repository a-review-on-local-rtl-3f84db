// ecc_error_inject: forced-error generator for ECC diagnostics.
//
// Sits between the encoder and the memory and XORs a mask into the codeword:
//   force_error = 00  normal operation, codeword unchanged
//   force_error = 01  one bit flipped
//   force_error = 10  two adjacent bits flipped
//   force_error = 11  three adjacent bits flipped
// The lowest flipped bit is held in a position register that steps by one
// (38 wraps to 0) on every rising clock edge while force_error is not 00, so
// successive writes walk the error through the codeword; adjacent bits wrap
// from 38 to 0 as well. Reset puts the position at 0. The mask depends only on
// force_error and the registered position, so it is stable for a whole cycle.
//
// The three modes and the bit flips at each rising edge follow the design;
// the meaning of 11 (three bits), the step order and the wrap are this
// design's choices.
//
// Ports: clk, rst, force_error[1:0], code_in[38:0] -> code_out[38:0],
// err_pos (current lowest flipped position, for observation).
module ecc_error_inject
  import ecc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  force_error,
  input  code_t       code_in,
  output code_t       code_out,
  output logic [5:0]  err_pos
);

  force_t     mode;
  logic [5:0] pos;
  code_t      mask;

  assign mode    = force_t'(force_error);
  assign err_pos = pos;

  function automatic logic [5:0] next_pos(input logic [5:0] p);
    return (p == 6'(CODE_W - 1)) ? 6'd0 : p + 6'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst)                     pos <= '0;
    else if (mode != FORCE_NONE) pos <= next_pos(pos);
  end

  always_comb begin
    mask = '0;
    unique case (mode)
      FORCE_NONE:   ;
      FORCE_SINGLE: mask[pos] = 1'b1;
      FORCE_DOUBLE: begin
        mask[pos]           = 1'b1;
        mask[next_pos(pos)] = 1'b1;
      end
      FORCE_TRIPLE: begin
        mask[pos]                     = 1'b1;
        mask[next_pos(pos)]           = 1'b1;
        mask[next_pos(next_pos(pos))] = 1'b1;
      end
    endcase
    code_out = code_in ^ mask;
  end

  assert property (@(posedge clk) disable iff (rst) pos < 6'(CODE_W))
    else $error("error position out of range");

endmodule
