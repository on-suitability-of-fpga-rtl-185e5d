// vrc_fu: function unit of one VRC processing element.
//
// Purely combinational. Computes one of 13 8-bit functions of the operands X
// and Y, chosen by the 4-bit code `func` (see pe_func_e in vrc_pkg):
// shift left, invert, OR, XOR, sum shifted right by 2 or by 1, AND/OR with
// constant masks, minimum, maximum, shift right and sum. The list of functions
// and their codes follow the source document. Choices made here: the two
// "(X+Y) >> n" functions keep the carry of the 9-bit sum so that they average
// without overflow; X+Y wraps modulo 256; the unused codes 13..15 return X.
module vrc_fu
  import vrc_pkg::*;
(
  input  logic [FW-1:0] func,
  input  data_t         x,
  input  data_t         y,
  output data_t         z
);

  logic [DW:0] sum;  // 9-bit sum with carry
  assign sum = {1'b0, x} + {1'b0, y};

  always_comb begin
    unique case (func)
      F_SHL1:   z = {x[DW-2:0], 1'b0};
      F_NOT:    z = ~x;
      F_OR:     z = x | y;
      F_XOR:    z = x ^ y;
      F_AVG4:   z = data_t'(sum >> 2);
      F_AVG2:   z = data_t'(sum >> 1);
      F_AND_F0: z = x & 8'hF0;
      F_OR_F0:  z = x | 8'hF0;
      F_OR_0F:  z = x | 8'h0F;
      F_MIN:    z = (x < y) ? x : y;
      F_MAX:    z = (x > y) ? x : y;
      F_SHR1:   z = {1'b0, x[DW-1:1]};
      F_ADD:    z = sum[DW-1:0];
      default:  z = x;
    endcase
  end

endmodule
