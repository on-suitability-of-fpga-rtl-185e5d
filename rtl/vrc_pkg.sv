// vrc_pkg: shared constants, types and helper functions of the evolvable
// hardware system built around a virtual reconfigurable circuit (VRC).
//
// Geometry: 24 processing elements (PEs) in 6 columns of 4, followed by one
// output PE (25 PEs in all), three 8-bit circuit inputs (the three sensors)
// and one 8-bit output. PEs are numbered 0..24 column by column; PE 24 is the
// output PE.
//
// Configuration word of one PE, least significant field first:
//   sel1 (input X source), sel2 (input Y source), func (4-bit function code).
// PEs of the first column choose among the three circuit inputs and a zero
// constant, so their selects are 2 bits wide (8-bit word). All other PEs choose
// among 8 sources, so their selects are 3 bits wide (10-bit word).
// The chromosome is the concatenation of the 25 words, PE 0 in the lowest bits:
// 4*8 + 21*10 = 242 bits.
//
// The 25-PE array, the 13 functions, the 8/10-bit PE words and the 8-source
// limit follow the source document; the source lists, the order of fields and
// the 8-bit data width read from its transistor-level figures are choices
// made here.
package vrc_pkg;

  localparam int unsigned DW       = 8;   // data width of every PE port
  localparam int unsigned NIN      = 3;   // circuit inputs (sensors)
  localparam int unsigned ROWS     = 4;   // PEs per column
  localparam int unsigned COLS     = 6;   // columns of the main array
  localparam int unsigned NPE      = ROWS * COLS + 1;  // 25, incl. output PE
  localparam int unsigned FW       = 4;   // function code width
  localparam int unsigned SW0      = 2;   // select width, first column
  localparam int unsigned SW       = 3;   // select width, other PEs
  localparam int unsigned W0       = 2 * SW0 + FW;     // 8 bits
  localparam int unsigned W1       = 2 * SW + FW;      // 10 bits
  localparam int unsigned CFG_BITS = ROWS * W0 + (NPE - ROWS) * W1;  // 242
  // Register stages from a circuit input to the output: one per column plus
  // the output PE.
  localparam int unsigned LATENCY  = COLS + 1;

  typedef logic [DW-1:0] data_t;

  // Table of PE functions. Codes 13..15 are unused and behave as F_PASS_X.
  typedef enum logic [FW-1:0] {
    F_SHL1    = 4'd0,   // X << 1
    F_NOT     = 4'd1,   // ~X
    F_OR      = 4'd2,   // X | Y
    F_XOR     = 4'd3,   // X ^ Y
    F_AVG4    = 4'd4,   // (X + Y) >> 2
    F_AVG2    = 4'd5,   // (X + Y) >> 1
    F_AND_F0  = 4'd6,   // X & 8'hF0
    F_OR_F0   = 4'd7,   // X | 8'hF0
    F_OR_0F   = 4'd8,   // X | 8'h0F
    F_MIN     = 4'd9,   // min(X, Y)
    F_MAX     = 4'd10,  // max(X, Y)
    F_SHR1    = 4'd11,  // X >> 1
    F_ADD     = 4'd12,  // X + Y (modulo 256)
    F_PASS_X  = 4'd13   // unused codes 13..15: X unchanged
  } pe_func_e;

  // One training sample: three sensor readings and the wanted output.
  typedef struct packed {
    data_t target;
    data_t in3;
    data_t in2;
    data_t in1;
  } sample_t;

  typedef logic [CFG_BITS-1:0] chrom_t;

  // Bit offset of PE p's word in the chromosome.
  function automatic int unsigned cfg_offset(int unsigned p);
    return (p < ROWS) ? p * W0 : ROWS * W0 + (p - ROWS) * W1;
  endfunction

  // Width of PE p's word.
  function automatic int unsigned cfg_width(int unsigned p);
    return (p < ROWS) ? W0 : W1;
  endfunction

endpackage
