// p192_pkg: types and constants shared by the P-192 co-processor blocks.
//
// A field element of GF(p), p = 2^192 - 2^64 - 1 (NIST P-192), is kept in
// memory as 24 bytes, least significant byte at the lowest address, the same
// layout the 8051 software uses for its Fp type.
//
// The 192-bit multiplier understands twelve hardwired configurations, one per
// modular multiplication of the projective Edwards point addition
// (X3,Y3,Z3) = (X1,Y1,Z1) + (X2,Y2,Z2) with curve constant c = 1. The point
// addition works on eight scratch registers R1..R8 and the curve parameter d,
// stored as consecutive 24-byte slots from a base address:
//   slot 0 = d, slot k = Rk (k = 1..8)
// The twelve multiplications, in the order the point addition issues them:
//    0: R3 = R3*R6    4: R7 = R7*R3    8: R3 = R3*R3
//    1: R1 = R1*R4    5: R8 = R1*R2    9: R2 = R2*R3
//    2: R2 = R2*R5    6: R8 = d *R8   10: R3 = R3*R1
//    3: R7 = R7*R8    7: R2 = R2*R3   11: R1 = R1*R7
// The sequence and the register names follow the point-addition script of
// the design; the slot order and the base address are this design's choice.
package p192_pkg;

  localparam int unsigned FW     = 192;          // field element width
  localparam int unsigned NBYTES = FW / 8;       // bytes per element
  localparam int unsigned NCFG   = 12;           // hardwired configurations

  typedef logic [FW-1:0]   fp_t;                 // one field element
  typedef logic [2*FW-1:0] dfp_t;                // an unreduced product

  localparam fp_t P192 = {64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFE,
                          64'hFFFF_FFFF_FFFF_FFFF};

  // Memory slot of each operand (0 = d, k = Rk).
  typedef logic [3:0] slot_t;

  typedef struct packed {
    slot_t a;     // operand fetched and stored in the co-processor
    slot_t b;     // operand streamed byte by byte through the multiplier
    slot_t r;     // slot written back with the result
  } mm_cfg_t;

  function automatic mm_cfg_t mm_cfg(input logic [3:0] n);
    case (n)
      4'd0:    return '{a: 4'd3, b: 4'd6, r: 4'd3};
      4'd1:    return '{a: 4'd1, b: 4'd4, r: 4'd1};
      4'd2:    return '{a: 4'd2, b: 4'd5, r: 4'd2};
      4'd3:    return '{a: 4'd7, b: 4'd8, r: 4'd7};
      4'd4:    return '{a: 4'd7, b: 4'd3, r: 4'd7};
      4'd5:    return '{a: 4'd1, b: 4'd2, r: 4'd8};
      4'd6:    return '{a: 4'd0, b: 4'd8, r: 4'd8};
      4'd7:    return '{a: 4'd2, b: 4'd3, r: 4'd2};
      4'd8:    return '{a: 4'd3, b: 4'd3, r: 4'd3};
      4'd9:    return '{a: 4'd2, b: 4'd3, r: 4'd2};
      4'd10:   return '{a: 4'd3, b: 4'd1, r: 4'd3};
      default: return '{a: 4'd1, b: 4'd7, r: 4'd1};   // 11 (and unused codes)
    endcase
  endfunction

  // Command byte on the co-processor's parallel port.
  //   bit 7 rising: multiply, configuration in bits 3:0
  //   bit 6 rising: write the kept result to the last configuration's slot
  localparam int unsigned CMD_MUL = 7;
  localparam int unsigned CMD_WB  = 6;

endpackage
