// micro_pk: types and constants shared by the ALU, its condition-flag
// register and the datapath top.
//
// alu_op_e lists every ALU function in the order the design names them:
// ADD, SUB, MULT, DIV, REM, AND, OR, XOR, INV, INC, DEC, ZRO, PASS_A, PASS_B,
// SHR_ARTH, SHR_LGC, SHL_ARTH, SHL_LGC, ROTR, ROTL. The names come from the
// design; the binary codes (list order, 5 bits) are this design's choice.
// DIV_OP and REM_OP keep their codes so that an instruction decoder can use
// the full set, but the ALU does not implement them (it returns zero).
//
// cond_flags_t packs the three condition flags as the 3-bit bus cf_in(2:0):
// neg in bit 2, ovf in bit 1, zro in bit 0 (bit order is this design's
// choice, following the neg/ovf/zro order in which the flags are listed).
package micro_pk;

  // Data word width: the shift and rotate diagrams of the design are drawn
  // on 16-bit words.
  localparam int unsigned DATA_W = 16;

  // Width of the shift/rotate count: the count taken from B is the slice
  // B[5:0].
  localparam int unsigned SHCNT_W = 6;

  typedef enum logic [4:0] {
    ADD_OP   = 5'd0,
    SUB_OP   = 5'd1,
    MULT_OP  = 5'd2,
    DIV_OP   = 5'd3,
    REM_OP   = 5'd4,
    AND_OP   = 5'd5,
    OR_OP    = 5'd6,
    XOR_OP   = 5'd7,
    INV_OP   = 5'd8,
    INC_OP   = 5'd9,
    DEC_OP   = 5'd10,
    ZRO_OP   = 5'd11,
    PASS_A   = 5'd12,
    PASS_B   = 5'd13,
    SHR_ARTH = 5'd14,
    SHR_LGC  = 5'd15,
    SHL_ARTH = 5'd16,
    SHL_LGC  = 5'd17,
    ROTR     = 5'd18,
    ROTL     = 5'd19
  } alu_op_e;

  typedef struct packed {
    logic neg;  // result is negative (sign bit set)
    logic ovf;  // signed result did not fit in the word
    logic zro;  // result is all zeros
  } cond_flags_t;

endpackage
