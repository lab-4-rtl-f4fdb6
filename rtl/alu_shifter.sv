// alu_shifter: the shift and rotate unit of the ALU (combinational).
//
// Six operations on a WIDTH-bit word a, by a count cnt of CNT_W bits:
//   SHR_ARTH  arithmetic right: bits fall off the right, the sign bit is
//             copied into the vacated positions on the left.
//   SHL_ARTH  arithmetic left: the sign bit stays in place, bits below it
//             move left, bits pushed past the sign position are lost and
//             zeros enter on the right.
//   SHR_LGC   logic right: zeros enter on the left.
//   SHL_LGC   logic left: zeros enter on the right.
//   ROTR/ROTL rotate: bits leaving one end re-enter at the other.
// These follow the design's bit diagrams. Counts of WIDTH or more are this
// design's choice: the shifts then lose every bit (all sign bits for
// SHR_ARTH), and the rotates turn by cnt modulo WIDTH.
//
// shl_ovf is set for SHL_ARTH when the shifted value no longer equals
// a * 2**cnt as a signed number, i.e. when a bit that differs from the sign
// was pushed out. It is 0 for every other operation (this design's choice).
module alu_shifter
  import micro_pk::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned CNT_W = SHCNT_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [CNT_W-1:0] cnt,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y,
  output logic             shl_ovf
);

  logic [WIDTH-1:0]   shl_plain;
  int unsigned        rot;

  always_comb begin
    rot       = 32'(cnt) % WIDTH;
    shl_plain = a << cnt;
    shl_ovf   = 1'b0;
    unique case (op)
      SHR_ARTH: y = WIDTH'($signed(a) >>> cnt);
      SHR_LGC:  y = a >> cnt;
      SHL_LGC:  y = shl_plain;
      SHL_ARTH: begin
        y       = {a[WIDTH-1], shl_plain[WIDTH-2:0]};
        shl_ovf = WIDTH'($signed(shl_plain) >>> cnt) != a;
      end
      // a shift by WIDTH yields zero, so rot == 0 passes a unchanged
      ROTR:     y = (a >> rot) | (a << (WIDTH - rot));
      ROTL:     y = (a << rot) | (a >> (WIDTH - rot));
      default:  y = '0;
    endcase
  end

endmodule
