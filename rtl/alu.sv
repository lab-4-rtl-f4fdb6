// alu: the arithmetic and logic unit of the microprocessor datapath.
//
// Purely combinational: no storage. sel chooses one function of the left
// operand a and right operand b; result carries the answer and flags the
// three condition flags, which are stored outside the ALU (cond_flags).
//
//   ADD_OP a+b      SUB_OP a-b      MULT_OP a*b (low WIDTH bits, signed)
//   AND_OP a&b      OR_OP  a|b      XOR_OP  a^b      INV_OP ~a
//   INC_OP a+1      DEC_OP a-1      ZRO_OP  0
//   PASS_A a        PASS_B b
//   SHR_ARTH, SHR_LGC, SHL_ARTH, SHL_LGC, ROTR, ROTL by a count (alu_shifter)
//   DIV_OP, REM_OP  not implemented: result 0
//
// The shift/rotate count is b[CNT_W-1:0] when shift_cnt_src is 1, otherwise
// the shift_cnt input (as the design specifies, with CNT_W = 6).
//
// Flags: neg is the sign bit of result and zro is set when result is zero,
// for every function. ovf is set when the signed answer of ADD, SUB, MULT,
// INC, DEC or SHL_ARTH does not fit in WIDTH bits, and is 0 otherwise. The
// design names the flags but not the rule for each function; these rules
// and the two's-complement reading of the operands are this design's
// choices.
module alu
  import micro_pk::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned CNT_W = SHCNT_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [CNT_W-1:0] shift_cnt,
  input  logic             shift_cnt_src,
  input  alu_op_e          sel,
  output logic [WIDTH-1:0] result,
  output cond_flags_t      flags
);

  // The count slice is taken from b, so b must be at least CNT_W bits wide.
  if (WIDTH < CNT_W || WIDTH < 2) begin : g_bad_width
    $error("alu: WIDTH must be at least CNT_W and at least 2");
  end

  logic [CNT_W-1:0]   cnt;
  logic [WIDTH-1:0]   sh_y;
  logic               sh_ovf;
  logic [WIDTH:0]     sum_ext;     // a +/- b, one sign bit extra
  logic [2*WIDTH-1:0] prod;        // full signed product
  logic               ovf;

  assign cnt = shift_cnt_src ? b[CNT_W-1:0] : shift_cnt;

  alu_shifter #(.WIDTH(WIDTH), .CNT_W(CNT_W)) u_shifter (
    .a      (a),
    .cnt    (cnt),
    .op     (sel),
    .y      (sh_y),
    .shl_ovf(sh_ovf)
  );

  always_comb begin
    sum_ext = '0;
    prod    = '0;
    ovf     = 1'b0;
    result  = '0;
    unique case (sel)
      ADD_OP: begin
        sum_ext = {a[WIDTH-1], a} + {b[WIDTH-1], b};
        result  = sum_ext[WIDTH-1:0];
        ovf     = sum_ext[WIDTH] != sum_ext[WIDTH-1];
      end
      SUB_OP: begin
        sum_ext = {a[WIDTH-1], a} - {b[WIDTH-1], b};
        result  = sum_ext[WIDTH-1:0];
        ovf     = sum_ext[WIDTH] != sum_ext[WIDTH-1];
      end
      MULT_OP: begin
        prod   = (2*WIDTH)'($signed({{WIDTH{a[WIDTH-1]}}, a}) *
                            $signed({{WIDTH{b[WIDTH-1]}}, b}));
        result = prod[WIDTH-1:0];
        // fits when the upper half is all copies of the result's sign bit
        ovf    = !((&prod[2*WIDTH-1:WIDTH-1]) || !(|prod[2*WIDTH-1:WIDTH-1]));
      end
      INC_OP: begin
        result = a + 1'b1;
        ovf    = a == {1'b0, {(WIDTH-1){1'b1}}};   // most positive value
      end
      DEC_OP: begin
        result = a - 1'b1;
        ovf    = a == {1'b1, {(WIDTH-1){1'b0}}};   // most negative value
      end
      AND_OP: result = a & b;
      OR_OP:  result = a | b;
      XOR_OP: result = a ^ b;
      INV_OP: result = ~a;
      ZRO_OP: result = '0;
      PASS_A: result = a;
      PASS_B: result = b;
      SHR_ARTH, SHR_LGC, SHL_ARTH, SHL_LGC, ROTR, ROTL: begin
        result = sh_y;
        ovf    = sh_ovf;
      end
      DIV_OP, REM_OP: result = '0;
      default:        result = '0;
    endcase
  end

  assign flags.neg = result[WIDTH-1];
  assign flags.ovf = ovf;
  assign flags.zro = result == '0;

endmodule
