// alu_datapath: the ALU of the microprocessor with its condition-flag
// register, the part of the CPU datapath built here.
//
// a and b are the two ALU operand ports (alu_porta, alu_portb), which in the
// full CPU come from the register file, the accumulator or the data bus
// through multiplexers; here they are inputs. The ALU (combinational) drives
// result, which in the CPU goes to the accumulator, and the three flags
// cf_in, which the cond_flags register stores on each rising clock edge and
// presents as cf to the controller. Operation codes are micro_pk::alu_op_e.
//
// Timing: result and cf_in follow the inputs in the same cycle; cf holds
// the flags of the operation present at the last rising edge of clk.
module alu_datapath
  import micro_pk::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned CNT_W = SHCNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [CNT_W-1:0] shift_cnt,
  input  logic             shift_cnt_src,
  input  alu_op_e          sel,
  output logic [WIDTH-1:0] result,
  output cond_flags_t      cf_in,
  output cond_flags_t      cf
);

  alu #(.WIDTH(WIDTH), .CNT_W(CNT_W)) u_alu (
    .a            (a),
    .b            (b),
    .shift_cnt    (shift_cnt),
    .shift_cnt_src(shift_cnt_src),
    .sel          (sel),
    .result       (result),
    .flags        (cf_in)
  );

  cond_flags u_cf (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (cf_in),
    .q    (cf)
  );

endmodule
