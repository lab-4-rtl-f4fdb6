// cond_flags: the condition-flag register (three D flip-flops).
//
// The ALU is combinational; its neg, ovf and zro outputs (the 3-bit bus
// cf_in) are captured here on every rising clock edge, so q always holds the
// flags of the latest ALU operation and feeds the controller as cf. That
// the flags live in three clocked flip-flops outside the ALU follows the
// design. The active-low asynchronous reset, which clears all three flags,
// and the load-every-cycle behaviour (no enable) are this design's choices.
//
// Timing: q changes one clock edge after d.
module cond_flags
  import micro_pk::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cond_flags_t d,
  output cond_flags_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
