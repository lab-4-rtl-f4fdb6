// alu_datapath_tb: end-to-end testbench of the ALU with its flag register,
// at the default parameters (16-bit word, 6-bit shift count).
//
// Each clock cycle applies one operation with random operands and count
// source. The combinational result and cf_in are checked in that cycle
// against alu_ref_pkg::alu_ref(); cf is checked one rising edge later
// against the flags of the operation that was present at that edge. A
// reset in mid-run must clear cf. The run counts how often each mechanism
// happens and fails if one never does: every operation, a signed overflow
// from each of ADD, SUB, MULT, INC, DEC and SHL_ARTH, a negative and a zero
// result, the count taken from b and from shift_cnt, a count of a word or
// more, and a reset that clears stored flags.
module alu_datapath_tb;
  import micro_pk::*;
  import alu_ref_pkg::*;

  localparam int W = DATA_W;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [W-1:0]  a, b, result;
  logic [SHCNT_W-1:0] shift_cnt;
  logic          shift_cnt_src;
  alu_op_e       sel;
  cond_flags_t   cf_in, cf, prev_flags;

  int checks = 0, failures = 0;
  int op_seen[20], ovf_by_op[20];
  int neg_seen = 0, zro_seen = 0, src_b = 0, src_cnt = 0, big_cnt = 0;
  int reset_clears = 0;

  alu_datapath dut (
    .clk, .rst_n, .a, .b, .shift_cnt, .shift_cnt_src, .sel,
    .result, .cf_in, .cf
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random operands, biased towards values that overflow or give zero.
  function automatic logic [W-1:0] pick();
    case ($urandom_range(5))
      0: return {1'b0, {(W-1){1'b1}}};
      1: return {1'b1, {(W-1){1'b0}}};
      2: return W'($urandom_range(3));
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    logic [63:0] er;
    cond_flags_t ef;
    int          c;
    rst_n = 1'b0;
    a = '0; b = '0; shift_cnt = '0; shift_cnt_src = 1'b0; sel = ZRO_OP;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_flags = '0;
    for (int n = 0; n < 50000; n++) begin
      sel           = alu_op_e'($urandom_range(19));
      a             = pick();
      b             = pick();
      shift_cnt     = SHCNT_W'($urandom);
      shift_cnt_src = 1'($urandom);
      #1;
      // the stored flags belong to the previous operation
      checks++;
      if (cf !== prev_flags) begin
        failures++;
        $display("FAIL cycle %0d: cf=%b want %b", n, cf, prev_flags);
      end
      c = shift_cnt_src ? int'(b[SHCNT_W-1:0]) : int'(shift_cnt);
      alu_ref(W, sel, 64'(a), 64'(b), c, er, ef);
      checks++;
      if (result !== er[W-1:0] || cf_in !== ef) begin
        failures++;
        $display("FAIL cycle %0d op=%s a=%h b=%h cnt=%0d: got %h %b want %h %b",
                 n, sel.name(), a, b, c, result, cf_in, er[W-1:0], ef);
      end
      op_seen[sel]++;
      ovf_by_op[sel] += ef.ovf;
      neg_seen += ef.neg;
      zro_seen += ef.zro;
      if (sel inside {SHR_ARTH, SHR_LGC, SHL_ARTH, SHL_LGC, ROTR, ROTL}) begin
        if (shift_cnt_src) src_b++; else src_cnt++;
        if (c >= W) big_cnt++;
      end
      prev_flags = ef;
      @(negedge clk);
      // occasionally pulse reset while flags are stored
      if (n % 5000 == 4999 && cf != '0) begin
        rst_n = 1'b0;
        #1;
        checks++;
        if (cf !== '0) begin
          failures++;
          $display("FAIL reset did not clear cf=%b", cf);
        end else reset_clears++;
        @(negedge clk) rst_n = 1'b1;
        prev_flags = '0;
      end
    end
    foreach (op_seen[i])
      if (op_seen[i] == 0) begin
        failures++;
        $display("operation %s never ran", alu_op_e'(i));
      end
    foreach (ovf_by_op[i])
      if (alu_op_e'(i) inside {ADD_OP, SUB_OP, MULT_OP, INC_OP, DEC_OP, SHL_ARTH}
          && ovf_by_op[i] == 0) begin
        failures++;
        $display("no overflow from %s", alu_op_e'(i));
      end
    if (neg_seen == 0 || zro_seen == 0 || src_b == 0 || src_cnt == 0 ||
        big_cnt == 0 || reset_clears == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("ovf ADD=%0d SUB=%0d MULT=%0d INC=%0d DEC=%0d SHL_ARTH=%0d",
             ovf_by_op[ADD_OP], ovf_by_op[SUB_OP], ovf_by_op[MULT_OP],
             ovf_by_op[INC_OP], ovf_by_op[DEC_OP], ovf_by_op[SHL_ARTH]);
    $display("neg=%0d zro=%0d count_from_b=%0d count_from_input=%0d count>=W=%0d resets=%0d",
             neg_seen, zro_seen, src_b, src_cnt, big_cnt, reset_clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
