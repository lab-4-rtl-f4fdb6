// alu_tb: self-checking testbench of the combinational ALU.
//
// Two instances are tested: one at the default 16-bit word and one at an
// 8-bit word, to exercise the width parameter. Each is driven with directed
// corner cases (extreme operands, shift counts 0, w-1, w and 63, both count
// sources) for every operation, then with random operands, operations and
// counts. result and flags are compared with alu_ref_pkg::alu_ref(). Every
// operation and the ovf, neg and zro flags must be seen at least once.
module alu_tb;
  import micro_pk::*;
  import alu_ref_pkg::*;

  localparam int W1 = 16;
  localparam int W2 = 8;

  logic [W1-1:0] a1, b1, r1;
  logic [W2-1:0] a2, b2, r2;
  logic [5:0]    cnt;
  logic          src;
  alu_op_e       sel;
  cond_flags_t   f1, f2;

  int checks = 0, failures = 0;
  int op_seen[20];
  int ovf_seen = 0, neg_seen = 0, zro_seen = 0;

  alu dut16 (.a(a1), .b(b1), .shift_cnt(cnt), .shift_cnt_src(src), .sel(sel),
             .result(r1), .flags(f1));
  alu #(.WIDTH(W2)) dut8 (.a(a2), .b(b2), .shift_cnt(cnt), .shift_cnt_src(src),
                          .sel(sel), .result(r2), .flags(f2));

  task automatic check_one();
    logic [63:0] er;
    cond_flags_t ef;
    int          c1, c2;
    #1;
    c1 = src ? int'(b1[5:0]) : int'(cnt);
    c2 = src ? int'(b2[5:0]) : int'(cnt);
    alu_ref(W1, sel, 64'(a1), 64'(b1), c1, er, ef);
    checks++;
    if (r1 !== er[W1-1:0] || f1 !== ef) begin
      failures++;
      $display("FAIL w=16 op=%s a=%h b=%h cnt=%0d: got %h %b, want %h %b",
               sel.name(), a1, b1, c1, r1, f1, er[W1-1:0], ef);
    end
    op_seen[sel]++;
    ovf_seen += f1.ovf; neg_seen += f1.neg; zro_seen += f1.zro;
    alu_ref(W2, sel, 64'(a2), 64'(b2), c2, er, ef);
    checks++;
    if (r2 !== er[W2-1:0] || f2 !== ef) begin
      failures++;
      $display("FAIL w=8 op=%s a=%h b=%h cnt=%0d: got %h %b, want %h %b",
               sel.name(), a2, b2, c2, r2, f2, er[W2-1:0], ef);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner[8];
    int          cnts[6];
    corner = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h8001,
               16'h00FF, 16'hA5C3};
    cnts   = '{0, 1, 7, 15, 16, 63};
    // directed: every op x corner operands x counts, count from shift_cnt
    for (int op = 0; op < 20; op++)
      foreach (corner[i])
        foreach (corner[j])
          foreach (cnts[k]) begin
            sel = alu_op_e'(op);
            a1 = corner[i]; b1 = corner[j];
            a2 = corner[i][7:0] ^ corner[i][15:8]; b2 = corner[j][15:8];
            cnt = 6'(cnts[k]); src = 1'b0;
            check_one();
            // same case with the count taken from b[5:0]
            src = 1'b1; b1[5:0] = 6'(cnts[k]); b2[5:0] = 6'(cnts[k]);
            check_one();
          end
    // random
    for (int n = 0; n < 20000; n++) begin
      sel = alu_op_e'($urandom_range(19));
      a1 = 16'($urandom); b1 = 16'($urandom);
      a2 = 8'($urandom);  b2 = 8'($urandom);
      cnt = 6'($urandom); src = 1'($urandom);
      check_one();
    end
    foreach (op_seen[i])
      if (op_seen[i] == 0) begin
        failures++;
        $display("operation %0d never exercised", i);
      end
    if (ovf_seen == 0 || neg_seen == 0 || zro_seen == 0) begin
      failures++;
      $display("a flag was never set");
    end
    $display("flags set: ovf=%0d neg=%0d zro=%0d", ovf_seen, neg_seen, zro_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
