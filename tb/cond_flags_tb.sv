// cond_flags_tb: self-checking testbench of the condition-flag register.
//
// Drives random flag values on d every clock cycle and checks that q shows,
// after each rising edge, the value d had just before it (one cycle of
// latency), that an asserted reset clears all three flags at once without
// a clock edge, and that each flag is seen both set and clear.
module cond_flags_tb;
  import micro_pk::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  cond_flags_t d, q, expected;
  int checks = 0, failures = 0;
  int set_seen[3], clr_seen[3];

  cond_flags dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input cond_flags_t want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%b want %b", what, q, want);
    end
  endtask

  initial begin
    d     = 3'b111;
    #1 rst_n = 1'b0;
    #1 check('0, "reset value");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      d = cond_flags_t'(3'($urandom));
      expected = d;
      @(posedge clk);
      #1 check(expected, "captured flags");
      for (int i = 0; i < 3; i++) begin
        set_seen[i] += q[i];
        clr_seen[i] += !q[i];
      end
      // d changing between edges must not reach q
      d = ~d;
      #2 check(expected, "held between edges");
      @(negedge clk);
    end
    // asynchronous reset in mid-cycle
    d = 3'b111;
    @(posedge clk);
    #1 check(3'b111, "all flags set");
    #2 rst_n = 1'b0;
    #1 check('0, "asynchronous clear");
    @(posedge clk);
    #1 check('0, "held in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++)
      if (set_seen[i] == 0 || clr_seen[i] == 0) begin
        failures++;
        $display("flag %0d not seen in both states", i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
