// tb_hard_decision: exhaustive check of the slicer.
//
// Every 8-bit LLR value is applied with llr_valid both low and high. The
// expected bit is worked out from the value read as a signed integer
// (decide 1 only for a strictly positive LLR); bit_valid must follow
// llr_valid. A 4-bit instance is checked the same way.
module tb_hard_decision;

  int checks = 0, failures = 0;

  logic              v8, bv8, u8;
  logic signed [7:0] l8;
  logic              v4, bv4, u4;
  logic signed [3:0] l4;

  hard_decision dut8 (.llr_valid(v8), .llr(l8), .bit_valid(bv8), .u_hat(u8));
  hard_decision #(.LLR_W(4)) dut4 (.llr_valid(v4), .llr(l4), .bit_valid(bv4), .u_hat(u4));

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int v = 0; v < 2; v++) begin
        int value;
        value = (i >= 128) ? i - 256 : i;
        v8 = v[0];
        l8 = 8'(i);
        #1;
        check(u8, value > 0, $sformatf("8-bit u_hat for %0d", value));
        check(bv8, v[0], "8-bit bit_valid");
      end
    end
    for (int i = 0; i < 16; i++) begin
      int value;
      value = (i >= 8) ? i - 16 : i;
      v4 = 1'b1;
      l4 = 4'(i);
      #1;
      check(u4, value > 0, $sformatf("4-bit u_hat for %0d", value));
      check(bv4, 1'b1, "4-bit bit_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
