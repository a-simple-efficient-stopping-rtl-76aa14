// tb_bip_history: random load/compare sequence against a reference register.
//
// Each cycle a random BIP is offered, sometimes equal to the stored value;
// match must equal (bip_in == stored) before the edge, and a load must make
// the offered value the stored one after the edge. Reset must clear the
// memory.
module tb_bip_history;

  localparam int N = 16;

  int checks = 0, failures = 0;
  int n_equal = 0, loads = 0;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] bip_in = '0, bip_prev;
  logic         match;
  bit   [N-1:0] model;

  bip_history dut (.clk, .rst_n, .load, .bip_in, .bip_prev, .match);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%h prev=%h model=%h match=%0b", what, bip_in, bip_prev, model, match);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    check(bip_prev === '0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      load   = 1'($urandom_range(0, 2) != 0);
      case ($urandom_range(0, 3))
        0:       bip_in = model;                              // equal
        1:       bip_in = model ^ (N'(1) << $urandom_range(0, N - 1)); // one bit off
        default: bip_in = N'($urandom);
      endcase
      #1;
      check(match === (bip_in == model), "match");
      check(bip_prev === model, "stored value");
      if (bip_in == model) n_equal++;
      @(posedge clk);
      #1;
      if (load) begin
        model = bip_in;
        loads++;
      end
      check(bip_prev === model, "after edge");
    end
    check(n_equal > 100 && loads > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
