// tb_bip_generator: checks the BIP register against a direct evaluation of
// BIP_m = XOR of u_hat_k over k mod n = m.
//
// Two instances run on the same decision stream: n = 16 (the default) and
// n = 5, where the pass lengths are not multiples of n and the register is
// rotated. After L decisions of a pass, register stage p must hold
// BIP_((p + L) mod n). Passes of random length follow each other either
// back to back (first_bit on the cycle right after the last decision) or
// with idle cycles, and bit_valid has random gaps. The register is checked
// after every clock edge.
module tb_bip_generator;

  localparam int NA = 16;
  localparam int NB = 5;

  int checks = 0, failures = 0;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          bit_valid = 1'b0, first_bit = 1'b0, u_hat = 1'b0;
  logic [NA-1:0] bip_a;
  logic [NB-1:0] bip_b;

  bip_generator dut_a (.clk, .rst_n, .bit_valid, .first_bit, .u_hat, .bip(bip_a));
  bip_generator #(.BIP_N(NB)) dut_b (.clk, .rst_n, .bit_valid, .first_bit, .u_hat, .bip(bip_b));

  always #5 clk = ~clk;

  // Reference: parity per residue class and the number of decisions so far.
  bit [NA-1:0] par_a;
  bit [NB-1:0] par_b;
  int          taken;
  int          gaps = 0, back_to_back = 0;

  function automatic bit [NA-1:0] expect_a(bit [NA-1:0] par, int len);
    bit [NA-1:0] r;
    for (int p = 0; p < NA; p++) r[p] = par[(p + len) % NA];
    return r;
  endfunction

  function automatic bit [NB-1:0] expect_b(bit [NB-1:0] par, int len);
    bit [NB-1:0] r;
    for (int p = 0; p < NB; p++) r[p] = par[(p + len) % NB];
    return r;
  endfunction

  task automatic check_regs();
    checks += 2;
    if (bip_a !== expect_a(par_a, taken)) begin
      failures++;
      $display("FAIL n=16 after %0d decisions: got %h expected %h", taken, bip_a, expect_a(par_a, taken));
    end
    if (bip_b !== expect_b(par_b, taken)) begin
      failures++;
      $display("FAIL n=5 after %0d decisions: got %h expected %h", taken, bip_b, expect_b(par_b, taken));
    end
  endtask

  // One clock cycle with the given inputs; updates the reference model.
  task automatic cycle(input bit v, input bit first, input bit u);
    bit_valid = v;
    first_bit = first;
    u_hat     = u;
    @(posedge clk);
    #1;
    if (v) begin
      if (first) begin
        par_a = '0;
        par_b = '0;
        taken = 0;
      end
      par_a[taken % NA] ^= u;
      par_b[taken % NB] ^= u;
      taken++;
    end
    check_regs();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    par_a = '0;
    par_b = '0;
    taken = 0;
    repeat (2) @(posedge clk);
    #1;
    check_regs();            // reset value is all zero
    rst_n = 1'b1;
    for (int pass = 0; pass < 60; pass++) begin
      int len;
      len = 1 + int'($urandom_range(0, 99));
      if (pass % 10 == 0) len = 640;
      for (int k = 0; k < len; k++) begin
        while ($urandom_range(0, 3) == 0) begin
          cycle(1'b0, k == 0, 1'(~u_hat));   // idle: nothing may change
          gaps++;
        end
        cycle(1'b1, k == 0, 1'($urandom));
      end
      if ($urandom_range(0, 1) == 0) back_to_back++;
      else repeat (2) cycle(1'b0, 1'b0, 1'($urandom));
    end
    // A pass of all ones: every class holds the parity of its count.
    for (int k = 0; k < 37; k++) cycle(1'b1, k == 0, 1'b1);
    checks++;
    if (gaps == 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL coverage: gaps=%0d back_to_back=%0d", gaps, back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
