// tb_link_decoder: checks the decoder on every scheme. Payloads are encoded
// in the testbench with every inversion a scheme allows (the reference
// builds the control wires as the encoders do) and must come back intact;
// head flits and unencoded flits must pass unchanged, and the reported
// inversion must match the one applied.
module tb_link_decoder;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W = 32;

  scheme_e      scheme;
  logic         head;
  logic [W-1:0] link, data;
  inv_e         inv;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  link_decoder dut (.scheme, .head, .link, .data, .inv);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input scheme_e s, input logic h, input logic [W-1:0] w,
                           input logic [W-1:0] exp, input int exp_kind);
    scheme = s;
    head   = h;
    link   = w;
    #1;
    checks++;
    if (data != exp || int'(inv) != exp_kind) begin
      failures++;
      $display("FAIL scheme=%0d head=%0b link=%h data=%h inv=%0d exp=%h/%0d",
               s, h, w, data, inv, exp, exp_kind);
    end
  endtask

  initial begin
    logic [W-1:0] pay;
    word_t m;
    for (int n = 0; n < 2000; n++) begin
      // scheme I: 31 payload wires, odd or no inversion
      pay = $urandom;
      pay[W-1] = 1'b0;
      check_one(SCHEME_I, 1'b0, pay, pay, 0);
      m = mask_of(W, 1, 0);
      check_one(SCHEME_I, 1'b0, pay ^ m[W-1:0], pay, 1);
      // schemes II and III: 30 payload wires
      pay[W-2] = 1'b0;
      for (int k = 0; k < 4; k++) begin
        m = mask_of(W, k[0], k[1]);
        if (k != 2) check_one(SCHEME_II, 1'b0, pay ^ m[W-1:0], pay, k);
        check_one(SCHEME_III, 1'b0, pay ^ m[W-1:0], pay, k);
      end
      // head flits and unencoded links pass unchanged
      pay = $urandom;
      check_one(scheme_e'(1 + $urandom % 3), 1'b1, pay, pay, 0);
      check_one(SCHEME_NONE, 1'b0, pay, pay, 0);
    end
    // scheme I keeps wire W-2 as payload
    check_one(SCHEME_I, 1'b0, 32'h4000_0001, 32'h4000_0001, 0);
    check_one(SCHEME_I, 1'b0, 32'hC000_0001, 32'h6AAA_AAAB, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
