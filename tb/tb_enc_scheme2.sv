// tb_enc_scheme2: checks the scheme 2 encoding logic at the default
// 32-wire width. For every vector the reference model tries all inversions
// the scheme allows and applies its decision rule; the testbench compares
// the encoded word, the reported inversion and its coupling cost, checks
// that undoing the inversion returns the payload, and that the chosen cost
// never exceeds the cost of sending the flit as is. Each inversion the
// scheme offers must be chosen at least once.
module tb_enc_scheme2;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned CW = $clog2(2 * W + 1);
  localparam int unsigned PW = 30;  // payload wires

  logic [W-1:0]  prev, data, enc;
  inv_e          inv;
  logic [CW-1:0] cost;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  enc_scheme2 dut (.prev, .data, .enc, .inv, .cost);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input logic [W-1:0] p, input logic [W-1:0] d);
    word_t exp;
    word_t dec;
    int kind;
    logic [W-1:0] payload;
    payload = d & ((W'(1) << PW) - 1);
    prev = p;
    data = d;
    #1;
    exp = ref_encode(W, 2, word_t'(p), word_t'(d), kind);
    checks++;
    if (enc != exp[W-1:0] || int'(inv) != kind ||
        int'(cost) != ref_cost(W, word_t'(p), exp)) begin
      failures++;
      $display("FAIL prev=%h data=%h enc=%h inv=%0d cost=%0d exp=%h kind=%0d",
               p, d, enc, inv, cost, exp[W-1:0], kind);
    end
    // undo the inversion from the control wires alone
    dec = word_t'(enc) ^ mask_of(W, enc[W-1], (2 != 1) && enc[W-2]);
    checks++;
    if (dec[W-1:0] != payload) begin
      failures++;
      $display("FAIL round trip data=%h enc=%h", d, enc);
    end
    checks++;
    if (int'(cost) > ref_cost(W, word_t'(p), word_t'(payload))) begin
      failures++;
      $display("FAIL cost above plain transmission");
    end
    seen[int'(inv)]++;
  endtask

  initial begin
    logic [W-1:0] p;
    // directed: alternating payload after zero favours odd inversion
    check_vec('0, 32'h5555_5555);
    // Type II everywhere: the full inversion (scheme II/III) removes it
    check_vec(32'h5555_5555, 32'hAAAA_AAAA);
    check_vec(32'h1555_5555, 32'h2AAA_AAAA);
    // a few switching wires in the even positions favour even inversion
    check_vec(32'h0000_0000, 32'h0000_0AAA);
    check_vec(32'h0000_0000, 32'h0000_0555);
    // quiet link, same data: no inversion
    check_vec(32'h0123_4567, 32'h0123_4567);
    for (int n = 0; n < 3000; n++) check_vec($urandom, $urandom);
    for (int n = 0; n < 1000; n++) begin
      p = $urandom;
      check_vec(p, p ^ $urandom ^ $urandom);
    end
    foreach (seen[k]) begin
      if (k == 0 || k == 1 || k == 3 ||  1'b0) begin
        checks++;
        if (seen[k] == 0) begin
          failures++;
          $display("FAIL inversion kind %0d never chosen", k);
        end
      end else begin
        checks++;
        if (seen[k] != 0) begin
          failures++;
          $display("FAIL inversion kind %0d not allowed by this scheme", k);
        end
      end
    end
    $display("inversions chosen: none=%0d odd=%0d even=%0d full=%0d",
             seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
