// tb_coupling_cost: checks the transition-type counter at the default
// 32-wire width against counts derived from signed wire changes, on
// directed pair patterns and on random word pairs.
module tb_coupling_cost;
  import tb_ref_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned CW = $clog2(2 * W + 1);

  logic [W-1:0]  prev, cur;
  logic [CW-1:0] t1, t2, t3, t4, t01, cost;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  coupling_cost dut (.prev, .cur, .t1, .t2, .t3, .t4, .t01, .cost);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input logic [W-1:0] p, input logic [W-1:0] c);
    int e1 = 0, e2 = 0, e3 = 0, e4 = 0, d0, d1, ad;
    prev = p;
    cur  = c;
    #1;
    for (int i = 0; i + 1 < int'(W); i++) begin
      d0 = int'(c[i]) - int'(p[i]);
      d1 = int'(c[i+1]) - int'(p[i+1]);
      ad = (d0 > d1) ? d0 - d1 : d1 - d0;
      if (ad == 1) e1++;
      else if (ad == 2) e2++;
      else if (d0 != 0) e3++;
      else e4++;
    end
    checks++;
    if (int'(t1) != e1 || int'(t2) != e2 || int'(t3) != e3 || int'(t4) != e4 ||
        int'(t01) != ref_self(W, word_t'(p), word_t'(c)) ||
        int'(cost) != ref_cost(W, word_t'(p), word_t'(c))) begin
      failures++;
      $display("FAIL prev=%h cur=%h t=%0d/%0d/%0d/%0d self=%0d cost=%0d exp %0d/%0d/%0d/%0d cost=%0d",
               p, c, t1, t2, t3, t4, t01, cost, e1, e2, e3, e4,
               ref_cost(W, word_t'(p), word_t'(c)));
    end
  endtask

  initial begin
    // directed: all-zero to alternating gives 31 Type I pairs
    check_vec('0, 32'h5555_5555);
    if (cost != 7'd31 || t1 != 7'd31) begin failures++; $display("FAIL type I pattern"); end
    checks++;
    // 0101.. -> 1010..: every pair Type II, worst case 62
    check_vec(32'h5555_5555, 32'hAAAA_AAAA);
    if (cost != 7'd62 || t2 != 7'd31) begin failures++; $display("FAIL type II pattern"); end
    checks++;
    // 0 -> all ones: every pair Type III, cost 0, 32 self transitions
    check_vec('0, '1);
    if (cost != 0 || t3 != 7'd31 || t01 != 7'd32) begin failures++; $display("FAIL type III pattern"); end
    checks++;
    // no change: Type IV
    check_vec(32'h1234_5678, 32'h1234_5678);
    if (t4 != 7'd31 || cost != 0) begin failures++; $display("FAIL type IV pattern"); end
    checks++;
    for (int n = 0; n < 3000; n++) check_vec($urandom, $urandom);
    // sparse changes, closer to real flit streams
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] p;
      p = $urandom;
      check_vec(p, p ^ (1 << ($urandom % W)) ^ (1 << ($urandom % W)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
