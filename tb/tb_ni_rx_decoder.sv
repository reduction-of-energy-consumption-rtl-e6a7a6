// tb_ni_rx_decoder: checks the destination-NI decoder stage at the default
// 32-wire width. The testbench encodes random packets with the reference
// encoder of each scheme, offers them with random gaps, applies random
// backpressure at the output and checks that every flit comes out decoded,
// in order, one cycle after it was taken, and held while stalled.
module tb_ni_rx_decoder;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  scheme_e       scheme = SCHEME_I;
  logic          link_valid = 1'b0, link_ready;
  flit_kind_t    link_kind = '0;
  logic [W-1:0]  link_data = '0;
  logic          out_valid, out_ready = 1'b0;
  flit_kind_t    out_kind;
  logic [W-1:0]  out_data;
  inv_e          out_inv;

  int checks = 0, failures = 0, cycle = 0, n_stall = 0;
  int n_inv [4] = '{0, 0, 0, 0};

  typedef struct {
    logic [W-1:0] data;
    flit_kind_t   kind;
    int           inv;
    int           acc_cycle;
  } exp_t;
  exp_t exp_q[$];
  exp_t pend;          // expectation for the flit being offered
  word_t prev = '0;

  ni_rx_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (exp_q.size() > 0 && cycle == exp_q[0].acc_cycle + 1) begin
      checks++;
      if (!out_valid || out_data != exp_q[0].data) begin
        failures++;
        $display("FAIL flit not out one cycle after acceptance");
      end
    end
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected flit");
      end else begin
        e = exp_q.pop_front();
        if (out_data != e.data || out_kind != e.kind || int'(out_inv) != e.inv) begin
          failures++;
          $display("FAIL out=%h kind=%b inv=%0d exp %h %b %0d",
                   out_data, out_kind, out_inv, e.data, e.kind, e.inv);
        end
        n_inv[e.inv]++;
      end
    end
    if (link_valid && link_ready) begin
      pend.acc_cycle = cycle;
      exp_q.push_back(pend);
    end
  end

  always @(negedge clk) out_ready <= ($urandom % 3) != 0;

  task automatic send_packet(input int len);
    logic [W-1:0] pay;
    word_t enc;
    int kind;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom % 5 == 0) @(negedge clk);
      pay = $urandom;
      if (i == 0 || scheme == SCHEME_NONE) begin
        enc = word_t'(pay);
        kind = 0;
        pend.data = pay;
      end else begin
        enc = ref_encode(W, int'(scheme), prev, word_t'(pay), kind);
        pend.data = pay & ((scheme == SCHEME_I) ? 32'h7FFF_FFFF : 32'h3FFF_FFFF);
      end
      prev = enc;
      pend.kind.head = (i == 0);
      pend.kind.tail = (i == len - 1);
      pend.inv = kind;
      link_valid = 1'b1;
      link_kind  = pend.kind;
      link_data  = enc[W-1:0];
      @(posedge clk);
      while (!link_ready) @(posedge clk);
      @(negedge clk);
      link_valid = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 400; p++) begin
      while (exp_q.size() != 0) @(negedge clk);
      scheme = scheme_e'(p % 4);
      send_packet(2 + $urandom % 8);
    end
    while (exp_q.size() != 0) @(negedge clk);
    foreach (n_inv[k]) begin
      checks++;
      if (n_inv[k] == 0) begin
        failures++;
        $display("FAIL inversion %0d never decoded", k);
      end
    end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL no output stall");
    end
    $display("stalls=%0d inv none/odd/even/full=%0d/%0d/%0d/%0d",
             n_stall, n_inv[0], n_inv[1], n_inv[2], n_inv[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
