// tb_ni_tx_encoder: checks the source-NI encoder stage at the default
// 32-wire width. Packets of random length and data are offered with random
// gaps while the link applies random backpressure; the scheme changes
// between packets. A reference model encodes every accepted flit against
// the previous word it put on the link and the testbench compares the link
// stream flit by flit, the one-cycle latency, the hold of a stalled flit and
// the reported inversion and cost. Head bypass, stalls, every scheme and
// every kind of inversion must each happen at least once.
module tb_ni_tx_encoder;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned CW = $clog2(2 * W + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  scheme_e       scheme = SCHEME_I;
  logic          in_valid = 1'b0, in_ready;
  flit_kind_t    in_kind = '0;
  logic [W-1:0]  in_data = '0;
  logic          link_valid, link_ready = 1'b0;
  flit_kind_t    link_kind;
  logic [W-1:0]  link_data;
  inv_e          link_inv;
  logic [CW-1:0] link_cost;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_head = 0, n_stall = 0;
  int n_inv [4] = '{0, 0, 0, 0};
  int n_scheme [4] = '{0, 0, 0, 0};

  typedef struct {
    logic [W-1:0] data;
    flit_kind_t   kind;
    int           inv;
    int           cost;
    int           acc_cycle;
  } exp_t;
  exp_t exp_q[$];
  word_t ref_prev = '0;

  ni_tx_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and scoreboard, sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    cycle++;
    // latency: an accepted flit is on the link in the next cycle
    if (exp_q.size() > 0 && cycle == exp_q[0].acc_cycle + 1) begin
      checks++;
      if (!link_valid || link_data != exp_q[0].data) begin
        failures++;
        $display("FAIL flit not on the link one cycle after acceptance");
      end
    end
    if (link_valid && link_ready) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected flit %h", link_data);
      end else begin
        e = exp_q.pop_front();
        if (link_data != e.data || link_kind != e.kind || int'(link_inv) != e.inv ||
            int'(link_cost) != e.cost) begin
          failures++;
          $display("FAIL link=%h kind=%b inv=%0d cost=%0d exp %h %b %0d %0d",
                   link_data, link_kind, link_inv, link_cost, e.data, e.kind, e.inv, e.cost);
        end
      end
    end
    if (link_valid && !link_ready) n_stall++;
    if (in_valid && in_ready) begin
      exp_t e;
      word_t enc;
      int kind;
      if (in_kind.head || scheme == SCHEME_NONE) begin
        enc  = word_t'(in_data);
        kind = 0;
        if (in_kind.head) n_head++;
      end else begin
        enc = ref_encode(W, int'(scheme), ref_prev, word_t'(in_data), kind);
        n_inv[kind]++;
      end
      n_scheme[int'(scheme)]++;
      e.data = enc[W-1:0];
      e.kind = in_kind;
      e.inv  = kind;
      e.cost = ref_cost(W, ref_prev, enc);
      e.acc_cycle = cycle;
      ref_prev = enc;
      exp_q.push_back(e);
    end
  end

  // link backpressure
  always @(negedge clk) link_ready <= ($urandom % 4) != 0;

  task automatic send_packet(input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom % 5 == 0) @(negedge clk);
      in_valid      = 1'b1;
      in_kind.head  = (i == 0);
      in_kind.tail  = (i == len - 1);
      // mix of random data and correlated data (small changes)
      in_data       = ($urandom % 2 != 0) ? $urandom : (in_data ^ (1 << ($urandom % W)));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 400; p++) begin
      // wait for the stage to drain before a scheme change
      while (exp_q.size() != 0) @(negedge clk);
      scheme = scheme_e'(p % 4);
      send_packet(2 + $urandom % 8);
    end
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (n_head == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL head=%0d stall=%0d", n_head, n_stall);
    end
    foreach (n_inv[k]) begin
      checks++;
      if (n_inv[k] == 0 || n_scheme[k] == 0) begin
        failures++;
        $display("FAIL inversion %0d or scheme %0d never used", k, k);
      end
    end
    $display("heads=%0d stalls=%0d inv none/odd/even/full=%0d/%0d/%0d/%0d",
             n_head, n_stall, n_inv[0], n_inv[1], n_inv[2], n_inv[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
