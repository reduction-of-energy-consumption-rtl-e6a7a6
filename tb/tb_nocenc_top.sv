// tb_nocenc_top: end-to-end test of the encoded NI pair at its default
// parameters (32-wire links). The sending side is connected to the
// receiving side through a three-hop behavioural NoC path with random
// router stalls, and the receiving core applies random backpressure.
//
// The same 200 packets, each a header word and seven 32-bit random payload
// words (eight flits without encoding), are sent once without encoding and
// once under each scheme; the scheme is switched between runs with the
// network empty. Every word must arrive intact and in order, with its head
// and last flags. The coupling cost per link flit measured on the hop links
// (the link power) must be lower under every scheme than without encoding
// and must not rise from scheme I to II to III. The link energy of the
// whole run, which also pays for the extra flits of the narrower payload,
// is estimated as Vdd^2 * (Cs * T(0->1) + Cc * (T1 + 2*T2)) with the
// electrical values of a 2 mm, 32-wire link in 65 nm (Vdd = 0.9 V, self
// capacitance 0.237 pF and coupling capacitance 0.947 pF per wire, 700 MHz
// clock); it must be lower under every scheme than without encoding. Head bypass, every inversion kind, tail padding,
// stalls on both sides and the scheme switch must each happen.
module tb_nocenc_top;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W       = LINK_W;
  localparam int unsigned CW      = $clog2(2 * W + 1);
  localparam int          PACKETS = 200;
  localparam int          WORDS   = 8;   // header and seven payload words
  localparam real         VDD     = 0.9;     // V
  localparam real         CS_PF   = 0.237;   // self capacitance per wire, pF
  localparam real         CC_PF   = 0.947;   // coupling capacitance per pair, pF
  localparam real         F_MHZ   = 700.0;

  logic          clk = 1'b0, rst_n = 1'b0;
  scheme_e       scheme = SCHEME_NONE;
  logic          tx_valid = 1'b0, tx_ready, tx_head = 1'b0, tx_last = 1'b0;
  logic [W-1:0]  tx_data = '0;
  logic          link_tx_valid, link_tx_ready;
  flit_kind_t    link_tx_kind;
  logic [W-1:0]  link_tx_data;
  inv_e          link_tx_inv;
  logic [CW-1:0] link_tx_cost;
  logic          link_rx_valid, link_rx_ready;
  flit_kind_t    link_rx_kind;
  logic [W-1:0]  link_rx_data;
  logic          rx_valid, rx_ready = 1'b0, rx_head, rx_last;
  logic [W-1:0]  rx_data;
  longint        coupling_total, self_total;

  int checks = 0, failures = 0;
  int n_head = 0, n_tx_stall = 0, n_rx_stall = 0, n_switch = 0, n_pad = 0;
  int n_inv [4] = '{0, 0, 0, 0};
  int flits_run [4];
  longint cost_run [4];
  longint self_run [4];
  int flit_count = 0;

  logic [W-1:0] stream [PACKETS * WORDS];
  typedef struct { logic [W-1:0] data; logic head; logic last; } word_exp_t;
  word_exp_t exp_q[$];

  nocenc_top dut (.*);

  tb_noc_path #(.W(W), .HOPS(3)) u_path (
    .clk, .rst_n,
    .in_valid(link_tx_valid), .in_ready(link_tx_ready), .in_kind(link_tx_kind),
    .in_data(link_tx_data),
    .out_valid(link_rx_valid), .out_ready(link_rx_ready), .out_kind(link_rx_kind),
    .out_data(link_rx_data),
    .coupling_total, .self_total);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rx_ready <= ($urandom % 4) != 0;

  always @(posedge clk) if (rst_n) begin
    if (link_tx_valid && !link_tx_ready) n_tx_stall++;
    if (rx_valid && !rx_ready) n_rx_stall++;
    if (link_tx_valid && link_tx_ready) begin
      flit_count++;
      if (link_tx_kind.head) n_head++;
      else n_inv[int'(link_tx_inv)]++;
      // seven payload words (224 bits) never fill whole 31- or 30-bit flits,
      // so every encoded packet ends in a zero-padded tail flit
      if (link_tx_kind.tail && !link_tx_kind.head && scheme != SCHEME_NONE) n_pad++;
    end
    if (rx_valid && rx_ready) begin
      word_exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h", rx_data);
      end else begin
        e = exp_q.pop_front();
        if (rx_data != e.data || rx_head != e.head || rx_last != e.last) begin
          failures++;
          $display("FAIL scheme %0d got %h h%b l%b expected %h h%b l%b", scheme,
                   rx_data, rx_head, rx_last, e.data, e.head, e.last);
        end
      end
    end
  end

  task automatic run(input scheme_e s);
    longint c0, s0;
    int f0;
    if (s != scheme) n_switch++;
    scheme = s;
    c0 = coupling_total;
    s0 = self_total;
    f0 = flit_count;
    for (int i = 0; i < PACKETS * WORDS; i++) begin
      @(negedge clk);
      tx_valid = 1'b1;
      tx_head  = (i % WORDS == 0);
      tx_last  = (i % WORDS == WORDS - 1);
      tx_data  = stream[i];
      exp_q.push_back('{data: stream[i], head: tx_head, last: tx_last});
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
    end
    @(negedge clk);
    tx_valid = 1'b0;
    while (exp_q.size() != 0) @(negedge clk);
    repeat (8) @(negedge clk);
    cost_run[int'(s)]  = coupling_total - c0;
    self_run[int'(s)]  = self_total - s0;
    flits_run[int'(s)] = flit_count - f0;
    $display("scheme %0d: %0d link flits, coupling cost %0d (%0d.%02d per flit), 0->1 transitions %0d",
             int'(s), flits_run[int'(s)], cost_run[int'(s)],
             cost_run[int'(s)] / longint'(flits_run[int'(s)]),
             (cost_run[int'(s)] * 100 / longint'(flits_run[int'(s)])) % 100, self_run[int'(s)]);
  endtask

  initial begin
    for (int i = 0; i < PACKETS * WORDS; i++) stream[i] = W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(SCHEME_NONE);
    run(SCHEME_I);
    run(SCHEME_II);
    run(SCHEME_III);
    // flit counts: 1 + ceil(7*32/PW) per packet
    checks++;
    if (flits_run[0] != PACKETS * 8 || flits_run[1] != PACKETS * 9 ||
        flits_run[2] != PACKETS * 9 || flits_run[3] != PACKETS * 9) begin
      failures++;
      $display("FAIL flit counts %0d %0d %0d %0d", flits_run[0], flits_run[1],
               flits_run[2], flits_run[3]);
    end
    // link power: coupling cost per flit, compared by cross-multiplying
    for (int s = 1; s < 4; s++) begin
      checks++;
      if (cost_run[s] * flits_run[0] >= cost_run[0] * flits_run[s]) begin
        failures++;
        $display("FAIL scheme %0d does not lower the coupling cost per flit", s);
      end
    end
    checks++;
    if (cost_run[2] * flits_run[1] > cost_run[1] * flits_run[2] ||
        cost_run[3] * flits_run[2] > cost_run[2] * flits_run[3]) begin
      failures++;
      $display("FAIL coupling cost per flit rises from one scheme to the next");
    end
    // link energy, self plus coupling, over all hop links
    begin
      real e [4];
      for (int s = 0; s < 4; s++) begin
        e[s] = VDD * VDD * (CS_PF * real'(self_run[s]) + CC_PF * real'(cost_run[s]));
        $display("scheme %0d: link energy %0.1f pJ, %0.3f pJ per packet, mean link power %0.2f mW per hop",
                 s, e[s], e[s] / PACKETS, e[s] / real'(flits_run[s]) / 3.0 * F_MHZ * 1.0e-3);
      end
      for (int s = 1; s < 4; s++) begin
        checks++;
        if (e[s] >= e[0]) begin
          failures++;
          $display("FAIL scheme %0d does not lower the link energy", s);
        end
      end
      $display("link energy vs none: I %0.1f%%, II %0.1f%%, III %0.1f%%",
               100.0 * e[1] / e[0], 100.0 * e[2] / e[0], 100.0 * e[3] / e[0]);
    end
    foreach (n_inv[k]) begin
      checks++;
      if (n_inv[k] == 0) begin
        failures++;
        $display("FAIL inversion %0d never used", k);
      end
    end
    checks++;
    if (n_head == 0 || n_tx_stall == 0 || n_rx_stall == 0 || n_switch < 3 || n_pad == 0) begin
      failures++;
      $display("FAIL mechanism missing: heads=%0d tx stalls=%0d rx stalls=%0d switches=%0d padded tails=%0d",
               n_head, n_tx_stall, n_rx_stall, n_switch, n_pad);
    end
    $display("heads=%0d tx stalls=%0d rx stalls=%0d switches=%0d padded tails=%0d inv none/odd/even/full=%0d/%0d/%0d/%0d",
             n_head, n_tx_stall, n_rx_stall, n_switch, n_pad, n_inv[0], n_inv[1], n_inv[2], n_inv[3]);
    $display("coupling cost per flit vs none: I %0d%%, II %0d%%, III %0d%%; per packet: I %0d%%, II %0d%%, III %0d%%",
             cost_run[1] * flits_run[0] * 100 / (cost_run[0] * flits_run[1]),
             cost_run[2] * flits_run[0] * 100 / (cost_run[0] * flits_run[2]),
             cost_run[3] * flits_run[0] * 100 / (cost_run[0] * flits_run[3]),
             cost_run[1] * 100 / cost_run[0], cost_run[2] * 100 / cost_run[0],
             cost_run[3] * 100 / cost_run[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
