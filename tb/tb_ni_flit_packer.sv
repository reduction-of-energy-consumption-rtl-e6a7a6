// tb_ni_flit_packer: checks the packer at the default 32-bit width. Random
// packets (a header and 0 to 12 payload words) are sent under every scheme;
// the reference lays the payload words end to end and cuts them into
// pieces of 32, 31 or 30 bits. The flit stream is compared flit by flit,
// with head and tail flags. The first half of the packets runs with no
// gaps and no backpressure and must produce body flits back to back (one
// per cycle); the second half adds random gaps and random backpressure.
module tb_ni_flit_packer;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  scheme_e       scheme = SCHEME_NONE;
  logic          in_valid = 1'b0, in_ready, in_head = 1'b0, in_last = 1'b0;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, out_ready = 1'b1;
  flit_kind_t    out_kind;
  logic [W-1:0]  out_data;

  int checks = 0, failures = 0;
  bit random_phase = 0;
  int n_flits = 0, n_bubbles = 0, n_stall = 0, n_pad = 0;
  bit in_body = 0;

  typedef struct { logic [W-1:0] data; flit_kind_t kind; } flit_t;
  flit_t exp_q[$];

  ni_flit_packer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= random_phase ? ($urandom % 3 != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    // in the no-gap phase, body flits of a packet must leave back to back
    if (!random_phase && in_body && !out_valid) n_bubbles++;
    if (out_valid && out_ready) begin
      flit_t e;
      checks++;
      n_flits++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected flit %h", out_data);
      end else begin
        e = exp_q.pop_front();
        if (out_data != e.data || out_kind != e.kind) begin
          failures++;
          $display("FAIL scheme %0d flit %h %b expected %h %b", scheme, out_data, out_kind,
                   e.data, e.kind);
        end
      end
      in_body = !out_kind.tail && !(out_kind.head && out_kind.tail) &&
                (in_body || (!out_kind.head));
    end
  end

  task automatic send_packet(input int n);
    word_t words[64];
    word_t f;
    flit_t e;
    int pw, nf;
    logic [W-1:0] hdr;
    pw = payload_bits(W, int'(scheme));
    for (int i = 0; i < 64; i++) words[i] = (i < n) ? word_t'($urandom) : '0;
    e.data = W'($urandom);
    hdr = e.data;
    e.kind.head = 1'b1;
    e.kind.tail = (n == 0);
    exp_q.push_back(e);
    nf = body_flits(W, pw, n);
    if (nf * pw != n * int'(W)) n_pad++;
    for (int k = 0; k < nf; k++) begin
      f = body_flit(W, pw, words, n, k);
      exp_q.push_back('{data: f[W-1:0], kind: '{head: 1'b0, tail: (k == nf - 1)}});
    end
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      if (random_phase)
        while ($urandom % 4 == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
      in_valid = 1'b1;
      in_head  = (i == 0);
      in_last  = (i == n);
      in_data  = (i == 0) ? hdr : words[i-1][W-1:0];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 400; p++) begin
      while (exp_q.size() != 0) @(negedge clk);
      @(negedge clk);
      random_phase = (p >= 200);
      scheme = scheme_e'(p % 4);
      send_packet((p % 50 == 0) ? 31 : $urandom % 13);
    end
    while (exp_q.size() != 0) @(negedge clk);
    checks++;
    if (n_bubbles != 0 || n_stall == 0 || n_pad == 0) begin
      failures++;
      $display("FAIL bubbles=%0d stalls=%0d padded packets=%0d", n_bubbles, n_stall, n_pad);
    end
    $display("flits=%0d bubbles=%0d stalls=%0d padded packets=%0d", n_flits, n_bubbles, n_stall, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
