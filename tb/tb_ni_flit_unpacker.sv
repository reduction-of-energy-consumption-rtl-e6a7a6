// tb_ni_flit_unpacker: checks the unpacker at the default 32-bit width.
// Flit streams for random packets (a header and 0 to 12 payload words) are
// built by the reference under every scheme, including the zero padding of
// the tail flit, and offered with random gaps while the output sees random
// backpressure. The rebuilt words, with head and last flags, must equal the
// original packet; padding must be dropped.
module tb_ni_flit_unpacker;
  import tb_ref_pkg::*;
  import nocenc_pkg::*;

  localparam int unsigned W = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  scheme_e       scheme = SCHEME_NONE;
  logic          in_valid = 1'b0, in_ready;
  flit_kind_t    in_kind = '0;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, out_ready = 1'b1;
  logic          out_head, out_last;
  logic [W-1:0]  out_data;

  int checks = 0, failures = 0, n_stall = 0, n_words = 0;

  typedef struct { logic [W-1:0] data; logic head; logic last; } word_exp_t;
  word_exp_t exp_q[$];

  ni_flit_unpacker dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      word_exp_t e;
      checks++;
      n_words++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h", out_data);
      end else begin
        e = exp_q.pop_front();
        if (out_data != e.data || out_head != e.head || out_last != e.last) begin
          failures++;
          $display("FAIL scheme %0d word %h h%b l%b expected %h h%b l%b", scheme,
                   out_data, out_head, out_last, e.data, e.head, e.last);
        end
      end
    end
  end

  task automatic offer(input logic [W-1:0] d, input logic head, input logic tail);
    @(negedge clk);
    while ($urandom % 4 == 0) begin
      in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid     = 1'b1;
    in_kind.head = head;
    in_kind.tail = tail;
    in_data      = d;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  task automatic send_packet(input int n);
    word_t words[64];
    word_t f;
    logic [W-1:0] hdr;
    int pw, nf;
    pw = payload_bits(W, int'(scheme));
    for (int i = 0; i < 64; i++) words[i] = (i < n) ? word_t'($urandom) : '0;
    hdr = W'($urandom);
    exp_q.push_back('{data: hdr, head: 1'b1, last: (n == 0)});
    for (int i = 0; i < n; i++)
      exp_q.push_back('{data: words[i][W-1:0], head: 1'b0, last: (i == n - 1)});
    nf = body_flits(W, pw, n);
    offer(hdr, 1'b1, n == 0);
    for (int k = 0; k < nf; k++) begin
      f = body_flit(W, pw, words, n, k);
      offer(f[W-1:0], 1'b0, k == nf - 1);
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
      scheme = scheme_e'(p % 4);
      send_packet((p % 50 == 0) ? 31 : $urandom % 13);
    end
    while (exp_q.size() != 0) @(negedge clk);
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL no output stall");
    end
    $display("words=%0d stalls=%0d", n_words, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
