// ni_flit_unpacker: rebuilds the W-bit words of a packet from decoded link
// flits in the receiving NI; the inverse of ni_flit_packer.
//
// The head flit is passed on as the header word. Body flits carry PW payload
// bits (W-1 under scheme I, W-2 under schemes II and III, W without
// encoding); they are appended, least significant bit first, to a 2W-bit
// bit buffer and a word is taken from its bottom whenever W bits are there.
// Once the tail flit has been taken, the bits left after the last whole
// word are padding and are dropped; that word is flagged out_last. Since
// padding is always shorter than PW, the tail flit always completes the
// last word.
//
// Interface: valid/ready on both sides; the output is a register, so a
// word appears the cycle after the flit that completes it is taken. Reset
// empties the buffer. Buffer depth and bit order are this design's choices
// and must match the packer.
module ni_flit_unpacker
  import nocenc_pkg::*;
#(
  parameter int unsigned W  = LINK_W,
  parameter int unsigned BW = $clog2(2 * W + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  scheme_e      scheme,
  // decoded flits from the decoder stage
  input  logic         in_valid,
  output logic         in_ready,
  input  flit_kind_t   in_kind,
  input  logic [W-1:0] in_data,
  // packet words to the core side
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_head,
  output logic         out_last,
  output logic [W-1:0] out_data
);

  logic [2*W-1:0] buf_q, buf_shift, buf_d;
  logic [BW-1:0]  cnt_q, cnt_after, cnt_d, pw;
  logic           tail_q, tail_d;     // tail flit taken, words still buffered
  logic           slot, emit_word, last_word, take_flit, take_head, drop;
  logic [W-1:0]   payload;

  always_comb begin
    unique case (scheme)
      SCHEME_I:              pw = BW'(W - 1);
      SCHEME_II, SCHEME_III: pw = BW'(W - 2);
      default:               pw = BW'(W);
    endcase
  end

  assign slot      = !out_valid || out_ready;
  assign emit_word = slot && cnt_q >= BW'(W);
  // after the tail flit, fewer than W bits left over are padding
  assign last_word = tail_q && (cnt_q - BW'(W)) < BW'(W);
  // a tail leaving less than a word (only after a malformed packet) is dropped
  assign drop      = tail_q && cnt_q < BW'(W);
  assign cnt_after = (emit_word && !last_word) ? cnt_q - BW'(W) :
                     (emit_word || drop)       ? '0 : cnt_q;
  assign buf_shift = (emit_word && !last_word) ? buf_q >> W :
                     (emit_word || drop)       ? '0 : buf_q;
  assign take_flit = in_valid && !in_kind.head && !tail_q &&
                     (cnt_after + pw <= BW'(2 * W));
  assign take_head = in_valid && in_kind.head && slot && !tail_q && cnt_q == '0;
  assign in_ready  = in_kind.head ? (slot && !tail_q && cnt_q == '0)
                                  : (!tail_q && (cnt_after + pw <= BW'(2 * W)));
  assign payload   = in_data & ((W'(1) << pw) - W'(1));

  always_comb begin
    buf_d  = buf_shift;
    cnt_d  = cnt_after;
    tail_d = tail_q && !(emit_word && last_word) && !drop;
    if (take_flit) begin
      buf_d  = buf_shift | ({{W{1'b0}}, payload} << cnt_after);
      cnt_d  = cnt_after + pw;
      tail_d = in_kind.tail;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      cnt_q     <= '0;
      tail_q    <= 1'b0;
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      buf_q  <= buf_d;
      cnt_q  <= cnt_d;
      tail_q <= tail_d;
      if (slot) begin
        out_valid <= emit_word || take_head;
        if (emit_word) begin
          out_data <= buf_q[W-1:0];
          out_head <= 1'b0;
          out_last <= last_word;
        end else if (take_head) begin
          out_data <= in_data;
          out_head <= 1'b1;
          out_last <= in_kind.tail;
        end
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_last));

endmodule
