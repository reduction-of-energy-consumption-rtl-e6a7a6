// ni_flit_packer: cuts packets of W-bit words into link flits in the
// sending NI.
//
// Without encoding a body flit carries W payload bits. With encoding one
// (scheme I) or two (schemes II and III) link wires carry the inversion
// state, so the NI packs the payload into body flits of PW = W-1 or W-2
// bits. The first word of a packet is its header; it becomes the head flit
// unchanged. The payload words that follow are appended, least significant
// bit first, to a 2W-bit bit buffer, and a body flit of PW bits is taken
// from its bottom whenever enough bits are there. After the packet's last
// word the remaining bits, zero-padded to PW, form the tail flit. The
// wires above PW in a body flit are 0.
//
// Interface: valid/ready on both sides. in_head marks the header word and
// in_last the last word of the packet (on the header too when the packet
// has no payload). Output flits carry head/tail flags. The output is a
// register: a word appears as flits from the next cycle on, one flit per
// cycle while the link takes them; input words are taken while the buffer
// has room. Reset empties it. The buffer depth, bit order and padding are
// this design's choices.
module ni_flit_packer
  import nocenc_pkg::*;
#(
  parameter int unsigned W  = LINK_W,
  parameter int unsigned BW = $clog2(2 * W + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  scheme_e      scheme,
  // packet words from the core side
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_head,
  input  logic         in_last,
  input  logic [W-1:0] in_data,
  // flits towards the encoder stage
  output logic         out_valid,
  input  logic         out_ready,
  output flit_kind_t   out_kind,
  output logic [W-1:0] out_data
);

  logic [2*W-1:0] buf_q, buf_shift, buf_d;
  logic [BW-1:0]  cnt_q, cnt_after, cnt_d, pw, emit_n;
  logic           flush_q, flush_d;   // last word taken, bits still buffered
  logic           slot;               // output register can be loaded
  logic           emit_body, emit_pad, take_word, take_head;

  always_comb begin
    unique case (scheme)
      SCHEME_I:              pw = BW'(W - 1);
      SCHEME_II, SCHEME_III: pw = BW'(W - 2);
      default:               pw = BW'(W);
    endcase
  end

  assign slot      = !out_valid || out_ready;
  assign emit_body = slot && cnt_q >= pw;
  assign emit_pad  = slot && !emit_body && flush_q && cnt_q != '0;
  assign emit_n    = emit_body ? pw : (emit_pad ? cnt_q : '0);
  assign buf_shift = buf_q >> emit_n;
  assign cnt_after = cnt_q - emit_n;
  // a payload word needs room for W more bits; a header needs an empty buffer
  assign take_word = in_valid && !in_head && !flush_q && (cnt_after <= BW'(W));
  assign take_head = in_valid && in_head && slot && !flush_q && cnt_q == '0;
  assign in_ready  = in_head ? (slot && !flush_q && cnt_q == '0)
                             : (!flush_q && (cnt_after <= BW'(W)));

  always_comb begin
    buf_d   = buf_shift;
    cnt_d   = cnt_after;
    flush_d = flush_q && cnt_after != '0;
    if (take_word) begin
      buf_d   = buf_shift | ({{W{1'b0}}, in_data} << cnt_after);
      cnt_d   = cnt_after + BW'(W);
      flush_d = in_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      cnt_q     <= '0;
      flush_q   <= 1'b0;
      out_valid <= 1'b0;
      out_kind  <= '0;
      out_data  <= '0;
    end else begin
      buf_q   <= buf_d;
      cnt_q   <= cnt_d;
      flush_q <= flush_d;
      if (slot) begin
        out_valid <= emit_body || emit_pad || take_head;
        if (emit_body || emit_pad) begin
          // keep the low pw bits (all W when pw = W: the shift gives 0);
          // buffer bits at and above cnt_q are always 0
          out_data      <= buf_q[W-1:0] & ((W'(1) << pw) - W'(1));
          out_kind.head <= 1'b0;
          out_kind.tail <= flush_q && cnt_after == '0;
        end else if (take_head) begin
          out_data      <= in_data;
          out_kind.head <= 1'b1;
          out_kind.tail <= in_last;
        end
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_kind));

endmodule
