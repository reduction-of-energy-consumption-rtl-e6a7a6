// ni_tx_encoder: encoder stage of the source network interface.
//
// Every flit leaving the NI passes through one register that drives the
// link wires. Head flits, and all flits when the scheme is SCHEME_NONE, are
// loaded as they are; body and tail flits are first encoded by the encoding
// logic of the selected scheme, which compares them with the word the
// register holds, i.e. the word now on the wires. Because wormhole
// switching sends the flits of a packet one after another along the whole
// path, the saving decided here applies to every link of the route.
//
// All three scheme encoders are built and the `scheme` input selects one;
// it is meant to be set at configuration time and changed only between
// packets, together with the scheme of the receiving NI. Payload wires per
// body flit: W-1 under scheme I, W-2 under schemes II and III, W without
// encoding; the unused top wires of in_data are ignored.
//
// Handshake: valid/ready on both sides, a transfer when both are high. The
// register is a one-entry pipeline stage: latency one cycle, one flit per
// cycle when the link is ready. While link_valid is high and link_ready low
// the link word is held. The wires keep their last value when idle (valid
// low), which is what the next flit is compared with. Reset clears the
// register. The select input, the single register and the status outputs
// are this design's choices.
module ni_tx_encoder
  import nocenc_pkg::*;
#(
  parameter int unsigned W  = LINK_W,
  parameter int unsigned CW = $clog2(2 * W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  scheme_e       scheme,
  // flits from the packer
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_kind_t    in_kind,
  input  logic [W-1:0]  in_data,
  // link towards the first router
  output logic          link_valid,
  input  logic          link_ready,
  output flit_kind_t    link_kind,
  output logic [W-1:0]  link_data,
  // status of the flit on the link
  output inv_e          link_inv,   // inversion it carries
  output logic [CW-1:0] link_cost   // coupling cost of its transition
);

  logic [W-1:0]  enc1, enc2, enc3;
  inv_e          inv1, inv2, inv3;
  logic [CW-1:0] cost1, cost2, cost3;
  logic [CW-1:0] cost_raw;

  enc_scheme1 #(.W(W), .CW(CW)) u_enc1 (
    .prev(link_data), .data(in_data), .enc(enc1), .inv(inv1), .cost(cost1));
  enc_scheme2 #(.W(W), .CW(CW)) u_enc2 (
    .prev(link_data), .data(in_data), .enc(enc2), .inv(inv2), .cost(cost2));
  enc_scheme3 #(.W(W), .CW(CW)) u_enc3 (
    .prev(link_data), .data(in_data), .enc(enc3), .inv(inv3), .cost(cost3));

  coupling_cost #(.W(W), .CW(CW)) u_cost_raw (
    .prev(link_data), .cur(in_data),
    .t1(), .t2(), .t3(), .t4(), .t01(), .cost(cost_raw));

  logic [W-1:0]  nxt_data;
  inv_e          nxt_inv;
  logic [CW-1:0] nxt_cost;

  always_comb begin
    nxt_data = in_data;
    nxt_inv  = INV_NONE;
    nxt_cost = cost_raw;
    if (!in_kind.head) begin
      unique case (scheme)
        SCHEME_I:   begin nxt_data = enc1; nxt_inv = inv1; nxt_cost = cost1; end
        SCHEME_II:  begin nxt_data = enc2; nxt_inv = inv2; nxt_cost = cost2; end
        SCHEME_III: begin nxt_data = enc3; nxt_inv = inv3; nxt_cost = cost3; end
        default:    ;
      endcase
    end
  end

  assign in_ready = !link_valid || link_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_kind  <= '0;
      link_data  <= '0;
      link_inv   <= INV_NONE;
      link_cost  <= '0;
    end else if (in_ready) begin
      link_valid <= in_valid;
      if (in_valid) begin
        link_kind <= in_kind;
        link_data <= nxt_data;
        link_inv  <= nxt_inv;
        link_cost <= nxt_cost;
      end
    end
  end

  // A flit offered to a busy link stays on the wires unchanged.
  a_link_hold: assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_data) && $stable(link_kind));
  // The packer keeps a flit offered until it is taken.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid);

endmodule
