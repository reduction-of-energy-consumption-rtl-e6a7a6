// nocenc_top: end-to-end link encoding between two network interfaces.
//
// The flits of a packet are encoded once, in the source NI, so that the
// coupling switching on every link they cross is reduced, and decoded
// once, in the destination NI; routers and links in between are untouched.
// This top holds what the encoding adds to the two NIs:
//   sending side   - ni_flit_packer cuts each packet (a header word and
//                    W-bit payload words) into a head flit and body flits of
//                    W-1 or W-2 payload bits, leaving room for the control
//                    wires; ni_tx_encoder encodes the body flits with the
//                    selected scheme and drives the link.
//   receiving side - ni_rx_decoder undoes the inversion and ni_flit_unpacker
//                    rebuilds the W-bit words.
// The NoC itself (routers and links) sits between link_tx_* and link_rx_*
// outside this module; connecting link_tx_* straight to link_rx_* gives a
// single-link path.
//
// All interfaces are valid/ready. Each of the four stages is one register
// deep; packer and unpacker change the flit count, so a packet of n payload
// words takes 1 + ceil(n*W/PW) link flits (PW = W, W-1, W-2 for no
// encoding, scheme I, schemes II/III). `scheme` configures both sides and
// should change only when no packet is in flight. Default link width: 32.
// The run-time scheme input and the packet framing on the core side are
// this design's choices.
module nocenc_top
  import nocenc_pkg::*;
#(
  parameter int unsigned W  = LINK_W,
  parameter int unsigned CW = $clog2(2 * W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  scheme_e       scheme,
  // sending side: packet words from the core
  input  logic          tx_valid,
  output logic          tx_ready,
  input  logic          tx_head,     // header word
  input  logic          tx_last,     // last word of the packet
  input  logic [W-1:0]  tx_data,
  // link to the first router
  output logic          link_tx_valid,
  input  logic          link_tx_ready,
  output flit_kind_t    link_tx_kind,
  output logic [W-1:0]  link_tx_data,
  output inv_e          link_tx_inv,  // inversion the flit carries
  output logic [CW-1:0] link_tx_cost, // its coupling cost on this link
  // link from the last router
  input  logic          link_rx_valid,
  output logic          link_rx_ready,
  input  flit_kind_t    link_rx_kind,
  input  logic [W-1:0]  link_rx_data,
  // receiving side: packet words to the core
  output logic          rx_valid,
  input  logic          rx_ready,
  output logic          rx_head,
  output logic          rx_last,
  output logic [W-1:0]  rx_data
);

  logic         pk_valid, pk_ready;
  flit_kind_t   pk_kind;
  logic [W-1:0] pk_data;
  logic         dc_valid, dc_ready;
  flit_kind_t   dc_kind;
  logic [W-1:0] dc_data;

  ni_flit_packer #(.W(W)) u_pack (
    .clk, .rst_n, .scheme,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_head(tx_head), .in_last(tx_last),
    .in_data(tx_data),
    .out_valid(pk_valid), .out_ready(pk_ready), .out_kind(pk_kind), .out_data(pk_data));

  ni_tx_encoder #(.W(W), .CW(CW)) u_tx (
    .clk, .rst_n, .scheme,
    .in_valid(pk_valid), .in_ready(pk_ready), .in_kind(pk_kind), .in_data(pk_data),
    .link_valid(link_tx_valid), .link_ready(link_tx_ready),
    .link_kind(link_tx_kind), .link_data(link_tx_data),
    .link_inv(link_tx_inv), .link_cost(link_tx_cost));

  ni_rx_decoder #(.W(W)) u_rx (
    .clk, .rst_n, .scheme,
    .link_valid(link_rx_valid), .link_ready(link_rx_ready),
    .link_kind(link_rx_kind), .link_data(link_rx_data),
    .out_valid(dc_valid), .out_ready(dc_ready), .out_kind(dc_kind),
    .out_data(dc_data), .out_inv());

  ni_flit_unpacker #(.W(W)) u_unpack (
    .clk, .rst_n, .scheme,
    .in_valid(dc_valid), .in_ready(dc_ready), .in_kind(dc_kind), .in_data(dc_data),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_head(rx_head), .out_last(rx_last),
    .out_data(rx_data));

endmodule
