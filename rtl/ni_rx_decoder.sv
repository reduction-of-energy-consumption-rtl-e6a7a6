// ni_rx_decoder: decoder stage of the destination network interface.
//
// Flits arriving from the last router are decoded by link_decoder and
// loaded into one output register towards the unpacker. Head flits
// pass unchanged; body and tail flits have the inversion recorded on their
// control wires undone, leaving the payload with the control wires cleared.
// `scheme` must match the sending NI.
//
// Handshake: valid/ready on both sides; one-entry pipeline stage, latency
// one cycle, one flit per cycle. Reset empties the register. The register
// and the status output are this design's choices.
module ni_rx_decoder
  import nocenc_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  scheme_e       scheme,
  // link from the last router
  input  logic          link_valid,
  output logic          link_ready,
  input  flit_kind_t    link_kind,
  input  logic [W-1:0]  link_data,
  // decoded flits to the unpacker
  output logic          out_valid,
  input  logic          out_ready,
  output flit_kind_t    out_kind,
  output logic [W-1:0]  out_data,
  output inv_e          out_inv    // inversion that was undone
);

  logic [W-1:0] dec_data;
  inv_e         dec_inv;

  link_decoder #(.W(W)) u_dec (
    .scheme(scheme), .head(link_kind.head), .link(link_data),
    .data(dec_data), .inv(dec_inv));

  assign link_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_kind  <= '0;
      out_data  <= '0;
      out_inv   <= INV_NONE;
    end else if (link_ready) begin
      out_valid <= link_valid;
      if (link_valid) begin
        out_kind <= link_kind;
        out_data <= dec_data;
        out_inv  <= dec_inv;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_kind));

endmodule
