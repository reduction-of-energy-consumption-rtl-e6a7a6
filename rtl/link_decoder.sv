// link_decoder: decoding logic of the destination NI, for all schemes.
//
// Head flits and flits sent without encoding pass unchanged. For a body flit
// the control wires tell which wires were inverted: wire W-1 (the inversion
// bit) set means the odd wires were inverted; under schemes II and III wire
// W-2 set means the even wires were inverted (full inversion sets both,
// scheme III's even inversion only wire W-2). The decoder XORs the flit with
// the matching mask. Since the control wires are themselves odd and even
// wires, this also returns them to 0, so the output carries the payload with
// the control wires cleared. For scheme I this is the document's "invert the
// received flit when the inversion bit is high"; the wire W-2 marker is this
// design's way of telling the inversions of schemes II and III apart.
//
// Purely combinational.
module link_decoder
  import nocenc_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  scheme_e      scheme,   // scheme the sender uses
  input  logic         head,     // flit is a packet header
  input  logic [W-1:0] link,     // word received from the link
  output logic [W-1:0] data,     // decoded flit
  output inv_e         inv       // inversion that was undone
);

  localparam logic [W-1:0] ODD  = ODD_PATTERN[W-1:0];
  localparam logic [W-1:0] EVEN = EVEN_PATTERN[W-1:0];

  logic odd_inv, even_inv;

  always_comb begin
    odd_inv  = 1'b0;
    even_inv = 1'b0;
    if (!head && scheme != SCHEME_NONE) begin
      odd_inv  = link[W-1];
      even_inv = (scheme != SCHEME_I) && link[W-2];
    end
    data = link ^ (odd_inv ? ODD : '0) ^ (even_inv ? EVEN : '0);
    inv  = inv_e'({even_inv, odd_inv});
  end

endmodule
