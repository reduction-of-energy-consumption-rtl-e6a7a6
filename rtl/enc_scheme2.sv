// enc_scheme2: encoding logic of scheme II (odd, full or no inversion).
//
// The body flit carries its payload on wires W-3..0. Wire W-1 is the
// inversion bit and wire W-2 the full-inversion marker; both are cleared
// here. Three candidates are formed: the flit as is, the flit with its odd
// wires inverted (sets the inversion bit) and the flit with every wire
// inverted (sets the inversion bit and the marker). Full inversion turns
// Type II pairs into Type IV, odd inversion turns Type II and III pairs into
// Type I. Their coupling costs P (none), P' (odd) and P'' (full), each
// T1 + 2*T2 against the word on the link, decide:
//   odd  inversion when P' < P and P' < P'';
//   full inversion when, otherwise, P'' < P;
//   no   inversion when neither holds.
// With W-1 (odd) wire pairs, odd inversion changes the cost of every pair
// by one, so P' never equals P or P''; only P and P'' can tie, and the flit
// then goes as is.
// These are the scheme's odd- and full-inversion conditions; evaluating
// them from directly computed costs, and marking full inversion on wire
// W-2, are this design's choices.
//
// Purely combinational; the sender NI registers the result onto the link.
module enc_scheme2
  import nocenc_pkg::*;
#(
  parameter int unsigned W  = LINK_W,
  parameter int unsigned CW = $clog2(2 * W + 1)
) (
  input  logic [W-1:0]  prev,   // word currently on the link
  input  logic [W-1:0]  data,   // body flit; wires W-1 and W-2 are ignored
  output logic [W-1:0]  enc,    // word to drive next
  output inv_e          inv,    // inversion applied
  output logic [CW-1:0] cost    // coupling cost of enc against prev
);

  localparam logic [W-1:0] ODD = ODD_PATTERN[W-1:0];

  logic [W-1:0]  cand_none, cand_odd, cand_full;
  logic [CW-1:0] c_none, c_odd, c_full;

  assign cand_none = {2'b00, data[W-3:0]};
  assign cand_odd  = cand_none ^ ODD;
  assign cand_full = ~cand_none;

  coupling_cost #(.W(W), .CW(CW)) u_cost_none (
    .prev(prev), .cur(cand_none),
    .t1(), .t2(), .t3(), .t4(), .t01(), .cost(c_none));
  coupling_cost #(.W(W), .CW(CW)) u_cost_odd (
    .prev(prev), .cur(cand_odd),
    .t1(), .t2(), .t3(), .t4(), .t01(), .cost(c_odd));
  coupling_cost #(.W(W), .CW(CW)) u_cost_full (
    .prev(prev), .cur(cand_full),
    .t1(), .t2(), .t3(), .t4(), .t01(), .cost(c_full));

  always_comb begin
    if (c_odd < c_none && c_odd < c_full) begin
      enc  = cand_odd;
      inv  = INV_ODD;
      cost = c_odd;
    end else if (c_full < c_none) begin
      enc  = cand_full;
      inv  = INV_FULL;
      cost = c_full;
    end else begin
      enc  = cand_none;
      inv  = INV_NONE;
      cost = c_none;
    end
  end

endmodule
