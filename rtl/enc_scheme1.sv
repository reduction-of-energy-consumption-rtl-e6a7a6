// enc_scheme1: encoding logic of scheme I (odd inversion or none).
//
// The body flit to send carries its payload on wires W-2..0; wire W-1 is the
// inversion bit and is cleared here. The block forms two candidates, the
// flit as is and the flit with every odd wire inverted (which sets the
// inversion bit), and measures the coupling cost T1 + 2*T2 of each against
// the word now on the link. Odd inversion turns Type II and Type III pairs
// into Type I and may turn a Type I pair into Type II, III or IV, so it is
// chosen only when its cost is strictly lower. The decoder then inverts the
// odd wires back whenever the inversion bit is high.
//
// Purely combinational; the sender NI registers the result onto the link.
// The strict-inequality tie rule and the neglect of self transitions in the
// decision follow the power-model derivation of the scheme; computing the
// two costs directly, instead of through a closed-form condition, is this
// design's choice and gives the same decision.
module enc_scheme1
  import nocenc_pkg::*;
#(
  parameter int unsigned W  = LINK_W,
  parameter int unsigned CW = $clog2(2 * W + 1)
) (
  input  logic [W-1:0]  prev,   // word currently on the link
  input  logic [W-1:0]  data,   // body flit; wire W-1 is ignored
  output logic [W-1:0]  enc,    // word to drive next
  output inv_e          inv,    // inversion applied
  output logic [CW-1:0] cost    // coupling cost of enc against prev
);

  localparam logic [W-1:0] ODD = ODD_PATTERN[W-1:0];

  logic [W-1:0]  cand_none, cand_odd;
  logic [CW-1:0] c_none, c_odd;

  assign cand_none = {1'b0, data[W-2:0]};
  assign cand_odd  = cand_none ^ ODD;

  coupling_cost #(.W(W), .CW(CW)) u_cost_none (
    .prev(prev), .cur(cand_none),
    .t1(), .t2(), .t3(), .t4(), .t01(), .cost(c_none));
  coupling_cost #(.W(W), .CW(CW)) u_cost_odd (
    .prev(prev), .cur(cand_odd),
    .t1(), .t2(), .t3(), .t4(), .t01(), .cost(c_odd));

  always_comb begin
    if (c_odd < c_none) begin
      enc  = cand_odd;
      inv  = INV_ODD;
      cost = c_odd;
    end else begin
      enc  = cand_none;
      inv  = INV_NONE;
      cost = c_none;
    end
  end

endmodule
