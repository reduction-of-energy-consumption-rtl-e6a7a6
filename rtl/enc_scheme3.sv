// enc_scheme3: encoding logic of scheme III (odd, even, full or no
// inversion).
//
// Scheme III adds even inversion to scheme II. A Type I pair behaves
// differently under odd and even inversion: it becomes Type IV when the
// switching wire is the one inverted, and Type II or III when the stable
// wire is. Offering both lets the encoder pick whichever saves more.
//
// Wire W-1 (odd) is the inversion bit and wire W-2 (even) the even-wire
// marker; both are cleared before encoding, so after the inversion wire W-1
// tells whether the odd wires were inverted and wire W-2 whether the even
// wires were. The payload is on wires W-3..0. Four candidates are costed
// (T1 + 2*T2 against the word on the link). No inversion is kept unless an
// inversion is strictly cheaper; among inversions of equal cost the later
// one in the order odd, even, full wins, which reduces to the scheme II rule
// when even inversion is left out. With W-1 (odd) wire pairs only odd and
// even inversion, or none and full, can cost the same, so in practice the
// rule means: even beats odd on a tie. The tie order and the marker wire are
// this design's choices.
//
// Purely combinational; the sender NI registers the result onto the link.
module enc_scheme3
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

  localparam logic [W-1:0] ODD  = ODD_PATTERN[W-1:0];
  localparam logic [W-1:0] EVEN = EVEN_PATTERN[W-1:0];

  logic [W-1:0]  cand [4];
  logic [CW-1:0] c    [4];

  assign cand[INV_NONE] = {2'b00, data[W-3:0]};
  assign cand[INV_ODD]  = cand[INV_NONE] ^ ODD;
  assign cand[INV_EVEN] = cand[INV_NONE] ^ EVEN;
  assign cand[INV_FULL] = ~cand[INV_NONE];

  for (genvar k = 0; k < 4; k++) begin : g_cost
    coupling_cost #(.W(W), .CW(CW)) u_cost (
      .prev(prev), .cur(cand[k]),
      .t1(), .t2(), .t3(), .t4(), .t01(), .cost(c[k]));
  end

  always_comb begin
    inv  = INV_NONE;
    cost = c[INV_NONE];
    if (c[INV_ODD] < cost) begin
      inv  = INV_ODD;
      cost = c[INV_ODD];
    end
    if (c[INV_EVEN] < cost || (c[INV_EVEN] == cost && inv != INV_NONE)) begin
      inv  = INV_EVEN;
      cost = c[INV_EVEN];
    end
    if (c[INV_FULL] < cost || (c[INV_FULL] == cost && inv != INV_NONE)) begin
      inv  = INV_FULL;
      cost = c[INV_FULL];
    end
    enc = cand[inv];
  end

endmodule
