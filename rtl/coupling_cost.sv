// coupling_cost: transition-type counter for one link transition.
//
// Given the word now on the link (prev) and a candidate next word (cur), it
// classifies the transition of every pair of adjacent wires (i, i+1):
//   Type I   - exactly one of the two wires switches;
//   Type II  - both switch in opposite directions;
//   Type III - both switch in the same direction;
//   Type IV  - neither switches.
// It also counts the 0->1 self transitions. The coupling cost is the
// coupling power model with Type I weighted 1 and Type II weighted 2 (Types
// III and IV draw no coupling current): cost = T1 + 2*T2. The encoders
// compare this cost between candidate encodings; like the decision rules
// they implement, it leaves the self transitions out.
//
// Purely combinational. All counts are CW bits wide, enough for 2*(W-1).
module coupling_cost #(
  parameter int unsigned W  = nocenc_pkg::LINK_W,
  parameter int unsigned CW = $clog2(2 * W + 1)
) (
  input  logic [W-1:0]  prev,    // word currently driven on the link
  input  logic [W-1:0]  cur,     // candidate next word
  output logic [CW-1:0] t1,      // Type I pairs
  output logic [CW-1:0] t2,      // Type II pairs
  output logic [CW-1:0] t3,      // Type III pairs
  output logic [CW-1:0] t4,      // Type IV pairs
  output logic [CW-1:0] t01,     // wires switching 0 -> 1
  output logic [CW-1:0] cost     // T1 + 2*T2
);

  logic [W-1:0] sw;  // wire switches
  assign sw = prev ^ cur;

  always_comb begin
    t1  = '0;
    t2  = '0;
    t3  = '0;
    t4  = '0;
    t01 = '0;
    for (int unsigned i = 0; i < W; i++)
      if (!prev[i] && cur[i]) t01 = t01 + 1'b1;
    for (int unsigned i = 0; i + 1 < W; i++) begin
      unique case ({sw[i+1], sw[i]})
        2'b00: t4 = t4 + 1'b1;
        2'b01,
        2'b10: t1 = t1 + 1'b1;
        // both switched: opposite directions exactly when the new values differ
        default: if (cur[i+1] != cur[i]) t2 = t2 + 1'b1;
                 else                   t3 = t3 + 1'b1;
      endcase
    end
  end

  assign cost = t1 + (t2 << 1);

endmodule
