// tb_noc_path: behavioural stand-in for the routers and links between the
// two network interfaces. HOPS one-flit stages pass flits on unchanged and
// in order, as wormhole routers do with the flits of one packet; each stage
// randomly refuses to move for a cycle, standing for contention in a
// router. It also measures, on every hop link, the coupling cost
// (Type I = 1, Type II = 2) and the 0->1 transitions of the words carried,
// sampling the wires of each link once per cycle.
module tb_noc_path
  import nocenc_pkg::*;
#(
  parameter int unsigned W    = LINK_W,
  parameter int unsigned HOPS = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  flit_kind_t   in_kind,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output flit_kind_t   out_kind,
  output logic [W-1:0] out_data,
  output longint       coupling_total,   // summed over all hop links
  output longint       self_total
);
  import tb_ref_pkg::*;

  logic             v    [HOPS+1];
  logic             r    [HOPS+1];
  flit_kind_t       k    [HOPS+1];
  logic [W-1:0]     d    [HOPS+1];
  logic             busy [HOPS];
  logic [W-1:0]     last [HOPS];

  assign v[0] = in_valid;
  assign k[0] = in_kind;
  assign d[0] = in_data;
  assign in_ready = r[0];
  assign out_valid = v[HOPS];
  assign out_kind = k[HOPS];
  assign out_data = d[HOPS];
  assign r[HOPS] = out_ready;

  for (genvar h = 0; h < HOPS; h++) begin : g_hop
    assign r[h] = !busy[h] && (!v[h+1] || r[h+1]);
    always @(negedge clk) busy[h] <= ($urandom % 6) == 0;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[h+1] <= 1'b0;
        k[h+1] <= '0;
        d[h+1] <= '0;
      end else begin
        if (r[h]) begin
          v[h+1] <= v[h];
          if (v[h]) begin
            k[h+1] <= k[h];
            d[h+1] <= d[h];
          end
        end else if (r[h+1]) begin
          v[h+1] <= 1'b0;
        end
      end
    end
  end

  // link activity: the link in front of hop h carries d[h]
  initial begin
    coupling_total = 0;
    self_total = 0;
  end
  always @(posedge clk) begin
    for (int h = 0; h < int'(HOPS); h++) begin
      if (rst_n) begin
        coupling_total += longint'(ref_cost(W, word_t'(last[h]), word_t'(d[h])));
        self_total     += longint'(ref_self(W, word_t'(last[h]), word_t'(d[h])));
      end
      last[h] = d[h];
    end
  end
endmodule
