// noc_path_model: behavioural stand-in for the routers and wires between two network
// interfaces, for simulation only (not synthesizable intent, not part of the design).
//
// A chain of HOPS one-word stages, each a router's output register; every stage may refuse
// a word at random (STALL_PCT percent of cycles) to imitate contention in a wormhole
// network. Words are never reordered or altered, so the encoding decision taken at the
// source holds for every link of the path. Valid/ready in and out, kind sideband alongside.
module noc_path_model
  import nocenc_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter int unsigned HOPS      = 3,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_kind_e    in_kind,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output flit_kind_e    out_kind,
  output logic [W-1:0]  out_data
);
  // Stage h holds the word that hop h has taken; up_* is what is offered to hop h.
  logic [HOPS-1:0] sv, go, hr;
  flit_kind_e      sk [HOPS];
  logic [W-1:0]    sd [HOPS];

  assign in_ready  = hr[0];
  assign out_valid = sv[HOPS-1];
  assign out_kind  = sk[HOPS-1];
  assign out_data  = sd[HOPS-1];

  always @(negedge clk) for (int h = 0; h < HOPS; h++) go[h] <= ($urandom % 100) >= STALL_PCT;

  for (genvar h = 0; h < HOPS; h++) begin : g_hop
    logic         up_v, down_r;
    flit_kind_e   up_k;
    logic [W-1:0] up_d;
    if (h == 0) begin : g_first
      assign up_v = in_valid;
      assign up_k = in_kind;
      assign up_d = in_data;
    end else begin : g_next
      assign up_v = sv[h-1];
      assign up_k = sk[h-1];
      assign up_d = sd[h-1];
    end
    if (h == HOPS - 1) begin : g_last
      assign down_r = out_ready;
    end else begin : g_mid
      assign down_r = hr[h+1];
    end
    assign hr[h] = go[h] && (!sv[h] || down_r);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sv[h] <= 1'b0;
        sk[h] <= KIND_BODY;
        sd[h] <= '0;
      end else if (hr[h]) begin
        sv[h] <= up_v;
        if (up_v) begin
          sk[h] <= up_k;
          sd[h] <= up_d;
        end
      end else if (down_r) begin
        sv[h] <= 1'b0;             // the word left downstream while this hop took nothing
      end
    end
  end
endmodule
