// accel_interconnect: the memory path between the lanes of one accelerator, the
// DRAM channels and the controller core.
//
// Outbound, the lanes are split into MEM_PORTS equal groups (lane l uses channel
// l / (NUM_LANES / MEM_PORTS)); in each group a round-robin arbiter forwards one
// memory request per cycle to its channel. Inbound, event messages from the DRAM
// channels and from the controller core (the last input) are routed by the
// networkID of their event word (its low bits select the lane); a round-robin
// arbiter per lane picks one message per cycle when several target the same lane.
// The interconnect keeps no state about requests in flight: a response is routed
// only by the networkID it carries.
//
// The document shows lanes connected directly to DRAM without a cache hierarchy
// but does not describe this network; the grouping, the arbitration and the
// one-message-per-cycle channels are this design's choices. MEM_PORTS = 8 matches
// the eight HBM2e channels of the evaluated memory system.
//
// Timing: fully combinational (valid/ready passes straight through); only the
// arbiters' priority pointers are registered. out_conflict / in_conflict are high
// in a cycle where some requester lost arbitration.
module accel_interconnect
  import updown_pkg::*;
#(
  parameter int unsigned NUM_LANES = 64,
  parameter int unsigned MEM_PORTS = 8,
  parameter int unsigned N_IN      = MEM_PORTS + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lanes -> interconnect
  input  logic       [NUM_LANES-1:0]  lane_out_valid,
  output logic       [NUM_LANES-1:0]  lane_out_ready,
  input  mem_req_t   [NUM_LANES-1:0]  lane_out_req,
  // interconnect -> DRAM channels
  output logic       [MEM_PORTS-1:0]  mem_req_valid,
  input  logic       [MEM_PORTS-1:0]  mem_req_ready,
  output mem_req_t   [MEM_PORTS-1:0]  mem_req,
  // DRAM responses and controller-core events -> interconnect
  input  logic       [N_IN-1:0]       in_valid,
  output logic       [N_IN-1:0]       in_ready,
  input  event_msg_t [N_IN-1:0]       in_msg,
  // interconnect -> lanes
  output logic       [NUM_LANES-1:0]  lane_in_valid,
  input  logic       [NUM_LANES-1:0]  lane_in_ready,
  output event_msg_t [NUM_LANES-1:0]  lane_in_msg,
  output logic                        out_conflict,
  output logic                        in_conflict
);
  localparam int unsigned G  = NUM_LANES / MEM_PORTS;
  localparam int unsigned LB = (NUM_LANES > 1) ? $clog2(NUM_LANES) : 1;
  localparam int unsigned GB = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned IB = (N_IN > 1) ? $clog2(N_IN) : 1;

  // ---------------- outbound: lanes -> channels ----------------
  logic [MEM_PORTS-1:0] grp_conflict;

  for (genvar p = 0; p < MEM_PORTS; p++) begin : g_out
    logic [G-1:0]  greq, ggrant;
    logic [GB-1:0] gidx;
    assign greq = lane_out_valid[p*G +: G];

    rr_arbiter #(.N(G)) u_arb (
      .clk, .rst_n, .req(greq), .advance(mem_req_ready[p]),
      .grant(ggrant), .grant_idx(gidx)
    );

    assign mem_req_valid[p]          = |greq;
    assign mem_req[p]                = lane_out_req[p*G + int'(gidx)];
    assign lane_out_ready[p*G +: G]  = ggrant & {G{mem_req_ready[p]}};
    assign grp_conflict[p]           = (greq & (greq - 1'b1)) != '0;
  end
  assign out_conflict = |grp_conflict;

  // ---------------- inbound: sources -> lanes ----------------
  logic [NUM_LANES-1:0][N_IN-1:0] lgrant;
  logic [NUM_LANES-1:0]           lane_conflict;

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_in
    logic [N_IN-1:0] lreq;
    logic [IB-1:0]   lidx;
    for (genvar i = 0; i < N_IN; i++) begin : g_req
      assign lreq[i] = in_valid[i] && (in_msg[i].ev.nwid[LB-1:0] == LB'(l));
    end

    rr_arbiter #(.N(N_IN)) u_arb (
      .clk, .rst_n, .req(lreq), .advance(lane_in_ready[l]),
      .grant(lgrant[l]), .grant_idx(lidx)
    );

    assign lane_in_valid[l] = |lreq;
    assign lane_in_msg[l]   = in_msg[int'(lidx)];
    assign lane_conflict[l] = (lreq & (lreq - 1'b1)) != '0;
  end
  assign in_conflict = |lane_conflict;

  always_comb begin
    in_ready = '0;
    for (int l = 0; l < NUM_LANES; l++)
      in_ready |= lgrant[l] & {N_IN{lane_in_ready[l]}};
  end

  initial assert (NUM_LANES % MEM_PORTS == 0)
    else $error("NUM_LANES must be a multiple of MEM_PORTS");
endmodule
