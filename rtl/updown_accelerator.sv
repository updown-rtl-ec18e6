// updown_accelerator: one UpDown accelerator, NUM_LANES event-driven lanes placed
// directly in the DRAM memory path.
//
// Each lane issues split-transaction memory requests that carry a continuation
// word (the compute name to which the response is delivered) and keeps no record
// of them, so the accelerator's outstanding-request count is limited only by the
// issue rate of the lanes and by the memory system. Requests leave on MEM_PORTS
// DRAM channels; DRAM responses come back on the same number of response
// channels as event messages and are routed to the lane named in their event
// word. The controller core offloads work by sending event messages on the
// host_* port and loads the lanes' programs through the imem_* / pb_* port.
//
// From the document: 64 lanes per accelerator, 64 KB of scratchpad per lane
// (4 MB in all), up to 128 thread contexts per lane, lanes connected to DRAM
// without caches. This design's own: the channel count (set to the eight HBM2e
// channels of the evaluated system), the interconnect, queue depths and the
// program-load port. The DRAM, its controllers and the controller core are
// outside this module.
//
// Interface:
//   mem_req_*  request channels to DRAM, valid/ready, one request per cycle each.
//   mem_rsp_*  response channels from DRAM: event messages (event word =
//              the request's continuation with numOperands = payload words).
//   host_ev_*  event messages from the controller core.
//   imem_*     program load: write imem_data at imem_addr in lane imem_lane, or in
//              every lane when imem_bcast is high; pb_* sets Progbase likewise.
//   lane_busy, lane_stat, out_conflict, in_conflict: activity for counters.
module updown_accelerator
  import updown_pkg::*;
#(
  parameter int unsigned NUM_LANES  = 64,
  parameter int unsigned MEM_PORTS  = 8,
  parameter int unsigned THREADS    = 128,
  parameter int unsigned EQ_DEPTH   = 32,
  parameter int unsigned OB_DEPTH   = 64,
  parameter int unsigned OUT_DEPTH  = 4,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned SP_BYTES   = 65536,
  parameter logic [NWID_W-1:0] NWID_BASE = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic       [MEM_PORTS-1:0]    mem_req_valid,
  input  logic       [MEM_PORTS-1:0]    mem_req_ready,
  output mem_req_t   [MEM_PORTS-1:0]    mem_req,
  input  logic       [MEM_PORTS-1:0]    mem_rsp_valid,
  output logic       [MEM_PORTS-1:0]    mem_rsp_ready,
  input  event_msg_t [MEM_PORTS-1:0]    mem_rsp,
  input  logic                          host_ev_valid,
  output logic                          host_ev_ready,
  input  event_msg_t                    host_ev,
  input  logic                          imem_we,
  input  logic                          imem_bcast,
  input  logic [$clog2(NUM_LANES)-1:0]  imem_lane,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  logic [31:0]                   imem_data,
  input  logic                          pb_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] pb_data,
  output logic       [NUM_LANES-1:0]    lane_busy,
  output lane_stat_t [NUM_LANES-1:0]    lane_stat,
  output logic                          out_conflict,
  output logic                          in_conflict
);
  localparam int unsigned N_IN = MEM_PORTS + 1;

  logic       [NUM_LANES-1:0] lo_valid, lo_ready, li_valid, li_ready;
  mem_req_t   [NUM_LANES-1:0] lo_req;
  event_msg_t [NUM_LANES-1:0] li_msg;
  logic       [N_IN-1:0]      src_valid, src_ready;
  event_msg_t [N_IN-1:0]      src_msg;

  assign src_valid     = {host_ev_valid, mem_rsp_valid};
  assign src_msg       = {host_ev, mem_rsp};
  assign mem_rsp_ready = src_ready[MEM_PORTS-1:0];
  assign host_ev_ready = src_ready[MEM_PORTS];

  accel_interconnect #(.NUM_LANES(NUM_LANES), .MEM_PORTS(MEM_PORTS), .N_IN(N_IN)) u_ic (
    .clk, .rst_n,
    .lane_out_valid(lo_valid), .lane_out_ready(lo_ready), .lane_out_req(lo_req),
    .mem_req_valid, .mem_req_ready, .mem_req,
    .in_valid(src_valid), .in_ready(src_ready), .in_msg(src_msg),
    .lane_in_valid(li_valid), .lane_in_ready(li_ready), .lane_in_msg(li_msg),
    .out_conflict, .in_conflict
  );

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    wire sel = imem_bcast || (imem_lane == $clog2(NUM_LANES)'(l));
    updown_lane #(
      .THREADS(THREADS), .EQ_DEPTH(EQ_DEPTH), .OB_DEPTH(OB_DEPTH),
      .OUT_DEPTH(OUT_DEPTH), .IMEM_DEPTH(IMEM_DEPTH), .SP_BYTES(SP_BYTES)
    ) u_lane (
      .clk, .rst_n,
      .lane_id(NWID_BASE + NWID_W'(l)),
      .in_valid(li_valid[l]), .in_ready(li_ready[l]), .in_msg(li_msg[l]),
      .out_valid(lo_valid[l]), .out_ready(lo_ready[l]), .out_req(lo_req[l]),
      .imem_we(imem_we && sel), .imem_addr, .imem_data,
      .pb_we(pb_we && sel), .pb_data,
      .busy(lane_busy[l]), .stat(lane_stat[l])
    );
  end
endmodule
