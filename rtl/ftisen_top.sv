// ftisen_top: a 16x16 Fault Tolerant Irregular Shuffle Exchange Network.
//
// N sources (processors) send requests to N destinations (memory modules)
// through a three-stage irregular multistage network with redundant paths.
// Each request can enter through four stage-0 switching elements and reach its
// destination either over a direct stage-0 -> last-stage link or through any
// of the four stage-1 SEs. Faulty or busy nodes are therefore bypassed.
//
// Operation is in transfer cycles. The sources present src_req / src_dst /
// src_data and pulse `start`. The router (ftisen_router) then sets up a
// circuit for each request, source by source, rerouting around the nodes
// flagged in `fault` and around nodes already taken by earlier requests. It
// drops a request that finds no path. When all sources are handled, the
// circuits carry the payloads through the fabric (ftisen_fabric) in one clock,
// and the results are registered:
//   dst_valid[d], dst_src[d], dst_data[d]  request that reached destination d
//   route_res[i]                           outcome for source i
//   route_cand0/1[i]                       stage-0 / stage-1 choice taken
//                                          (0 primary, 1..3 alternates)
//   route_cycles[i]                        clocks spent routing source i
// `done` pulses one clock after the transfer, with outputs valid from then
// until the next `start`. The sources must hold src_data from `start` to
// `done`, and `fault` must stay constant over a transfer cycle.
// The topology and the routing rules follow the network's definition. The
// transfer-cycle protocol, serial routing and the port list are this design's
// own.
module ftisen_top
  import ftisen_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      src_req,
  input  addr_t             src_dst  [N],
  input  logic [DATA_W-1:0] src_data [N],
  input  fault_t            fault,
  output logic              busy,
  output logic              done,
  output route_res_t        route_res [N],
  output logic [1:0]        route_cand0 [N],
  output logic [1:0]        route_cand1 [N],
  output logic [7:0]        route_cycles [N],
  output logic [N-1:0]      dst_valid,
  output addr_t             dst_src  [N],
  output logic [DATA_W-1:0] dst_data [N]
);

  route_cfg_t cfg;
  logic       xfer;
  logic       rt_done;
  flit_t      src_flit [N];
  flit_t      dst_flit [N];

  ftisen_router u_router (
    .clk, .rst_n, .start,
    .req_valid (src_req),
    .req_dst   (src_dst),
    .fault,
    .busy,
    .xfer,
    .done      (rt_done),
    .cfg,
    .res       (route_res),
    .res_cand0 (route_cand0),
    .res_cand1 (route_cand1),
    .res_cycles(route_cycles)
  );

  // A source drives its link only when its circuit was set up.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      src_flit[i].valid = src_req[i] &&
                          (route_res[i] == R_DIRECT || route_res[i] == R_STAGE1);
      src_flit[i].src   = addr_t'(i);
      src_flit[i].data  = src_data[i];
    end
  end

  ftisen_fabric u_fabric (
    .src  (src_flit),
    .cfg,
    .fault,
    .dst  (dst_flit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done      <= 1'b0;
      dst_valid <= '0;
      for (int d = 0; d < N; d++) begin
        dst_src[d]  <= '0;
        dst_data[d] <= '0;
      end
    end else begin
      done <= rt_done;
      if (start && !busy) dst_valid <= '0;
      if (xfer) begin
        for (int d = 0; d < N; d++) begin
          dst_valid[d] <= dst_flit[d].valid;
          dst_src[d]   <= dst_flit[d].src;
          dst_data[d]  <= dst_flit[d].data;
        end
      end
    end
  end

endmodule
