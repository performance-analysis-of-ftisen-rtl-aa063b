// ftisen_pkg: sizes, types and link-pattern functions shared by the FTISEN
// (Fault Tolerant Irregular Shuffle Exchange Network) RTL.
//
// The network is the 16x16 configuration: N sources feed N 4x1 MUXes, which
// feed N/2 stage-0 SEs (2x5), N/4 stage-1 SEs (8x2), N/2 last-stage SEs (2x2),
// N 1x4 DEMUXes and N destinations. The link functions below encode the
// connection rules of the network: source i reaches MUX (i + k*N/4) mod N for
// links k = 0..3, MUX 2j and 2j+1 feed stage-0 SE j, SE j of stage 0 has a
// direct link to last-stage SE j and one link to each of the four stage-1 SEs,
// stage-1 SE 2r feeds last-stage SEs 4r+2 and 4r+3 while SE 2r+1 feeds 4r and
// 4r+1, last-stage SE j feeds DEMUX 2j and 2j+1, and destination i is reached
// from DEMUX (i + k*N/4) mod N. The port numbering inside a MUX, SE or DEMUX
// (which input index a link lands on) is this design's own convention, as are
// the payload width and the packet format.
package ftisen_pkg;

  localparam int N       = 16;          // network size N x N
  localparam int AW      = $clog2(N);   // address bits, n = log2 N
  localparam int Q       = N / 4;       // link stride of sources and destinations
  localparam int N_SE0   = N / 2;       // stage 0: N/2 SEs of 2x5
  localparam int N_SE1   = N / 4;       // stage 1: N/4 SEs of 8x2
  localparam int N_SEL   = N / 2;       // last stage: N/2 SEs of 2x2
  localparam int SE0_OUT = 5;
  localparam int SE1_IN  = 8;
  localparam int DATA_W  = 8;           // payload bits per request

  typedef logic [AW-1:0] addr_t;

  // One request travelling through a set-up circuit.
  typedef struct packed {
    logic              valid;
    addr_t             src;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Per-node fault flags. A faulty node passes nothing.
  typedef struct packed {
    logic [N-1:0]     mux;
    logic [N_SE0-1:0] se0;
    logic [N_SE1-1:0] se1;
    logic [N_SEL-1:0] sel;
    logic [N-1:0]     dmx;
  } fault_t;

  // Switch settings of every node, written by the router. An enable bit set
  // also marks the output (or the MUX / DEMUX) as busy for this transfer cycle.
  typedef struct packed {
    logic [N-1:0]                      mux_en;
    logic [N-1:0][1:0]                 mux_sel;   // which of the 4 sources
    logic [N_SE0-1:0][SE0_OUT-1:0]     se0_en;
    logic [N_SE0-1:0][SE0_OUT-1:0]     se0_sel;   // which of the 2 MUXes
    logic [N_SE1-1:0][1:0]             se1_en;
    logic [N_SE1-1:0][1:0][2:0]        se1_sel;   // which of the 8 stage-0 SEs
    logic [N_SEL-1:0][1:0]             sel_en;
    logic [N_SEL-1:0][1:0]             sel_sel;   // 0: from stage 1, 1: direct link
    logic [N-1:0]                      dmx_en;
    logic [N-1:0][1:0]                 dmx_sel;   // which of the 4 destinations
  } route_cfg_t;

  // Outcome of routing one request.
  typedef enum logic [2:0] {
    R_NONE   = 3'd0,  // no request
    R_DIRECT = 3'd1,  // stage 0 -> direct link -> last stage
    R_STAGE1 = 3'd2,  // stage 0 -> stage 1 -> last stage
    R_DROP0  = 3'd3,  // all four stage-0 choices faulty or busy
    R_DROP1  = 3'd4,  // all four stage-1 choices faulty or busy
    R_DROPL  = 3'd5   // last stage: destination already taken
  } route_res_t;

  // MUX reached by link k (0..3) of source s.
  function automatic addr_t src_link_mux(addr_t s, logic [1:0] k);
    return addr_t'(s + addr_t'(k) * addr_t'(Q));
  endfunction

  // Source wired to input l of MUX m (inverse of src_link_mux).
  function automatic addr_t mux_input_src(addr_t m, logic [1:0] l);
    return addr_t'((m % addr_t'(Q)) + addr_t'(l) * addr_t'(Q));
  endfunction

  // Input port of a MUX that source s arrives on.
  function automatic logic [1:0] src_mux_port(addr_t s);
    return 2'(s / addr_t'(Q));
  endfunction

  // Stage-0 candidate order of Algorithm 2 for source s: the two links into
  // subnetwork a = MSB of the destination first (primary, first alternate),
  // then the two into the other subnetwork (second, third alternate).
  // Within a subnetwork the link order k = 0..3 gives primary before secondary.
  function automatic logic [1:0] st0_link(addr_t s, logic a, logic [1:0] c);
    logic [1:0] order [4];
    int n;
    n = 0;
    for (int k = 0; k < 4; k++)
      if (src_link_mux(s, 2'(k))[AW-1] == a) begin order[n] = 2'(k); n++; end
    for (int k = 0; k < 4; k++)
      if (src_link_mux(s, 2'(k))[AW-1] != a) begin order[n] = 2'(k); n++; end
    return order[c];
  endfunction

  // Last-stage SE fed by output o of stage-1 SE k.
  function automatic logic [AW-2:0] se1_to_last(logic [1:0] k, logic o);
    logic [AW-2:0] r4;
    r4 = (AW-1)'({k[1], 2'b00});
    return k[0] ? (r4 | (AW-1)'(o)) : (r4 | (AW-1)'({1'b1, o}));
  endfunction

  // Stage-1 SE whose output leads to last-stage SE L (inverse of se1_to_last).
  // Only the upper two bits L[2:1] of the SE number matter.
  function automatic logic [1:0] last_feeder_se1(logic [1:0] L_hi);
    return {L_hi[1], ~L_hi[0]};
  endfunction

  // Primary stage-1 SE for destination d (given its two upper bits): the one
  // leading to DEMUX d, the destination's first link.
  function automatic logic [1:0] se1_primary(logic [AW-1:AW-2] d_hi);
    return last_feeder_se1(d_hi);
  endfunction

  // Destination wired to output l of DEMUX m.
  function automatic addr_t demux_output_dst(addr_t m, logic [1:0] l);
    return addr_t'((m % addr_t'(Q)) + addr_t'(l) * addr_t'(Q));
  endfunction

  // Output port of a DEMUX that leads to destination d.
  function automatic logic [1:0] dst_demux_port(addr_t d);
    return 2'(d / addr_t'(Q));
  endfunction

endpackage
