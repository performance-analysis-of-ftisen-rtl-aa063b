// ftisen_fabric: the switching datapath of the 16x16 FTISEN.
//
// Sources -> 16 MUX 4x1 -> 8 stage-0 SEs 2x5 -> 4 stage-1 SEs 8x2 -> 8
// last-stage SEs 2x2 -> 16 DEMUX 1x4 -> destinations, plus a direct link from
// every stage-0 SE j to last-stage SE j that skips stage 1. The links between
// the stages follow the network's connection rules (see ftisen_pkg):
//   source i   -> MUX (i + k*N/4) mod N, k = 0..3
//   MUX 2j,2j+1 -> stage-0 SE j (inputs 0, 1)
//   stage-0 SE j output 0 -> last-stage SE j input 1 (direct link)
//   stage-0 SE j output 1+t -> stage-1 SE t, input j
//   stage-1 SE 2r  outputs 0,1 -> last-stage SEs 4r+2, 4r+3 (input 0)
//   stage-1 SE 2r+1 outputs 0,1 -> last-stage SEs 4r, 4r+1 (input 0)
//   last-stage SE j outputs 0,1 -> DEMUX 2j, 2j+1
//   DEMUX m output l -> destination (m mod N/4) + l*N/4
// The network is circuit switched and combinational: `cfg` (from the router)
// sets every node, `fault` disables nodes, and a request on src[i] appears on
// the destination its circuit leads to in the same cycle. Each destination
// has four incoming DEMUX links; at most one of them may carry a request, which
// an assertion checks.
module ftisen_fabric
  import ftisen_pkg::*;
(
  input  flit_t      src [N],
  input  route_cfg_t cfg,
  input  fault_t     fault,
  output flit_t      dst [N]
);

  flit_t mux_in  [N][4];
  flit_t mux_out [N];
  flit_t se0_in  [N_SE0][2];
  flit_t se0_out [N_SE0][SE0_OUT];
  flit_t se1_in  [N_SE1][SE1_IN];
  flit_t se1_out [N_SE1][2];
  flit_t sel_in  [N_SEL][2];
  flit_t sel_out [N_SEL][2];
  flit_t dmx_out [N][4];

  logic [0:0] se0_sel [N_SE0][SE0_OUT];
  logic [2:0] se1_sel [N_SE1][2];
  logic [0:0] sel_sel [N_SEL][2];

  // Link wiring between the stages.
  always_comb begin
    for (int m = 0; m < N; m++)
      for (int l = 0; l < 4; l++)
        mux_in[m][l] = src[mux_input_src(addr_t'(m), 2'(l))];
    for (int j = 0; j < N_SE0; j++) begin
      se0_in[j][0] = mux_out[2*j];
      se0_in[j][1] = mux_out[2*j+1];
    end
    for (int t = 0; t < N_SE1; t++)
      for (int j = 0; j < SE1_IN; j++)
        se1_in[t][j] = se0_out[j][1+t];
    for (int L = 0; L < N_SEL; L++) begin
      sel_in[L][0] = se1_out[last_feeder_se1(2'(L / 2))][L % 2];
      sel_in[L][1] = se0_out[L][0];
    end
    for (int d = 0; d < N; d++) begin
      dst[d] = '0;
      for (int l = 0; l < 4; l++)
        if (dmx_out[(d % Q) + l*Q][dst_demux_port(addr_t'(d))].valid)
          dst[d] = dmx_out[(d % Q) + l*Q][dst_demux_port(addr_t'(d))];
    end
  end

  // Per-output selects in the unpacked form the SE ports take.
  always_comb begin
    for (int j = 0; j < N_SE0; j++)
      for (int o = 0; o < SE0_OUT; o++) se0_sel[j][o] = cfg.se0_sel[j][o];
    for (int k = 0; k < N_SE1; k++)
      for (int o = 0; o < 2; o++) se1_sel[k][o] = cfg.se1_sel[k][o];
    for (int L = 0; L < N_SEL; L++)
      for (int o = 0; o < 2; o++) sel_sel[L][o] = cfg.sel_sel[L][o];
  end

  for (genvar m = 0; m < N; m++) begin : g_mux
    ftisen_mux4 u_mux (
      .in(mux_in[m]), .en(cfg.mux_en[m]), .sel(cfg.mux_sel[m]),
      .fault(fault.mux[m]), .out(mux_out[m])
    );
  end

  for (genvar j = 0; j < N_SE0; j++) begin : g_se0
    ftisen_se #(.IN(2), .OUT(SE0_OUT)) u_se (
      .in(se0_in[j]), .en(cfg.se0_en[j]), .sel(se0_sel[j]),
      .fault(fault.se0[j]), .out(se0_out[j])
    );
  end

  for (genvar k = 0; k < N_SE1; k++) begin : g_se1
    ftisen_se #(.IN(SE1_IN), .OUT(2)) u_se (
      .in(se1_in[k]), .en(cfg.se1_en[k]), .sel(se1_sel[k]),
      .fault(fault.se1[k]), .out(se1_out[k])
    );
  end

  for (genvar L = 0; L < N_SEL; L++) begin : g_sel
    ftisen_se #(.IN(2), .OUT(2)) u_se (
      .in(sel_in[L]), .en(cfg.sel_en[L]), .sel(sel_sel[L]),
      .fault(fault.sel[L]), .out(sel_out[L])
    );
  end

  for (genvar m = 0; m < N; m++) begin : g_dmx
    ftisen_demux4 u_dmx (
      .in(sel_out[m/2][m%2]), .en(cfg.dmx_en[m]), .sel(cfg.dmx_sel[m]),
      .fault(fault.dmx[m]), .out(dmx_out[m])
    );
  end

  // A destination accepts at most one request per transfer cycle.
  always_comb begin
    for (int d = 0; d < N; d++) begin
      automatic int hits = 0;
      for (int l = 0; l < 4; l++)
        if (dmx_out[(d % Q) + l*Q][dst_demux_port(addr_t'(d))].valid) hits++;
      assert (hits <= 1) else $error("two circuits reach destination %0d", d);
    end
  end

endmodule
