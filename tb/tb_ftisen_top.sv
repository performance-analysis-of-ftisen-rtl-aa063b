// tb_ftisen_top: end-to-end test of the 16x16 FTISEN at its default size.
//
// Each transfer cycle drives random requests (random source load, random
// destinations and payloads) and a random fault set into ftisen_top, waits
// for `done` and checks:
//   - every request the router accepted arrives at its destination with the
//     right source number and payload, and no destination receives anything
//     else;
//   - every outcome and routing time matches the reference model;
//   - with at most one faulty node (MUX, SE or DEMUX) and a single request,
//     the request is always delivered (the network tolerates any single
//     node fault).
// It counts how often each mechanism happened: direct link, path through
// stage 1, stage-0 rerouting, switch to the other subnetwork, direct link
// abandoned for stage 1, stage-1 rerouting, and drops at stage 0, at stage 1
// and at the last stage. A mechanism that never happened is a failure.
module tb_ftisen_top;
  import ftisen_pkg::*;
  `include "ftisen_ref_model.svh"

  logic              clk = 1'b0;
  logic              rst_n;
  logic              start;
  logic [N-1:0]      src_req;
  addr_t             src_dst  [N];
  logic [DATA_W-1:0] src_data [N];
  fault_t            fault;
  logic              busy, done;
  route_res_t        route_res [N];
  logic [1:0]        route_cand0 [N];
  logic [1:0]        route_cand1 [N];
  logic [7:0]        route_cycles [N];
  logic [N-1:0]      dst_valid;
  addr_t             dst_src  [N];
  logic [DATA_W-1:0] dst_data [N];
  int                checks = 0;
  int                failures = 0;

  // mechanism counters
  int n_direct = 0, n_stage1 = 0, n_reroute0 = 0, n_subnet = 0,
      n_fallback = 0, n_reroute1 = 0, n_drop0 = 0, n_drop1 = 0, n_dropl = 0,
      n_single_fault = 0;

  always #5 clk = ~clk;

  ftisen_top dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic transfer(ref_model mdl, bit req [NN], int dst [NN]);
    int clocks;
    logic [DATA_W-1:0] pay [N];
    for (int i = 0; i < N; i++) begin
      pay[i]      = DATA_W'($urandom);
      src_req[i]  = req[i];
      src_dst[i]  = addr_t'(dst[i]);
      src_data[i] = pay[i];
    end
    fault = '0;
    for (int i = 0; i < N; i++)     begin fault.mux[i] = mdl.f_mux[i]; fault.dmx[i] = mdl.f_dmx[i]; end
    for (int i = 0; i < N_SE0; i++) begin fault.se0[i] = mdl.f_se0[i]; fault.sel[i] = mdl.f_sel[i]; end
    for (int i = 0; i < N_SE1; i++) fault.se1[i] = mdl.f_se1[i];
    mdl.run(req, dst);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    clocks = 1;
    while (!done && clocks < 2000) begin
      @(negedge clk);
      clocks++;
    end
    // done follows the router's transfer clock by one register stage
    check($sformatf("clocks %0d vs %0d", clocks, mdl.total_clocks + 1),
          clocks == mdl.total_clocks + 1);
    for (int i = 0; i < N; i++) begin
      check($sformatf("src %0d result %0d vs %0d", i, route_res[i], mdl.res[i]),
            int'(route_res[i]) == mdl.res[i]);
      if (mdl.res[i] != M_NONE)
        check($sformatf("src %0d cycles", i), int'(route_cycles[i]) == mdl.cycles[i]);
      case (mdl.res[i])
        M_DIRECT: n_direct++;
        M_STAGE1: n_stage1++;
        M_DROP0:  n_drop0++;
        M_DROP1:  n_drop1++;
        M_DROPL:  n_dropl++;
        default: ;
      endcase
      if (mdl.res[i] == M_DIRECT || mdl.res[i] == M_STAGE1 || mdl.res[i] == M_DROPL) begin
        if (mdl.cand0[i] > 0) n_reroute0++;
        if (mdl.cand0[i] > 1) n_subnet++;
        if (int'(route_cand0[i]) != mdl.cand0[i]) check($sformatf("src %0d cand0", i), 0);
      end
      if (mdl.res[i] == M_STAGE1 && mdl.direct_eligible[i]) n_fallback++;
      if ((mdl.res[i] == M_STAGE1 || mdl.res[i] == M_DROPL) && mdl.cand1[i] > 0) n_reroute1++;
    end
    // delivery: destination d must hold exactly the accepted request for d
    for (int d = 0; d < N; d++) begin
      int from;
      from = -1;
      for (int i = 0; i < N; i++)
        if ((mdl.res[i] == M_DIRECT || mdl.res[i] == M_STAGE1) && dst[i] == d) from = i;
      check($sformatf("dst %0d valid=%0d expected from %0d", d, dst_valid[d], from),
            dst_valid[d] == (from >= 0));
      if (from >= 0)
        check($sformatf("dst %0d payload from %0d", d, from),
              dst_src[d] == addr_t'(from) && dst_data[d] == pay[from]);
    end
    @(negedge clk);
  endtask

  initial begin
    ref_model mdl;
    bit req [NN];
    int dst [NN];
    mdl = new();
    rst_n = 1'b0;
    start = 1'b0;
    src_req = '0;
    fault = '0;
    for (int i = 0; i < N; i++) begin src_dst[i] = '0; src_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // single requests under every single node fault: always delivered
    for (int f = 0; f < N_SE0 + N_SE1 + N_SEL + 2*N + 1; f++)
      for (int t = 0; t < 16; t++) begin
        mdl.clear_faults();
        if (f < N_SE0) mdl.f_se0[f] = 1;
        else if (f < N_SE0 + N_SE1) mdl.f_se1[f - N_SE0] = 1;
        else if (f < N_SE0 + N_SE1 + N_SEL) mdl.f_sel[f - N_SE0 - N_SE1] = 1;
        else if (f < N_SE0 + N_SE1 + N_SEL + N) mdl.f_mux[f - N_SE0 - N_SE1 - N_SEL] = 1;
        else if (f < N_SE0 + N_SE1 + N_SEL + 2*N) mdl.f_dmx[f - N_SE0 - N_SE1 - N_SEL - N] = 1;
        foreach (req[i]) begin req[i] = 0; dst[i] = 0; end
        begin
          int s;
          s = $urandom % NN;
          req[s] = 1;
          dst[s] = $urandom % NN;
          transfer(mdl, req, dst);
          check($sformatf("single fault %0d: %0d->%0d delivered", f, s, dst[s]),
                dst_valid[dst[s]] && dst_src[dst[s]] == addr_t'(s));
          n_single_fault++;
        end
      end

    // random traffic, faults and loads
    for (int t = 0; t < 400; t++) begin
      int nf, p;
      mdl.clear_faults();
      nf = (t % 3 == 0) ? 0 : (t % 3 == 1) ? 1 : 2 + $urandom % 8;
      for (int f = 0; f < nf; f++)
        case ($urandom % 5)
          0: mdl.f_mux[$urandom % NN]     = 1;
          1: mdl.f_se0[$urandom % (NN/2)] = 1;
          2: mdl.f_se1[$urandom % (NN/4)] = 1;
          3: mdl.f_sel[$urandom % (NN/2)] = 1;
          default: mdl.f_dmx[$urandom % NN] = 1;
        endcase
      if (t % 40 == 7) foreach (mdl.f_se1[i]) mdl.f_se1[i] = 1;
      if (t % 40 == 9) for (int k = 0; k < 4; k++) mdl.f_mux[(t / 40 + 4*k) % NN] = 1;
      p = 1 + $urandom % 10;
      foreach (req[i]) begin
        req[i] = ($urandom % 10) < p;
        dst[i] = $urandom % NN;
      end
      transfer(mdl, req, dst);
    end

    $display("direct=%0d stage1=%0d reroute0=%0d subnet_switch=%0d direct_fallback=%0d reroute1=%0d drop0=%0d drop1=%0d drop_last=%0d single_fault_runs=%0d",
             n_direct, n_stage1, n_reroute0, n_subnet, n_fallback, n_reroute1,
             n_drop0, n_drop1, n_dropl, n_single_fault);
    check("direct link used",           n_direct   > 0);
    check("stage-1 path used",          n_stage1   > 0);
    check("stage-0 rerouting",          n_reroute0 > 0);
    check("subnetwork switch",          n_subnet   > 0);
    check("direct link fallback",       n_fallback > 0);
    check("stage-1 rerouting",          n_reroute1 > 0);
    check("drop at stage 0",            n_drop0    > 0);
    check("drop at stage 1",            n_drop1    > 0);
    check("drop at last stage",         n_dropl    > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
