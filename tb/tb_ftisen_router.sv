// tb_ftisen_router: self-checking test of the FTISEN path-setup router.
//
// Runs many transfer cycles with random requests and random fault sets
// (none, one faulty node, or several) and compares, per source, the routing
// outcome, the stage-0 and stage-1 candidates used and the clocks spent with
// an independent reference model (ftisen_ref_model.svh). It also checks the clock
// count from `start` to `xfer` and the directed example of source 0 to
// destination 5 (direct link through MUX 0 in 2 clocks). A watchdog ends a
// hung run.
module tb_ftisen_router;
  import ftisen_pkg::*;
  `include "ftisen_ref_model.svh"

  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  logic [N-1:0] req_valid;
  addr_t      req_dst [N];
  fault_t     fault;
  logic       busy, xfer, done;
  route_cfg_t cfg;
  route_res_t res [N];
  logic [1:0] res_cand0 [N];
  logic [1:0] res_cand1 [N];
  logic [7:0] res_cycles [N];
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  ftisen_router dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Run one transfer cycle and compare with the model.
  task automatic transfer(ref_model mdl, bit req [NN], int dst [NN]);
    int clocks;
    for (int i = 0; i < N; i++) begin
      req_valid[i] = req[i];
      req_dst[i]   = addr_t'(dst[i]);
    end
    fault.mux = '0; fault.se0 = '0; fault.se1 = '0; fault.sel = '0; fault.dmx = '0;
    for (int i = 0; i < N; i++)     begin fault.mux[i] = mdl.f_mux[i]; fault.dmx[i] = mdl.f_dmx[i]; end
    for (int i = 0; i < N_SE0; i++) begin fault.se0[i] = mdl.f_se0[i]; fault.sel[i] = mdl.f_sel[i]; end
    for (int i = 0; i < N_SE1; i++) fault.se1[i] = mdl.f_se1[i];
    mdl.run(req, dst);
    @(negedge clk);
    start = 1'b1;
    clocks = 0;
    @(negedge clk);
    start = 1'b0;
    clocks = 1;
    while (!xfer) begin
      @(negedge clk);
      clocks++;
      if (clocks > 2000) break;
    end
    check_int("clocks start to xfer", clocks, mdl.total_clocks);
    for (int i = 0; i < N; i++) begin
      check_int($sformatf("src %0d result", i), int'(res[i]), mdl.res[i]);
      if (mdl.res[i] != M_NONE)
        check_int($sformatf("src %0d clocks", i), int'(res_cycles[i]), mdl.cycles[i]);
      if (mdl.res[i] != M_NONE && mdl.res[i] != M_DROP0)
        check_int($sformatf("src %0d stage-0 choice", i), int'(res_cand0[i]), mdl.cand0[i]);
      if (mdl.res[i] == M_STAGE1 || mdl.res[i] == M_DROPL)
        check_int($sformatf("src %0d stage-1 choice", i), int'(res_cand1[i]), mdl.cand1[i]);
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
    req_valid = '0;
    fault = '0;
    for (int i = 0; i < N; i++) req_dst[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // directed: source 0 to destination 5, no faults
    mdl.clear_faults();
    foreach (req[i]) begin req[i] = 0; dst[i] = 0; end
    req[0] = 1; dst[0] = 5;
    transfer(mdl, req, dst);
    check_int("0->5 direct", int'(res[0]), int'(R_DIRECT));
    check_int("0->5 clocks", int'(res_cycles[0]), 2);
    check_int("0->5 uses MUX 0", int'(cfg.mux_en[0]), 1);

    // directed: primary SE 0 faulty -> first alternate (MUX 4, SE 2)
    mdl.f_se0[0] = 1;
    transfer(mdl, req, dst);
    check_int("0->5 reroute", int'(res_cand0[0]), 1);
    check_int("0->5 via MUX 4", int'(cfg.mux_en[4]), 1);

    // random transfer cycles
    for (int t = 0; t < 600; t++) begin
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
      if (t % 50 == 7) foreach (mdl.f_se1[i]) mdl.f_se1[i] = 1;   // stage 1 down
      if (t % 50 == 9) for (int k = 0; k < 4; k++) mdl.f_mux[(3 + 4*k) % NN] = 1;
      p = 1 + $urandom % 10;
      foreach (req[i]) begin
        req[i] = ($urandom % 10) < p;
        dst[i] = $urandom % NN;
      end
      transfer(mdl, req, dst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
