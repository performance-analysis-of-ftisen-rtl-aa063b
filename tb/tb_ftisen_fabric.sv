// tb_ftisen_fabric: self-checking test of the FTISEN switching fabric.
//
// For every source/destination pair the test enumerates the path skeletons
// of the network: one of the four MUX links of the source, then either the
// direct link of that stage-0 SE or one of its four stage-1 SEs. It works out
// the node settings from the connection rules on its own (integer arithmetic,
// not the RTL's package functions), drives them as the configuration, and
// checks that the payload appears at the destination and nowhere else. A
// skeleton that cannot reach the destination must deliver nothing anywhere.
// Pairs whose address bit 1 agree have 4 x 5 = 20 usable paths, the others
// 4 x 4 = 16 (source 0 to destination 5 has 20). The same runs are then
// repeated with one random node marked faulty: a path over that node must
// deliver nothing.
module tb_ftisen_fabric;
  import ftisen_pkg::*;

  logic       clk = 1'b0;
  flit_t      src [N];
  route_cfg_t cfg;
  fault_t     fault;
  flit_t      dst [N];
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  ftisen_fabric dut (.src, .cfg, .fault, .dst);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage-1 SE k, output o -> last-stage SE (network rule)
  function automatic int s1_last(int k, int o);
    return (k % 2 == 0) ? 4*(k/2) + 2 + o : 4*(k/2) + o;
  endfunction

  // Sets cfg for one skeleton. route = -1 direct, 0..3 stage-1 SE.
  // Returns 0 when the skeleton cannot reach destination d.
  // Also reports the nodes the path crosses.
  function automatic bit build(int s, int d, int k, int route,
                               output int m, output int j, output int L,
                               output int dm);
    int o, q, port;
    cfg = '0;
    m = (s + k*(N/4)) % N;
    j = m / 2;
    q = N / 4;
    cfg.mux_en[m]  = 1'b1;
    cfg.mux_sel[m] = 2'(s / q);
    if (route < 0) begin
      L = j;
      cfg.se0_en[j][0]  = 1'b1;
      cfg.se0_sel[j][0] = 1'(m % 2);
    end else begin
      cfg.se0_en[j][1+route]  = 1'b1;
      cfg.se0_sel[j][1+route] = 1'(m % 2);
      // pick the stage-1 output whose last-stage SE serves d's residue
      L = -1;
      for (int oo = 0; oo < 2; oo++)
        if (((2*s1_last(route, oo)) % q) / 2 == (d % q) / 2) begin
          L = s1_last(route, oo); o = oo;
        end
      if (L < 0) return 1'b0;
      cfg.se1_en[route][o]  = 1'b1;
      cfg.se1_sel[route][o] = 3'(j);
    end
    // last stage: output to the DEMUX with the destination's residue
    port = -1;
    for (int oo = 0; oo < 2; oo++)
      if ((2*L + oo) % q == d % q) port = oo;
    if (port < 0) return 1'b0;
    dm = 2*L + port;
    cfg.sel_en[L][port]  = 1'b1;
    cfg.sel_sel[L][port] = (route < 0) ? 1'b1 : 1'b0;
    cfg.dmx_en[dm]  = 1'b1;
    cfg.dmx_sel[dm] = 2'(d / q);
    return 1'b1;
  endfunction

  initial begin
    int paths_0_5;
    int bad_count;
    fault = '0;
    paths_0_5 = 0;
    bad_count = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int s = 0; s < N; s++)
        for (int d = 0; d < N; d++) begin
          int good;
          good = 0;
          for (int k = 0; k < 4; k++)
            for (int r = -1; r < 4; r++) begin
              int m, j, L, dm;
              bit ok, hit;
              int k1;
              ok = build(s, d, k, r, m, j, L, dm);
              fault = '0;
              hit = 1'b0;
              if (pass == 1) begin
                // one random faulty node anywhere in the network
                case ($urandom % 5)
                  0: fault.mux[$urandom % N]     = 1'b1;
                  1: fault.se0[$urandom % N_SE0] = 1'b1;
                  2: fault.se1[$urandom % N_SE1] = 1'b1;
                  3: fault.sel[$urandom % N_SEL] = 1'b1;
                  default: fault.dmx[$urandom % N] = 1'b1;
                endcase
                k1 = r;
                hit = fault.mux[m] || fault.se0[j] ||
                      (r >= 0 && fault.se1[k1]) ||
                      (ok && (fault.sel[L] || fault.dmx[dm]));
              end
              for (int i = 0; i < N; i++) begin
                src[i].valid = 1'b1;
                src[i].src   = addr_t'(i);
                src[i].data  = DATA_W'($urandom);
              end
              #1;
              for (int i = 0; i < N; i++) begin
                flit_t exp;
                exp = (ok && !hit && i == d) ? src[s] : '0;
                checks++;
                if (dst[i] !== exp) begin
                  failures++;
                  if (failures < 10)
                    $display("FAIL pass %0d s=%0d d=%0d link %0d route %0d: dst %0d got %h exp %h",
                             pass, s, d, k, r, i, dst[i], exp);
                end
              end
              if (pass == 0 && dst[d].valid && dst[d].src == addr_t'(s)) good++;
              @(posedge clk);
            end
          if (pass == 0) begin
            int exp_paths;
            exp_paths = (((s / 2) % 2) == ((d / 2) % 2)) ? 20 : 16;
            checks++;
            if (good != exp_paths) begin
              failures++;
              bad_count++;
              $display("FAIL s=%0d d=%0d: %0d paths, expected %0d", s, d, good, exp_paths);
            end
            if (s == 0 && d == 5) paths_0_5 = good;
          end
        end
    checks++;
    if (paths_0_5 != 20) begin
      failures++;
      $display("FAIL source 0 -> destination 5 has %0d paths, expected 20", paths_0_5);
    end
    $display("source 0 -> destination 5: %0d paths", paths_0_5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
