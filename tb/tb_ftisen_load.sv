// tb_ftisen_load: load sweep of the 16x16 FTISEN, fault-free and with one
// faulty switching element.
//
// For each request probability p = 0.1, 0.2, ... 1.0 every source requests
// with probability p per transfer cycle, to a uniformly random destination.
// The same request stream is run twice: once on a fault-free network, once
// with one random switching element (any stage) marked faulty. Per load the
// test reports the bandwidth (requests delivered per transfer cycle), the
// probability of acceptance (delivered / requested) and the mean routing
// clocks per request. It checks every delivery (right destination, source
// and payload; nothing delivered that the router did not accept) and that a
// single SE fault never loses a request that was alone in its transfer cycle.
module tb_ftisen_load;
  import ftisen_pkg::*;

  localparam int CYCLES = 150;   // transfer cycles per load point and fault case

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

  always #5 clk = ~clk;

  ftisen_top dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
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

  // One transfer cycle; returns requests, deliveries and routing clocks.
  task automatic transfer(input logic [N-1:0] req, input int dst [N],
                          output int n_req, output int n_ok, output int clk_sum);
    logic [DATA_W-1:0] pay [N];
    for (int i = 0; i < N; i++) begin
      pay[i]      = DATA_W'($urandom);
      src_req[i]  = req[i];
      src_dst[i]  = addr_t'(dst[i]);
      src_data[i] = pay[i];
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    n_req = 0; n_ok = 0; clk_sum = 0;
    for (int i = 0; i < N; i++)
      if (req[i]) begin
        n_req++;
        clk_sum += int'(route_cycles[i]);
        if (route_res[i] == R_DIRECT || route_res[i] == R_STAGE1) begin
          n_ok++;
          check($sformatf("src %0d delivered to %0d", i, dst[i]),
                dst_valid[dst[i]] && dst_src[dst[i]] == addr_t'(i) &&
                dst_data[dst[i]] == pay[i]);
        end
      end
    begin
      int n_valid;
      n_valid = 0;
      for (int d = 0; d < N; d++) if (dst_valid[d]) n_valid++;
      check("no extra deliveries", n_valid == n_ok);
    end
    @(negedge clk);
  endtask

  initial begin
    logic [N-1:0] req_s [CYCLES];
    int           dst_s [CYCLES][N];
    rst_n = 1'b0;
    start = 1'b0;
    src_req = '0;
    fault = '0;
    for (int i = 0; i < N; i++) begin src_dst[i] = '0; src_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    $display("   p | BW      PA     clk/req |  BW_SF   PA_SF  clk/req_SF");
    for (int pi = 1; pi <= 10; pi++) begin
      real bw [2], pa [2], tr [2];
      for (int c = 0; c < CYCLES; c++)
        for (int i = 0; i < N; i++) begin
          req_s[c][i] = ($urandom % 1000) < pi * 100;
          dst_s[c][i] = $urandom % N;
        end
      for (int fc = 0; fc < 2; fc++) begin
        int tot_req, tot_ok, tot_clk;
        tot_req = 0; tot_ok = 0; tot_clk = 0;
        for (int c = 0; c < CYCLES; c++) begin
          int n_req, n_ok, clk_sum;
          int dst_c [N];
          fault = '0;
          if (fc == 1)
            case ($urandom % 3)
              0: fault.se0[$urandom % N_SE0] = 1'b1;
              1: fault.se1[$urandom % N_SE1] = 1'b1;
              default: fault.sel[$urandom % N_SEL] = 1'b1;
            endcase
          for (int i = 0; i < N; i++) dst_c[i] = dst_s[c][i];
          transfer(req_s[c], dst_c, n_req, n_ok, clk_sum);
          if (n_req == 1) check("lone request delivered", n_ok == 1);
          tot_req += n_req; tot_ok += n_ok; tot_clk += clk_sum;
        end
        bw[fc] = real'(tot_ok) / CYCLES;
        pa[fc] = (tot_req > 0) ? real'(tot_ok) / tot_req : 0.0;
        tr[fc] = (tot_req > 0) ? real'(tot_clk) / tot_req : 0.0;
        check("acceptance within [0,1]", pa[fc] >= 0.0 && pa[fc] <= 1.0);
      end
      $display(" %3.1f | %6.3f  %5.3f  %5.2f   | %6.3f  %5.3f  %5.2f",
               pi / 10.0, bw[0], pa[0], tr[0], bw[1], pa[1], tr[1]);
      // a single SE fault adds rerouting clocks on average
      check("rerouting costs clocks", tr[1] >= tr[0] - 0.05);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
