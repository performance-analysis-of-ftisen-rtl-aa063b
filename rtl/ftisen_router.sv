// ftisen_router: path-setup controller of the FTISEN (routing algorithms 1, 2).
//
// On `start` the router takes the requests of all sources (req_valid, req_dst)
// and sets up one circuit per request, source 0 first, one source at a time.
// For each request it walks the network one stage per clock:
//   ST0     stage 0: try the four stage-0 SEs of the source in the order
//           primary, first, second, third alternate. The first two enter the
//           subnetwork chosen by the destination MSB, the last two the other
//           one. A candidate is FB (faulty or busy) when its MUX is faulty or
//           already in use, or its SE is faulty. All four FB: drop.
//   DIRECT  when source and destination agree in the address bit that picks
//           the last-stage SE (bit 1 for N = 16), try the direct link from
//           stage-0 SE j to last-stage SE j. If that link, last-stage SE j,
//           its output or the DEMUX behind it is FB, fall back to stage 1.
//   ST1     stage 1: try the four stage-1 SEs, primary first (the one leading
//           to DEMUX d, the destination's own first link), then k^1, k^2, k^3.
//           A candidate is FB when the stage-0 link into it, the SE, its
//           output, the last-stage SE and output behind it or the DEMUX are
//           faulty or busy. All four FB: drop.
//   LAST    last stage: drop when the destination already takes a request
//           in this transfer cycle, otherwise commit the circuit.
// Every rejected candidate costs one extra clock (the rerouting time), so a
// fault-free request takes 2 clocks by the direct link and 3 through stage 1.
// A source without a request costs one clock. After the last source the
// router pulses `xfer` (with `done`) for one clock; `cfg` then holds the
// circuits of this transfer cycle until the next `start`.
//   res[i]         outcome per source (route_res_t)
//   res_cand0/1[i] stage-0 / stage-1 candidate index taken (0 = primary)
//   res_cycles[i]  clocks spent routing source i
// Following the network: the candidate orders, the direct link test and the
// drop rules. This design's own: serial processing in source order, the
// stage-1 check also covering the last-stage SE and DEMUX behind the choice,
// one destination request per transfer cycle, and the clock counts.
module ftisen_router
  import ftisen_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [N-1:0] req_valid,
  input  addr_t      req_dst [N],
  input  fault_t     fault,
  output logic       busy,
  output logic       xfer,
  output logic       done,
  output route_cfg_t cfg,
  output route_res_t res [N],
  output logic [1:0] res_cand0 [N],
  output logic [1:0] res_cand1 [N],
  output logic [7:0] res_cycles [N]
);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_ST0, S_DIRECT, S_ST1, S_LAST, S_XFER} state_t;

  state_t        state;
  addr_t         src;
  logic [1:0]    c0, c1;
  logic [7:0]    cyc;
  logic [N-1:0]  pend;
  addr_t         dst_q [N];
  logic [N-1:0]  dst_taken;
  // path chosen so far for the current request
  addr_t         p_mux;
  logic [2:0]    p_se0;
  logic [1:0]    p_se1;
  logic          p_direct;

  // ---- candidate evaluation (combinational) ----
  addr_t         d;
  addr_t         cand_mux;
  logic [2:0]    cand_se0;
  logic          fb0;
  logic          direct_ok_addr;
  logic [2:0]    dir_last;
  addr_t         dir_dmx;
  logic          fb_dir;
  logic [1:0]    cand_se1;
  logic [2:0]    s1_last;
  addr_t         s1_dmx;
  logic          fb1;
  logic [2:0]    fin_last;
  addr_t         fin_dmx;

  always_comb begin
    d        = dst_q[src];
    cand_mux = src_link_mux(src, st0_link(src, d[AW-1], c0));
    cand_se0 = cand_mux[AW-1:1];
    fb0      = fault.mux[cand_mux] | cfg.mux_en[cand_mux] | fault.se0[cand_se0];

    // Algorithm 1: same last-stage-select bit in source and destination.
    direct_ok_addr = (src[1] == d[1]);
    dir_last = p_se0;
    dir_dmx  = {dir_last, d[0]};
    fb_dir   = cfg.se0_en[p_se0][0] | fault.sel[dir_last] |
               cfg.sel_en[dir_last][d[0]] | fault.dmx[dir_dmx];

    cand_se1 = se1_primary(d[AW-1:AW-2]) ^ c1;
    s1_last  = se1_to_last(cand_se1, d[1]);
    s1_dmx   = {s1_last, d[0]};
    fb1      = cfg.se0_en[p_se0][1 + int'(cand_se1)] | fault.se1[cand_se1] |
               cfg.se1_en[cand_se1][d[1]] | fault.sel[s1_last] |
               cfg.sel_en[s1_last][d[0]] | fault.dmx[s1_dmx];

    fin_last = p_direct ? p_se0 : se1_to_last(p_se1, d[1]);
    fin_dmx  = {fin_last, d[0]};
  end

  assign busy = (state != S_IDLE);
  assign done = xfer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      xfer      <= 1'b0;
      src       <= '0;
      c0        <= '0;
      c1        <= '0;
      cyc       <= '0;
      pend      <= '0;
      dst_taken <= '0;
      cfg       <= '0;
      p_mux     <= '0;
      p_se0     <= '0;
      p_se1     <= '0;
      p_direct  <= 1'b0;
      for (int i = 0; i < N; i++) begin
        dst_q[i]      <= '0;
        res[i]        <= R_NONE;
        res_cand0[i]  <= '0;
        res_cand1[i]  <= '0;
        res_cycles[i] <= '0;
      end
    end else begin
      // set when the current source is finished this clock
      automatic logic       fin_v = 1'b0;
      automatic route_res_t fin_r = R_NONE;
      xfer <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pend      <= req_valid;
          dst_taken <= '0;
          cfg       <= '0;
          src       <= '0;
          for (int i = 0; i < N; i++) begin
            dst_q[i]      <= req_dst[i];
            res[i]        <= R_NONE;
            res_cand0[i]  <= '0;
            res_cand1[i]  <= '0;
            res_cycles[i] <= '0;
          end
          state <= S_SCAN;
        end

        S_SCAN: begin
          c0  <= '0;
          c1  <= '0;
          cyc <= 8'd1;
          if (pend[src]) state <= S_ST0;
          else if (src == addr_t'(N-1)) state <= S_XFER;
          else src <= src + 1'b1;
        end

        S_ST0: begin
          if (!fb0) begin
            p_mux           <= cand_mux;
            p_se0           <= cand_se0;
            res_cand0[src]  <= c0;
            cyc             <= cyc + 1'b1;
            state           <= direct_ok_addr ? S_DIRECT : S_ST1;
          end else if (c0 == 2'd3) begin
            begin fin_v = 1'b1; fin_r = R_DROP0; end
          end else begin
            c0  <= c0 + 1'b1;
            cyc <= cyc + 1'b1;
          end
        end

        S_DIRECT: begin
          if (!fb_dir && !dst_taken[d]) begin
            p_direct <= 1'b1;
            // commit the direct circuit
            cfg.mux_en[p_mux]              <= 1'b1;
            cfg.mux_sel[p_mux]             <= src_mux_port(src);
            cfg.se0_en[p_se0][0]           <= 1'b1;
            cfg.se0_sel[p_se0][0]          <= p_mux[0];
            cfg.sel_en[dir_last][d[0]]     <= 1'b1;
            cfg.sel_sel[dir_last][d[0]]    <= 1'b1;
            cfg.dmx_en[dir_dmx]            <= 1'b1;
            cfg.dmx_sel[dir_dmx]           <= dst_demux_port(d);
            dst_taken[d]                   <= 1'b1;
            fin_v = 1'b1;
            fin_r = R_DIRECT;
          end else begin
            p_direct <= 1'b0;
            cyc      <= cyc + 1'b1;
            state    <= S_ST1;
          end
        end

        S_ST1: begin
          if (!fb1) begin
            p_se1           <= cand_se1;
            p_direct        <= 1'b0;
            res_cand1[src]  <= c1;
            cyc             <= cyc + 1'b1;
            state           <= S_LAST;
          end else if (c1 == 2'd3) begin
            begin fin_v = 1'b1; fin_r = R_DROP1; end
          end else begin
            c1  <= c1 + 1'b1;
            cyc <= cyc + 1'b1;
          end
        end

        S_LAST: begin
          if (dst_taken[d]) begin
            begin fin_v = 1'b1; fin_r = R_DROPL; end
          end else begin
            cfg.mux_en[p_mux]                 <= 1'b1;
            cfg.mux_sel[p_mux]                <= src_mux_port(src);
            cfg.se0_en[p_se0][1+int'(p_se1)]  <= 1'b1;
            cfg.se0_sel[p_se0][1+int'(p_se1)] <= p_mux[0];
            cfg.se1_en[p_se1][d[1]]           <= 1'b1;
            cfg.se1_sel[p_se1][d[1]]          <= p_se0;
            cfg.sel_en[fin_last][d[0]]        <= 1'b1;
            cfg.sel_sel[fin_last][d[0]]       <= 1'b0;
            cfg.dmx_en[fin_dmx]               <= 1'b1;
            cfg.dmx_sel[fin_dmx]              <= dst_demux_port(d);
            dst_taken[d]                      <= 1'b1;
            fin_v = 1'b1;
            fin_r = R_STAGE1;
          end
        end

        S_XFER: begin
          xfer  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
      // record the outcome and move on to the next source
      if (fin_v) begin
        res[src]        <= fin_r;
        res_cycles[src] <= cyc;
        if (src == addr_t'(N-1)) state <= S_XFER;
        else begin
          src   <= src + 1'b1;
          state <= S_SCAN;
        end
      end
    end
  end

  // A circuit is only committed onto free resources.
  always_ff @(posedge clk) begin
    if (state == S_LAST && !dst_taken[d]) begin
      assert (!cfg.mux_en[p_mux]) else $error("MUX %0d allocated twice", p_mux);
      assert (!cfg.dmx_en[fin_dmx]) else $error("DEMUX %0d allocated twice", fin_dmx);
    end
  end

endmodule
