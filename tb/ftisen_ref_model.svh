// ftisen_ref_model.svh: reference model of FTISEN path setup, included
// inside the testbench modules that need it.
//
// A class that replays one transfer cycle of the routing rules with plain
// integer arithmetic on the connection rules, independent of the RTL package
// functions: sources in order 0..N-1; stage 0 tries the four MUX links
// (destination-MSB subnetwork first, link order within it); a direct link
// when source and destination agree in address bit 1; stage 1 tries the
// primary stage-1 SE (the one leading to DEMUX d) and then k^1, k^2, k^3;
// the last stage drops a request whose destination is already taken. It
// predicts each request's outcome, the candidates used and the clocks spent.
localparam int NN = 16;   // network size (independent of the RTL package)

typedef enum int {M_NONE = 0, M_DIRECT = 1, M_STAGE1 = 2,
                  M_DROP0 = 3, M_DROP1 = 4, M_DROPL = 5} mres_e;

class ref_model;
  // faults
  bit f_mux [NN];
  bit f_se0 [NN/2];
  bit f_se1 [NN/4];
  bit f_sel [NN/2];
  bit f_dmx [NN];
  // results
  int res [NN];
  int cand0 [NN];
  int cand1 [NN];
  int cycles [NN];
  int total_clocks;
  bit direct_eligible [NN];

  function void clear_faults();
    foreach (f_mux[i]) f_mux[i] = 0;
    foreach (f_se0[i]) f_se0[i] = 0;
    foreach (f_se1[i]) f_se1[i] = 0;
    foreach (f_sel[i]) f_sel[i] = 0;
    foreach (f_dmx[i]) f_dmx[i] = 0;
  endfunction

  static function int s1_last(int k, int o);
    return (k % 2 == 0) ? 4*(k/2) + 2 + o : 4*(k/2) + o;
  endfunction

  function void run(bit req [NN], int dst [NN]);
    bit b_mux [NN];
    bit b_se0 [NN/2][5];
    bit b_se1 [NN/4][2];
    bit b_sel [NN/2][2];
    bit taken [NN];
    int q;
    q = NN / 4;
    foreach (b_mux[i]) b_mux[i] = 0;
    foreach (b_se0[i, o]) b_se0[i][o] = 0;
    foreach (b_se1[i, o]) b_se1[i][o] = 0;
    foreach (b_sel[i, o]) b_sel[i][o] = 0;
    foreach (taken[i]) taken[i] = 0;
    total_clocks = 1 + NN + 1;     // start, one scan per source, transfer
    for (int s = 0; s < NN; s++) begin
      int d, a, order [4], n, m, j, cyc, k0, L, o, dm;
      bit found;
      res[s] = M_NONE; cand0[s] = 0; cand1[s] = 0; cycles[s] = 0;
      direct_eligible[s] = 0;
      if (!req[s]) continue;
      d = dst[s];
      a = d / (NN/2);
      n = 0;
      for (int k = 0; k < 4; k++) if (((s + k*q) % NN) / (NN/2) == a)  begin order[n] = k; n++; end
      for (int k = 0; k < 4; k++) if (((s + k*q) % NN) / (NN/2) != a)  begin order[n] = k; n++; end
      // stage 0
      cyc = 0; found = 0;
      for (int c = 0; c < 4 && !found; c++) begin
        cyc++;
        m = (s + order[c]*q) % NN;
        j = m / 2;
        if (!(f_mux[m] || b_mux[m] || f_se0[j])) begin found = 1; cand0[s] = c; end
      end
      if (!found) begin res[s] = M_DROP0; cycles[s] = cyc; total_clocks += cyc; continue; end
      // direct link (same address bit 1 of source and destination)
      if (((s / 2) % 2) == ((d / 2) % 2)) begin
        direct_eligible[s] = 1;
        cyc++;
        L = j; dm = 2*L + d % 2;
        if (!(b_se0[j][0] || f_sel[L] || b_sel[L][d % 2] || f_dmx[dm] || taken[d])) begin
          b_mux[m] = 1; b_se0[j][0] = 1; b_sel[L][d % 2] = 1; taken[d] = 1;
          res[s] = M_DIRECT; cycles[s] = cyc; total_clocks += cyc;
          continue;
        end
      end
      // stage 1
      k0 = -1;
      for (int k = 0; k < 4; k++)
        for (int oo = 0; oo < 2; oo++)
          if (s1_last(k, oo) == d / 2) k0 = k;
      found = 0;
      for (int c = 0; c < 4 && !found; c++) begin
        int k;
        cyc++;
        k = k0 ^ c;
        o = -1;
        for (int oo = 0; oo < 2; oo++)
          if ((2*s1_last(k, oo)) % q == ((d % q) / 2) * 2) o = oo;
        L = s1_last(k, o);
        dm = 2*L + d % 2;
        if (!(b_se0[j][1+k] || f_se1[k] || b_se1[k][o] || f_sel[L] ||
              b_sel[L][d % 2] || f_dmx[dm])) begin
          found = 1; cand1[s] = c;
          if (taken[d]) begin
            res[s] = M_DROPL;
          end else begin
            b_mux[m] = 1; b_se0[j][1+k] = 1; b_se1[k][o] = 1;
            b_sel[L][d % 2] = 1; taken[d] = 1;
            res[s] = M_STAGE1;
          end
        end
      end
      if (found) cyc++;           // last-stage clock
      else res[s] = M_DROP1;
      cycles[s] = cyc;
      total_clocks += cyc;
    end
  endfunction
endclass

