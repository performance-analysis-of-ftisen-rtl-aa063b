// ftisen_mux4: the 4x1 multiplexer in front of stage 0 of the FTISEN.
//
// Each MUX is wired to four sources (all sources with the same address modulo
// N/4) and to one input of a stage-0 switching element. When enabled it passes
// the request of the selected source; otherwise, or when the MUX is marked
// faulty, its output carries no request. Purely combinational: the circuit is
// set up by the router and held for a whole transfer cycle.
//   in    four source links, in[l] from source (m mod N/4) + l*N/4
//   en    MUX in use for this transfer cycle
//   sel   selected input
//   fault node failure: output forced empty
// The 4x1 size is the network's; the enable/select/fault interface is this
// design's own.
module ftisen_mux4
  import ftisen_pkg::*;
(
  input  flit_t      in [4],
  input  logic       en,
  input  logic [1:0] sel,
  input  logic       fault,
  output flit_t      out
);

  always_comb begin
    out = '0;
    if (en && !fault) out = in[sel];
  end

endmodule
