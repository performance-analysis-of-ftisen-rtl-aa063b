// ftisen_se: an IN x OUT crossbar switching element (SE) of the FTISEN.
//
// The network uses three sizes of it: 2x5 in stage 0 (two MUX inputs; one
// direct link to the last stage plus four links to stage 1), 8x2 in stage 1
// (one input from each stage-0 SE of its group) and 2x2 in the last stage
// (one input from stage 1, one direct link from stage 0). Every output has its
// own enable and input select, so an SE can carry up to OUT circuits at once;
// the router never enables two outputs from one input. A faulty SE passes
// nothing. Combinational: settings are held for a whole transfer cycle.
//   in[i]           input links
//   en[o], sel[o]   per-output enable and selected input
//   out[o]          output links
// The sizes follow the network; the crossbar insides and control interface are
// this design's own (the simplest switch that connects any input to any output).
module ftisen_se
  import ftisen_pkg::*;
#(
  parameter int IN  = 2,
  parameter int OUT = 2,
  localparam int SW = (IN > 1) ? $clog2(IN) : 1
) (
  input  flit_t           in  [IN],
  input  logic [OUT-1:0]  en,
  input  logic [SW-1:0]   sel [OUT],
  input  logic            fault,
  output flit_t           out [OUT]
);

  always_comb begin
    for (int o = 0; o < OUT; o++) begin
      out[o] = '0;
      if (en[o] && !fault && int'(sel[o]) < IN) out[o] = in[sel[o]];
    end
  end

endmodule
