// ftisen_demux4: the 1x4 demultiplexer behind the last stage of the FTISEN.
//
// Each DEMUX takes one output link of a last-stage switching element and is
// wired to four destinations (output l goes to destination (m mod N/4) + l*N/4).
// When enabled it steers the request to the selected destination; all other
// outputs stay empty, and a faulty DEMUX passes nothing. Combinational.
//   in    link from the last-stage SE
//   en    DEMUX in use for this transfer cycle
//   sel   destination port
//   fault node failure: all outputs forced empty
// The 1x4 size is the network's; the control interface is this design's own.
module ftisen_demux4
  import ftisen_pkg::*;
(
  input  flit_t      in,
  input  logic       en,
  input  logic [1:0] sel,
  input  logic       fault,
  output flit_t      out [4]
);

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      out[l] = '0;
      if (en && !fault && sel == 2'(l)) out[l] = in;
    end
  end

endmodule
