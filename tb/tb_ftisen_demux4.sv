// tb_ftisen_demux4: self-checking test of the 1x4 DEMUX.
// Walks every enable / fault / select combination with random payloads and
// checks that an enabled, fault-free DEMUX drives exactly the selected output
// and leaves the other three empty.
module tb_ftisen_demux4;
  import ftisen_pkg::*;

  logic       clk = 1'b0;
  flit_t      in;
  logic       en;
  logic [1:0] sel;
  logic       fault;
  flit_t      out [4];
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  ftisen_demux4 dut (.in, .en, .sel, .fault, .out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int e = 0; e < 2; e++)
        for (int f = 0; f < 2; f++)
          for (int s = 0; s < 4; s++) begin
            in.valid = 1'b1;
            in.src   = addr_t'($urandom);
            in.data  = DATA_W'($urandom);
            en = e[0]; fault = f[0]; sel = 2'(s);
            @(posedge clk);
            for (int l = 0; l < 4; l++) begin
              flit_t exp;
              exp = (e == 1 && f == 0 && l == s) ? in : '0;
              checks++;
              if (out[l] !== exp) begin
                failures++;
                $display("FAIL en=%0d fault=%0d sel=%0d port %0d out=%h exp=%h",
                         e, f, s, l, out[l], exp);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
