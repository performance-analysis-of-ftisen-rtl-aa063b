// tb_ftisen_mux4: self-checking test of the 4x1 MUX.
// Walks every enable / fault / select combination with random payloads and
// checks that only an enabled, fault-free MUX passes exactly the selected
// input. A watchdog ends the run if it hangs.
module tb_ftisen_mux4;
  import ftisen_pkg::*;

  logic       clk = 1'b0;
  flit_t      in [4];
  logic       en;
  logic [1:0] sel;
  logic       fault;
  flit_t      out;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  ftisen_mux4 dut (.in, .en, .sel, .fault, .out);

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
            flit_t exp;
            for (int l = 0; l < 4; l++) begin
              in[l].valid = 1'b1;
              in[l].src   = addr_t'($urandom);
              in[l].data  = DATA_W'($urandom);
            end
            en = e[0]; fault = f[0]; sel = 2'(s);
            @(posedge clk);
            exp = (e == 1 && f == 0) ? in[s] : '0;
            checks++;
            if (out !== exp) begin
              failures++;
              $display("FAIL en=%0d fault=%0d sel=%0d out=%h exp=%h", e, f, s, out, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
