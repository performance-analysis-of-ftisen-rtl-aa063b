// tb_ftisen_se: self-checking test of the switching element in all three
// sizes the network uses (2x5 stage 0, 8x2 stage 1, 2x2 last stage).
// Random per-output enables and selects, random payloads and random faults;
// each output must carry the selected input when enabled and the SE is not
// faulty, and nothing otherwise.
module tb_ftisen_se;
  import ftisen_pkg::*;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // 2x5
  flit_t a_in [2];  logic [4:0] a_en; logic [0:0] a_sel [5]; logic a_f; flit_t a_out [5];
  // 8x2
  flit_t b_in [8];  logic [1:0] b_en; logic [2:0] b_sel [2]; logic b_f; flit_t b_out [2];
  // 2x2
  flit_t c_in [2];  logic [1:0] c_en; logic [0:0] c_sel [2]; logic c_f; flit_t c_out [2];

  ftisen_se #(.IN(2), .OUT(5)) dut_a (.in(a_in), .en(a_en), .sel(a_sel), .fault(a_f), .out(a_out));
  ftisen_se #(.IN(8), .OUT(2)) dut_b (.in(b_in), .en(b_en), .sel(b_sel), .fault(b_f), .out(b_out));
  ftisen_se #(.IN(2), .OUT(2)) dut_c (.in(c_in), .en(c_en), .sel(c_sel), .fault(c_f), .out(c_out));

  function automatic flit_t rnd_flit();
    flit_t f;
    f.valid = 1'b1;
    f.src   = addr_t'($urandom);
    f.data  = DATA_W'($urandom);
    return f;
  endfunction

  task automatic check(string tag, int o, flit_t got, flit_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s out %0d got=%h exp=%h", tag, o, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 300; rep++) begin
      for (int i = 0; i < 2; i++) begin a_in[i] = rnd_flit(); c_in[i] = rnd_flit(); end
      for (int i = 0; i < 8; i++) b_in[i] = rnd_flit();
      a_en = 5'($urandom); b_en = 2'($urandom); c_en = 2'($urandom);
      for (int o = 0; o < 5; o++) a_sel[o] = 1'($urandom);
      for (int o = 0; o < 2; o++) begin b_sel[o] = 3'($urandom); c_sel[o] = 1'($urandom); end
      a_f = ($urandom % 4) == 0; b_f = ($urandom % 4) == 0; c_f = ($urandom % 4) == 0;
      @(posedge clk);
      for (int o = 0; o < 5; o++)
        check("2x5", o, a_out[o], (a_en[o] && !a_f) ? a_in[a_sel[o]] : flit_t'(0));
      for (int o = 0; o < 2; o++) begin
        check("8x2", o, b_out[o], (b_en[o] && !b_f) ? b_in[b_sel[o]] : flit_t'(0));
        check("2x2", o, c_out[o], (c_en[o] && !c_f) ? c_in[c_sel[o]] : flit_t'(0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
