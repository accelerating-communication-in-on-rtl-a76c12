// tb_crossbar: random selections of distinct inputs per output; every output
// must carry exactly the selected input's flit, idle outputs must be zero.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t             in_flit [NPORT];
  logic [PORT_W-1:0] sel [NPORT];
  logic [NPORT-1:0]  sel_valid;
  flit_t             out_flit [NPORT];
  logic [NPORT-1:0]  out_valid;

  crossbar dut (.in_flit, .sel, .sel_valid, .out_flit, .out_valid);

  initial begin
    for (int t = 0; t < 200; t++) begin
      int perm [NPORT];
      for (int i = 0; i < int'(NPORT); i++) begin
        in_flit[i] = '0;
        in_flit[i].data = {$urandom, $urandom, $urandom, $urandom};
        in_flit[i].vc = VC_W'(i);
        perm[i] = i;
      end
      perm.shuffle();
      for (int o = 0; o < int'(NPORT); o++) begin
        sel[o] = PORT_W'(perm[o]);
        sel_valid[o] = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int o = 0; o < int'(NPORT); o++) begin
        checks++;
        if (out_valid[o] != sel_valid[o] ||
            (sel_valid[o] && out_flit[o] != in_flit[perm[o]]) ||
            (!sel_valid[o] && out_flit[o] != '0)) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
