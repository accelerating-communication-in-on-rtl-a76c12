// tb_sw_alloc: random requests; every grant must match a request, at most one
// grant per input and per output, every output with a requesting input stage-1
// winner must be granted (work conserving for the stage-1 winners), and a
// single persistent contender set must be served round-robin (no starvation).
module tb_sw_alloc;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NVC-1:0]    req      [NPORT];
  logic [PORT_W-1:0] req_port [NPORT][NVC];
  logic [NPORT-1:0]  gnt_in, out_used;
  logic [VC_W-1:0]   gnt_vc   [NPORT];
  logic [PORT_W-1:0] gnt_out  [NPORT];

  sw_alloc dut (.*);

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int served [NPORT];
    for (int i = 0; i < int'(NPORT); i++) begin
      req[i] = '0;
      for (int v = 0; v < int'(NVC); v++) req_port[i][v] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < int'(NPORT); i++)
        for (int v = 0; v < int'(NVC); v++) begin
          req[i][v] = ($urandom_range(0, 2) == 0);
          req_port[i][v] = PORT_W'($urandom_range(0, NPORT - 1));
        end
      #1;
      begin
        int outs [NPORT];
        for (int o = 0; o < int'(NPORT); o++) outs[o] = 0;
        for (int i = 0; i < int'(NPORT); i++)
          if (gnt_in[i]) begin
            ck(req[i][gnt_vc[i]] && req_port[i][gnt_vc[i]] == gnt_out[i], "grant without request");
            outs[gnt_out[i]]++;
          end
        for (int o = 0; o < int'(NPORT); o++) begin
          ck(outs[o] <= 1, "two inputs on one output");
          ck(out_used[o] == (outs[o] == 1), "out_used");
        end
      end
    end
    // fairness: inputs 0..3 all want output E on VC 0 all the time
    @(negedge clk);
    for (int i = 0; i < int'(NPORT); i++) begin
      req[i] = '0;
      served[i] = 0;
    end
    for (int i = 0; i < 4; i++) begin req[i][0] = 1; req_port[i][0] = P_E; end
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (gnt_in[i]) served[i]++;
      ck($countones(gnt_in) == 1, "one grant per cycle");
    end
    for (int i = 0; i < 4; i++) ck(served[i] == 10, "round-robin share");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
