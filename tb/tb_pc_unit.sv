// tb_pc_unit: creation, match on VC and route, mismatch, termination that keeps
// the registers, speculative restore, and the priority of the update inputs.
module tb_pc_unit;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              cand_valid = 0, create = 0, terminate = 0, restore = 0;
  logic [VC_W-1:0]   cand_vc = '0, create_vc = '0, pc_vc;
  logic [PORT_W-1:0] cand_route = '0, create_out = '0, pc_out;
  logic              pc_valid, pc_known, match, mismatch;

  pc_unit dut (.*);

  task automatic chk(input bit exp_valid, input bit exp_match, input bit exp_mis, input string what);
    #1;
    checks++;
    if (pc_valid != exp_valid || match != exp_match || mismatch != exp_mis) begin
      failures++;
      $display("FAIL %s: valid %0b match %0b mismatch %0b", what, pc_valid, match, mismatch);
    end
  endtask

  task automatic edge_with(input bit c, input bit t, input bit r);
    @(negedge clk);
    create = c; terminate = t; restore = r;
    @(negedge clk);
    create = 0; terminate = 0; restore = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    cand_valid = 1; cand_vc = 2; cand_route = P_E;
    chk(0, 0, 0, "after reset");
    edge_with(0, 0, 1);
    chk(0, 0, 0, "restore without history");
    create_vc = 2; create_out = P_E;
    edge_with(1, 0, 0);
    chk(1, 1, 0, "created, same flow");
    checks++;
    if (pc_vc != 2 || pc_out != P_E || !pc_known) begin failures++; $display("FAIL registers"); end
    cand_route = P_S;
    chk(1, 0, 1, "route mismatch");
    cand_route = P_E; cand_vc = 1;
    chk(1, 0, 0, "other VC");
    cand_vc = 2;
    edge_with(0, 1, 0);
    chk(0, 0, 0, "terminated");
    checks++;
    if (pc_vc != 2 || pc_out != P_E) begin failures++; $display("FAIL registers lost on termination"); end
    edge_with(0, 0, 1);
    chk(1, 1, 0, "restored");
    create_vc = 0; create_out = P_W;
    edge_with(1, 1, 0);
    chk(1, 0, 0, "create wins over terminate");
    checks++;
    if (pc_out != P_W || pc_vc != 0) begin failures++; $display("FAIL create registers"); end
    edge_with(0, 1, 1);
    chk(0, 0, 0, "terminate wins over restore");
    cand_valid = 0;
    chk(0, 0, 0, "no candidate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
