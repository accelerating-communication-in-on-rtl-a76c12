// tb_vc_buffer: checks the input VC FIFO against a queue model: fill to full,
// order of reads, simultaneous read and write (also when full) and random
// traffic.
module tb_vc_buffer;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  wr_en = 1'b0, rd_en = 1'b0;
  flit_t wr_flit = '0, head;
  logic  empty, full;
  logic [2:0] count;
  flit_t model [$];

  vc_buffer #(.DEPTH(4)) dut (.clk, .rst_n, .wr_en, .wr_flit, .rd_en, .head, .empty, .full, .count);

  task automatic step(input bit w, input bit r);
    @(negedge clk);
    wr_en = w; rd_en = r;
    wr_flit = '0;
    wr_flit.data = {$urandom, $urandom, $urandom, $urandom};
    // check visible state before the edge
    checks++;
    if (empty != (model.size() == 0) || full != (model.size() == 4) || int'(count) != model.size()
        || (model.size() > 0 && head != model[0])) begin
      failures++;
      $display("FAIL state: size %0d empty %0b full %0b count %0d", model.size(), empty, full, count);
    end
    @(posedge clk);
    #1;
    if (r && model.size() > 0) void'(model.pop_front());
    if (w && (model.size() < 4 || r)) model.push_back(wr_flit);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) step(1, 0);
    step(0, 0);
    step(1, 1);            // read and write while full
    for (int k = 0; k < 4; k++) step(0, 1);
    step(0, 0);
    for (int k = 0; k < 300; k++) begin
      bit w, r;
      w = $urandom_range(0, 1);
      r = $urandom_range(0, 1);
      if (model.size() == 4 && !r) w = 0;   // never overflow
      step(w, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
