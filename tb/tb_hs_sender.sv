// tb_hs_sender: three senders (circulation, basic handshake, setaside with two
// slots) driven by random grants and a handshake model that answers every
// transmitted flit exactly HS_DELAY cycles later with a random ACK or NACK.
// Every flit follows the life cycle unsent -> in flight -> (NACKed -> in
// flight)* -> accepted; a transmission of a flit in any other state, an answer
// to nothing, a lost flit or a duplicate is a failure. The basic sender must
// also keep the order of its flits. NACKs, retransmissions and setaside
// overlap (a new flit sent while an older one awaits its answer) are counted
// and must all occur.
module tb_hs_sender;
  import hs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NF = 60;       // flits per sender
  localparam int D  = HS_SEGS + 1;

  logic   enq_valid [3], enq_ready [3], req [3], grant [3], tx_valid [3], hs_valid [3], hs_ack [3], ev_retx [3];
  hflit_t enq_flit [3], tx_flit [3];
  int     state [3][NF];       // 0 unsent, 1 in flight, 2 nacked, 3 accepted
  int     n_enq [3], n_acc [3], n_nack [3], n_retx [3], n_overlap [3], last_acc [3];
  int     inflight [3];
  int     due_id [3][$];
  int     due_t  [3][$];
  int     cyc = 0;

  hs_sender #(.MODE(HS_DHS_CIRC), .SETASIDE(2)) u_c (.clk, .rst_n, .enq_valid(enq_valid[0]), .enq_flit(enq_flit[0]), .enq_ready(enq_ready[0]),
    .req(req[0]), .grant(grant[0]), .tx_valid(tx_valid[0]), .tx_flit(tx_flit[0]), .hs_valid(hs_valid[0]), .hs_ack(hs_ack[0]), .ev_retx(ev_retx[0]));
  hs_sender #(.MODE(HS_DHS), .SETASIDE(0)) u_b (.clk, .rst_n, .enq_valid(enq_valid[1]), .enq_flit(enq_flit[1]), .enq_ready(enq_ready[1]),
    .req(req[1]), .grant(grant[1]), .tx_valid(tx_valid[1]), .tx_flit(tx_flit[1]), .hs_valid(hs_valid[1]), .hs_ack(hs_ack[1]), .ev_retx(ev_retx[1]));
  hs_sender #(.MODE(HS_DHS), .SETASIDE(2)) u_s (.clk, .rst_n, .enq_valid(enq_valid[2]), .enq_flit(enq_flit[2]), .enq_ready(enq_ready[2]),
    .req(req[2]), .grant(grant[2]), .tx_valid(tx_valid[2]), .tx_flit(tx_flit[2]), .hs_valid(hs_valid[2]), .hs_ack(hs_ack[2]), .ev_retx(ev_retx[2]));

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int m = 0; m < 3; m++) begin
      if (rst_n) begin
        if (enq_valid[m] && enq_ready[m]) n_enq[m]++;
        if (ev_retx[m]) n_retx[m]++;
        // answer arriving now
        if (hs_valid[m]) begin
          int id;
          ck(due_t[m].size() > 0 && due_t[m][0] == cyc, "answer at the right cycle");
          id = due_id[m].pop_front();
          void'(due_t[m].pop_front());
          inflight[m]--;
          if (hs_ack[m]) begin
            ck(state[m][id] == 1, "ACK of a flit in flight");
            state[m][id] = 3; n_acc[m]++;
            if (m == 1) begin ck(id == last_acc[m] + 1, "basic mode keeps order"); last_acc[m] = id; end
          end else begin
            ck(state[m][id] == 1, "NACK of a flit in flight");
            state[m][id] = 2; n_nack[m]++;
          end
        end
        if (tx_valid[m]) begin
          int id;
          id = int'(tx_flit[m].data[15:0]);
          ck(id < NF && (state[m][id] == 0 || state[m][id] == 2), "transmit of an unsent or NACKed flit");
          if (m == 0) begin state[m][id] = 3; n_acc[m]++; end
          else begin
            if (inflight[m] > 0) n_overlap[m]++;
            state[m][id] = 1; inflight[m]++;
            due_id[m].push_back(id);
            due_t[m].push_back(cyc + D);
          end
        end
      end
      // drive next cycle
      enq_valid[m] <= rst_n && (n_enq[m] < NF) && ($urandom_range(0, 1) == 1);
      enq_flit[m]  <= '{src: 6'(m), data: 256'(n_enq[m])};
    end
  end
  // grants follow req combinationally (the token is captured in the request cycle)
  always_comb for (int m = 0; m < 3; m++) grant_c[m] = req[m] && gnt_rand[m];
  logic grant_c [3], gnt_rand [3];
  always @(negedge clk) for (int m = 0; m < 3; m++) gnt_rand[m] = ($urandom_range(0, 2) != 0);
  always @(negedge clk) for (int m = 0; m < 3; m++) begin
    grant[m] = grant_c[m];
    hs_valid[m] = (m != 0) && due_t[m].size() > 0 && due_t[m][0] == cyc;
    hs_ack[m] = hs_valid[m] && ($urandom_range(0, 4) >= 2);
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      n_enq[m] = 0; n_acc[m] = 0; n_nack[m] = 0; n_retx[m] = 0; n_overlap[m] = 0; last_acc[m] = -1; inflight[m] = 0;
      enq_valid[m] = 0; enq_flit[m] = '0; grant[m] = 0; hs_valid[m] = 0; hs_ack[m] = 0; gnt_rand[m] = 0;
      for (int i = 0; i < NF; i++) state[m][i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_acc[0] == NF && n_acc[1] == NF && n_acc[2] == NF);
    repeat (20) @(negedge clk);
    for (int m = 0; m < 3; m++) begin
      $display("sender %0d: accepted=%0d nack=%0d retx=%0d overlap=%0d", m, n_acc[m], n_nack[m], n_retx[m], n_overlap[m]);
      for (int i = 0; i < NF; i++) ck(state[m][i] == 3, "flit accepted");
    end
    ck(n_nack[1] > 0 && n_nack[2] > 0, "NACKs occurred");
    ck(n_retx[2] == n_nack[2], "setaside: one retransmission per NACK");
    ck(n_retx[0] == 0 && n_retx[1] == 0, "no retransmission event outside setaside");
    ck(n_overlap[2] > 0, "setaside overlaps flits");
    ck(n_overlap[1] == 0, "basic mode waits for the answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
