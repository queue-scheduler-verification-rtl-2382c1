// tb_qs_req_ctrl: self-checking test of the request controller.
//
// The class and port selection stages are played by the testbench. Checked:
// a decision starts a port search; a found, still-qualified port gives a
// request on the next cycle with the calendar commits and the issue event;
// QS_REQ and its identifiers hold until QS_ACK (acknowledge delays of 1 to 6
// cycles); after QS_ACK the controller waits for control data and ignores
// EGRESS_DSTART of another interface; EOP = 0 marks the port in progress and
// sets the queue lock; QS_ACK_ERR lets a new search start at once; QUEUE_DEACT
// produces the deact event; a promoted port is requested at its in-progress
// class; a port that lost its qualification during the search is not
// requested.
module tb_qs_req_ctrl;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ifid_t ifid1 = 3'd1, ifid2 = 3'd2;
  class_vec_t qual [NPORTS];
  logic [NPORTS-1:0] promo = '0;
  logic cs_valid = 0, cs_prio = 0, cs_from_cal = 0;
  class_t cs_class = 0;
  logic [4:0] cs_idx = 0, cs_commit_idx;
  logic cs_commit, cs_commit_prio, ps_start, ps_prio, ps_commit, ps_commit_prio;
  class_t ps_class;
  logic ps_done = 0, ps_found = 0;
  port_t ps_port = 0;
  logic [8:0] ps_idx = 0, ps_commit_idx;
  logic qs_req, qs_ack = 0, queue_deact = 0, qs_ack_err = 0, egress_dstart = 0;
  port_t qs_req_port_id;
  class_t qs_req_class_id;
  logic [4:0] egress_data = 0;
  logic [NPORTS-1:0] in_prog;
  class_t prog_class [NPORTS];
  logic lock_v;
  port_t lock_port;
  class_t lock_class;
  logic deact, issue, ack_ok, ack_err, ev_eop, ev_oam;

  qs_req_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one decision + search ending at port p
  task automatic decide_and_find(int p, int c, int idx, bit still_ok);
    int n;
    @(negedge clk);
    cs_valid = 1; cs_class = class_t'(c); cs_from_cal = 1; cs_idx = 5'(idx); cs_prio = 0;
    n = 0;
    #1;
    while (!ps_start && n < 20) begin @(negedge clk); #1; n++; end
    chk(ps_start && ps_class == class_t'(c), "search started for the chosen class");
    @(negedge clk); cs_valid = 0;
    repeat (3) @(negedge clk);
    ps_done = 1; ps_found = 1; ps_port = port_t'(p); ps_idx = 9'(idx + 100);
    if (!still_ok) qual[p] = '0;
    @(posedge clk); #1;
    ps_done = 0; ps_found = 0;
  endtask

  task automatic ack(int delay, bit err, bit dq);
    repeat (delay - 1) begin
      @(negedge clk);
      chk(qs_req, "QS_REQ held while waiting for QS_ACK");
    end
    @(negedge clk);
    qs_ack = 1; qs_ack_err = err; queue_deact = dq;
    #1;
    chk(deact == dq, "deact event follows QUEUE_DEACT");
    chk(ack_ok == !err && ack_err == err, "ack_ok / ack_err events");
    @(negedge clk);
    qs_ack = 0; qs_ack_err = 0; queue_deact = 0;
  endtask

  task automatic ctl(ifid_t ifid, bit eop, bit oam);
    @(negedge clk);
    egress_dstart = 1; egress_data = {oam, eop, ifid};
    @(negedge clk);
    egress_dstart = 0;
  endtask

  initial begin
    for (int p = 0; p < int'(NPORTS); p++) qual[p] = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    // Scenario 1: normal request, EOP = 0
    qual[4] = 8'b100;
    decide_and_find(4, 2, 7, 1);
    chk(qs_req && qs_req_port_id == 4 && qs_req_class_id == 2, "request for port 4 class 2");
    chk(issue && cs_commit && cs_commit_idx == 7 && ps_commit && ps_commit_idx == 107, "issue and commits");
    ack(4, 0, 0);
    chk(!qs_req, "QS_REQ dropped after QS_ACK");
    ctl(3'd5, 1, 0);                       // other interface: ignored
    chk(!in_prog[4] && !lock_v, "foreign control data ignored");
    cs_valid = 1; cs_class = 2;
    repeat (3) begin @(negedge clk); #1; chk(!ps_start, "no new search before control data"); end
    cs_valid = 0;
    ctl(3'd1, 0, 1);
    chk(in_prog[4] && prog_class[4] == 2 && lock_v && lock_port == 4 && lock_class == 2, "packet in progress recorded");

    // Scenario 2: QS_ACK_ERR with QUEUE_DEACT, new search immediately
    qual[6] = 8'b1;
    decide_and_find(6, 0, 3, 1);
    ack(1, 1, 1);
    cs_valid = 1; cs_class = 0;
    #1; chk(ps_start, "new search right after QS_ACK_ERR");
    @(negedge clk); cs_valid = 0;
    repeat (2) @(negedge clk);
    ps_done = 1; ps_found = 0; @(negedge clk); ps_done = 0;   // search found nothing

    // Scenario 3: QUEUE_DEACT with QS_ACK, then EOP data
    decide_and_find(6, 0, 3, 1);
    ack(6, 0, 1);
    ctl(3'd2, 1, 0);
    chk(!in_prog[6] && !lock_v, "EOP ends the packet and the lock");

    // Promotion: port 4 shown at class 5, requested at its in-progress class 2
    qual[4] = 8'b0010_0000; promo[4] = 1;
    decide_and_find(4, 5, 1, 1);
    chk(qs_req && qs_req_class_id == 2, "promoted port requested at in-progress class");
    ack(2, 0, 0);
    ctl(3'd1, 1, 0);
    promo[4] = 0;

    // Lost qualification during the search: no request
    qual[8] = 8'b1;
    decide_and_find(8, 0, 9, 0);
    chk(!qs_req && !issue, "no request for a port that is no longer qualified");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
