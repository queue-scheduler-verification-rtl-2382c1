// tb_qs_75_pc_pi_random: random workload on the full-size scheduler in the
// 75 ports x 8 classes configuration, with mixed port contiguous / port
// interleave ports and class promotion, checked against an independent model
// of the selection algorithm.
//
// Setup: PORT_CFG = 75x8, IFID1 = IFID2 = 2, even ports high priority, odd
// ports low priority, ports 0-36 port contiguous, ports 37-74 port
// interleave, class promotion on, strict class priority (class calendar off),
// port calendar at its reset contents (entry i = port i, entries 75-511
// null), polling and bandwidth limiter off. AFULL_1 and AFULL_2 are held high
// while 1000 random packets are activated, then released, so the scheduler
// starts from a fixed set of queues and every later decision is exactly
// predictable. While the scheduler waits for the control data of a
// segment that is not an end of packet, the queue manager now and then
// activates a one-segment packet in a higher class of the same port, so that
// an interleave port really switches class inside a packet and a contiguous
// port must resist doing so.
//
// Packets: port uniform over 0-74; class drawn with weights
// 25:15:15:15:15:10:5:5 for classes 0-7; length 1 segment (50%) or 4-7
// segments (50%); OAM on half of the packets.
//
// The testbench acts as the queue manager: it answers each QS_REQ after 1-6
// cycles with QS_ACK (and QUEUE_DEACT when the queue becomes empty) and sends
// the segment's control data 0-3 cycles later. Every request is compared with
// the model's choice: high port priority first if any high port has a
// qualified queue; then the highest class with a qualified queue among ports
// of that priority, where a port contiguous port in the middle of a packet
// offers only its class in progress, promoted to the highest class holding
// data in that port; then the first port of that priority in the port
// calendar, searched from the entry after the last one used for that
// priority. A promoted request must name the class in progress.
//
// Polling is left off here so that the order does not depend on clock-domain
// crossing latency; it is covered by the end-to-end test. At the end all
// segments must have been sent, no QS_ACK_ERR may have occurred, the request
// counter register must match, and promotion, contiguous continuation,
// interleaving across a packet and both port priorities must each have been
// seen.
module tb_qs_75_pc_pi_random;
  import qs_pkg::*;

  localparam int NP = 75;
  localparam int NACT = 1000;

  logic sysclk = 0, mpbclk = 0, rst_n = 0;
  always #2.5 sysclk = ~sysclk;
  always #4.8 mpbclk = ~mpbclk;

  logic [1:0] port_cfg = 2'b00;
  ifid_t ifid1 = 3'd2, ifid2 = 3'd2;
  logic queue_act = 0;
  port_t port_id = 0;
  class_t class_id = 0;
  ifid_t if_id = 0;
  logic qs_req, qs_ack = 0, queue_deact = 0, qs_ack_err = 0, egress_dstart = 0;
  port_t qs_req_port_id;
  class_t qs_req_class_id;
  logic [4:0] egress_data = 0;
  logic sel_addr_valid = 0, poll_resp = 0;
  port_t sel_addr = 0, poll_resp_addr = 0;
  logic afull_1 = 1, afull_2 = 1;
  logic [11:0] cbi_addr = 0;
  logic cbi_wr = 0, cbi_rd = 0;
  logic [15:0] cbi_wdata = 0, cbi_rdata;

  queue_scheduler dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model state
  typedef struct packed { logic eop; logic oam; } seg_t;
  seg_t segs [NP*8][$];
  int   total_segs = 0, sent_segs = 0;
  bit   m_prog [NP];          // packet in progress (contiguous tracking)
  int   m_pcls [NP];
  int   m_ptr  [2];           // port calendar pointer per priority (1 = high)
  int   n_req = 0, n_promo = 0, n_contig = 0, n_interleave = 0, n_hi = 0, n_lo = 0, n_err = 0, n_mid_act = 0;
  int   last_cls [NP];        // class of the last grant on an interleave port
  bit   il_open [NP];         // interleave port in the middle of a packet

  function automatic bit is_hi(int p); return (p % 2) == 0; endfunction
  function automatic bit is_contig(int p); return p <= 36; endfunction

  function automatic int top_class(int p);
    int t;
    t = -1;
    for (int c = 0; c < 8; c++) if (segs[p*8+c].size() > 0) t = c;
    return t;
  endfunction

  // class at which port p competes for class c (or -1 when it does not)
  function automatic bit offers(int p, int c);
    if (is_contig(p) && m_prog[p]) return (top_class(p) == c) && segs[p*8+m_pcls[p]].size() > 0;
    return segs[p*8+c].size() > 0;
  endfunction

  // predicted (port, class of the request, promoted); port -1 when nothing
  task automatic predict(output int pp, output int rc, output bit promoted);
    int prio, cls;
    bit any_hi;
    any_hi = 0;
    for (int p = 0; p < NP; p++) if (is_hi(p)) for (int c = 0; c < 8; c++) if (offers(p, c)) any_hi = 1;
    prio = any_hi ? 1 : 0;
    cls = -1;
    for (int c = 0; c < 8; c++)
      for (int p = 0; p < NP; p++) if (int'(is_hi(p)) == prio && offers(p, c)) cls = c;
    pp = -1; rc = -1; promoted = 0;
    if (cls < 0) return;
    for (int i = 0; i < 512; i++) begin
      int e;
      e = (m_ptr[prio] + i) % 512;
      if (e < NP && int'(is_hi(e)) == prio && offers(e, cls)) begin
        pp = e;
        m_ptr[prio] = (e + 1) % 512;
        break;
      end
    end
    if (pp < 0) return;
    promoted = is_contig(pp) && m_prog[pp];
    rc = promoted ? m_pcls[pp] : cls;
    if (prio == 1) n_hi++; else n_lo++;
  endtask

  // ---------------------------------------------------------------- register bus
  task automatic wr(int a, int d);
    @(negedge sysclk); cbi_addr = 12'(a); cbi_wdata = 16'(d); cbi_wr = 1;
    @(negedge sysclk); cbi_wr = 0;
  endtask
  task automatic rd(int a, output int d);
    @(negedge sysclk); cbi_addr = 12'(a); cbi_rd = 1;
    @(negedge sysclk); cbi_rd = 0; d = int'(cbi_rdata);
  endtask

  // ---------------------------------------------------------------- checker
  // Called by the responder on the first cycle of each request, before the
  // model state changes for it.
  task automatic check_request();
    int ep, ec;
    bit pr;
    predict(ep, ec, pr);
    n_req++;
    chk(ep == int'(qs_req_port_id) && ec == int'(qs_req_class_id),
        $sformatf("request %0d: got port %0d class %0d, expected port %0d class %0d",
                  n_req, qs_req_port_id, qs_req_class_id, ep, ec));
    if (pr) n_promo++;
    if (ep >= 0 && is_contig(ep) && m_prog[ep]) n_contig++;
    if (ep >= 0 && !is_contig(ep) && il_open[ep] && last_cls[ep] != ec) n_interleave++;
  endtask

  // ---------------------------------------------------------------- queue manager responder
  initial begin
    forever begin
      @(negedge sysclk);
      if (qs_req) begin
        int p, c, k;
        bit err, dq;
        seg_t s;
        p = int'(qs_req_port_id); c = int'(qs_req_class_id); k = p * 8 + c;
        check_request();
        repeat ($urandom % 6) @(negedge sysclk);
        err = (k >= NP * 8) || segs[k].size() == 0;
        if (err) begin
          n_err++;
          chk(0, $sformatf("request for empty queue port %0d class %0d", p, c));
          qs_ack = 1; qs_ack_err = 1; queue_deact = 1;
          @(negedge sysclk);
          qs_ack = 0; qs_ack_err = 0; queue_deact = 0;
        end else begin
          s = segs[k].pop_front();
          sent_segs++;
          dq = segs[k].size() == 0;
          qs_ack = 1; queue_deact = dq;
          @(negedge sysclk);
          qs_ack = 0; queue_deact = 0;
          // now and then a higher class of the same port gets a packet in
          // the middle of this one; the scheduler is waiting for control data
          // here, so its next decision sees the new queue
          if (!s.eop && c < 7 && ($urandom % 4) == 0) begin
            int hc;
            seg_t h;
            hc = c + 1 + int'($urandom % (7 - c));
            h.eop = 1; h.oam = 0;
            segs[p*8+hc].push_back(h);
            total_segs++; n_mid_act++;
            queue_act = 1; port_id = port_t'(p); class_id = class_t'(hc); if_id = ifid1;
            @(negedge sysclk);
            queue_act = 0;
          end
          repeat ($urandom % 4) @(negedge sysclk);
          // model state follows the control data, as the scheduler does
          m_prog[p] = !s.eop; m_pcls[p] = c;
          if (!is_contig(p)) begin il_open[p] = !s.eop; last_cls[p] = c; end
          egress_dstart = 1; egress_data = {s.oam, s.eop, ifid1};
          @(negedge sysclk);
          egress_dstart = 0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  function automatic int pick_class();
    int r;
    r = int'($urandom % 105);
    if (r < 25) return 0;
    if (r < 40) return 1;
    if (r < 55) return 2;
    if (r < 70) return 3;
    if (r < 85) return 4;
    if (r < 95) return 5;
    if (r < 100) return 6;
    return 7;
  endfunction

  initial begin
    int v, idle;
    foreach (m_prog[i]) begin m_prog[i] = 0; m_pcls[i] = 0; last_cls[i] = 0; il_open[i] = 0; end
    m_ptr[0] = 0; m_ptr[1] = 0;
    repeat (4) @(negedge sysclk);
    rst_n = 1;
    repeat (4) @(negedge sysclk);
    for (int p = 0; p < NP; p++) wr(12'h400 + p, (int'(is_contig(p)) << 1) | int'(is_hi(p)));
    wr(12'h000, 1 << 3);                 // class promotion only
    // 1000 activations while both FIFOs report almost full
    for (int a = 0; a < NACT; a++) begin
      int p, c, len;
      bit oam;
      p = int'($urandom % NP); c = pick_class();
      len = ($urandom % 2) ? 1 : 4 + int'($urandom % 4);
      oam = $urandom % 2;
      for (int i = 0; i < len; i++) begin
        seg_t s;
        s.eop = (i == len - 1);
        s.oam = oam && (i == len - 1);
        segs[p*8+c].push_back(s);
        total_segs++;
      end
      @(negedge sysclk);
      queue_act = 1; port_id = port_t'(p); class_id = class_t'(c); if_id = ifid1;
      @(negedge sysclk);
      queue_act = 0;
    end
    repeat (10) @(negedge sysclk);
    chk(!qs_req, "no request while AFULL is high");
    afull_1 = 0; afull_2 = 0;
    // run until every segment has gone and the scheduler is idle
    idle = 0;
    while (idle < 300) begin
      @(negedge sysclk);
      if (qs_req || sent_segs < total_segs) idle = 0; else idle++;
    end
    chk(sent_segs == total_segs, $sformatf("sent %0d of %0d segments", sent_segs, total_segs));
    chk(n_err == 0, "QS_ACK_ERR occurred");
    rd(12'h001, v);
    chk(v == (n_req & 16'hFFFF), $sformatf("REQ_CNT %0d, requests seen %0d", v, n_req));
    chk(n_promo > 0, "no promotion happened");
    chk(n_contig > 0, "no contiguous continuation happened");
    chk(n_interleave > 0, "no interleaving across a packet happened");
    chk(n_hi > 0 && n_lo > 0, "both port priorities granted");
    $display("segments=%0d requests=%0d high=%0d low=%0d promoted=%0d contiguous=%0d interleaved=%0d mid-packet activations=%0d",
             total_segs, n_req, n_hi, n_lo, n_promo, n_contig, n_interleave, n_mid_act);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
