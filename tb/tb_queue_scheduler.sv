// tb_queue_scheduler: end-to-end test of the queue scheduler at its full
// default size (267 ports, 600 queues, 512-entry port calendar, 32-entry class
// calendar, 2136-cycle bandwidth unit period).
//
// The testbench plays the queue manager (it stores the segments of every
// queue, sends QUEUE_ACT, answers QS_REQ after 1 to 6 cycles with QS_ACK,
// QUEUE_DEACT or QS_ACK_ERR, and sends the control data 1 to 4 cycles later)
// and the destination interface (AFULL flags, port poll responses and
// segment-transfer-complete indications on the 104 MHz MPB clock). Software
// setup goes through the register bus.
//
// Directed phases, each after a reset, check exact grant orders worked out by
// hand from the scheduling rules: port calendar round robin, port priority
// with strict class priority, the class calendar example with a super class,
// queue contiguous mode, port contiguous mode without and with class
// promotion. Further phases check port polling, the bandwidth limiter and a
// random mix with two destination interfaces, dynamic AFULL, missing
// QUEUE_DEACT (which must lead to QS_ACK_ERR), invalid activations and
// foreign control data. Checkers run on every request: the queue must hold
// data, its interface must not have been almost full, polling and bandwidth
// limits must allow it, and contiguity must be respected. Each mechanism is
// counted and a mechanism that never happened is a failure.
module tb_queue_scheduler;
  import qs_pkg::*;

  logic sysclk = 0, mpbclk = 0, rst_n = 0;
  always #2.5 sysclk = ~sysclk;      // 200 MHz
  always #4.8 mpbclk = ~mpbclk;      // ~104 MHz

  logic [1:0] port_cfg = 2'b00;
  ifid_t ifid1 = 0, ifid2 = 0;
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
  logic afull_1 = 0, afull_2 = 0;
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
    repeat (3000000) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ model
  typedef struct packed { logic eop; logic oam; } seg_t;
  seg_t  segs [int][$];           // key = port * 8 + class
  ifid_t qifid [int];
  bit    injected [int];          // QUEUE_DEACT withheld for this queue
  int    total_segs;
  int    pending_act [$];         // encoded activations waiting to be driven
  typedef struct { int port; int cls; } grant_t;
  grant_t grants [$];

  // environment knobs
  int  ack_max_delay = 6;
  bit  inject_deact = 0;
  bit  foreign_ctl = 0;
  bit  afull_auto = 0;
  int  afull_th = 3;
  bit  poll_gen = 0;
  bit  poll_allowed [int];        // ports the destination answers for
  bit  bw_on = 0;
  bit  qcontig_on = 0;
  bit  contig_port [int];
  bit  responder_on = 1;

  // mechanism counters
  int n_rr, n_strict, n_port_prio, n_cal, n_super, n_qcontig, n_pcontig, n_promo;
  int n_poll_gate, n_poll_cond, n_bw_stall, n_afull_stall, n_ack_err, n_deact, n_foreign, n_reject, n_both;
  int n_req, n_req_ph;

  // ------------------------------------------------------------------ register bus
  task automatic wr(int a, int d);
    @(negedge sysclk); cbi_addr = 12'(a); cbi_wdata = 16'(d); cbi_wr = 1;
    @(negedge sysclk); cbi_wr = 0;
  endtask
  task automatic rd(int a, output int d);
    @(negedge sysclk); cbi_addr = 12'(a); cbi_rd = 1;
    @(negedge sysclk); cbi_rd = 0; d = int'(cbi_rdata);
  endtask

  // ------------------------------------------------------------------ queue manager
  function automatic int key(int p, int c); return p * 8 + c; endfunction

  task automatic send_pkt(int ifid, int p, int c, int len, bit oam);
    int k;
    k = key(p, c);
    if ((ifid == int'(ifid1) || ifid == int'(ifid2)) && p < int'(num_ports(port_cfg))
        && c < int'(classes_per_port(port_cfg))) begin
      for (int i = 0; i < len; i++) begin
        seg_t s;
        s.eop = (i == len - 1);
        s.oam = oam && ((len == 1) || (i == len - 2));
        segs[k].push_back(s);
        total_segs++;
      end
      qifid[k] = ifid_t'(ifid);
    end
    pending_act.push_back((ifid << 16) | (p << 4) | c);
  endtask

  // activation driver: one QUEUE_ACT per cycle
  always @(negedge sysclk) begin
    queue_act <= 0;
    if (pending_act.size() > 0) begin
      int e;
      e = pending_act.pop_front();
      queue_act <= 1; if_id <= ifid_t'(e >> 16); port_id <= port_t'((e >> 4) & 511); class_id <= class_t'(e & 15);
    end
  end

  // destination interface segment counters (AFULL) and port selection status
  int  fifo_cnt1 = 0, fifo_cnt2 = 0, drain_ctr = 0;
  int  sel_q [$];
  int  sel_due [$];
  longint mtime = 0;

  always @(negedge sysclk) begin
    if (afull_auto) begin
      drain_ctr++;
      if (drain_ctr >= 7) begin
        drain_ctr = 0;
        if (fifo_cnt1 > 0) fifo_cnt1--;
        if (fifo_cnt2 > 0) fifo_cnt2--;
      end
      afull_1 <= (fifo_cnt1 >= afull_th);
      afull_2 <= (fifo_cnt2 >= afull_th);
    end
  end

  // poll model (updated where the events happen)
  bit pstat [int], pcond [int];
  int poll_idx = 0;
  always @(negedge mpbclk) begin
    mtime++;
    sel_addr_valid <= 0;
    poll_resp <= 0;
    if (sel_q.size() > 0 && sel_due[0] <= mtime) begin
      int p;
      p = sel_q.pop_front(); void'(sel_due.pop_front());
      sel_addr_valid <= 1; sel_addr <= port_t'(p);
      pcond[p] = 0;
    end
    if (poll_gen) begin
      int p;
      // the poll response calendar holds only the ports that answer
      p = poll_idx;
      for (int i = 0; i < int'(num_ports(port_cfg)); i++) begin
        p = (poll_idx + i) % int'(num_ports(port_cfg));
        if (poll_allowed.exists(p)) break;
      end
      poll_idx = (p + 1) % int'(num_ports(port_cfg));
      if (poll_allowed.exists(p)) begin
        poll_resp <= 1; poll_resp_addr <= port_t'(p);
        if (!(pcond.exists(p) && pcond[p])) pstat[p] = 1;
        else n_poll_cond++;
      end
    end
  end

  // responder
  initial begin
    forever begin
      @(negedge sysclk);
      if (responder_on && qs_req) begin
        int p, c, k, d;
        bit err, dq, eop, oam;
        p = int'(qs_req_port_id); c = int'(qs_req_class_id); k = key(p, c);
        d = 1 + ($urandom % ack_max_delay);
        repeat (d - 1) @(negedge sysclk);
        err = !segs.exists(k) || segs[k].size() == 0;
        if (err) begin
          chk(injected.exists(k) && injected[k], $sformatf("request for empty queue port %0d class %0d", p, c));
          injected[k] = 0;
          dq = 1;
          n_ack_err++;
        end else begin
          seg_t s;
          s = segs[k].pop_front();
          total_segs--;
          eop = s.eop; oam = s.oam;
          dq = (segs[k].size() == 0);
          if (dq && inject_deact && ($urandom % 3 == 0)) begin dq = 0; injected[k] = 1; end
          grants.push_back('{p, c});
        end
        if (dq) n_deact++;
        qs_ack = 1; qs_ack_err = err; queue_deact = dq;
        @(negedge sysclk);
        qs_ack = 0; qs_ack_err = 0; queue_deact = 0;
        if (!err) begin
          repeat ($urandom % 4) @(negedge sysclk);
          if (foreign_ctl && ($urandom % 2)) begin
            egress_dstart = 1; egress_data = {2'b01, 3'd5};  // another scheduler's segment
            n_foreign++;
            @(negedge sysclk);
            egress_dstart = 0;
          end
          egress_dstart = 1; egress_data = {oam, eop, qifid[k]};
          @(negedge sysclk);
          egress_dstart = 0;
          if (qifid[k] == ifid1 || ifid1 == ifid2) fifo_cnt1++;
          if (qifid[k] != ifid1 && qifid[k] == ifid2) begin
            if (ifid2 == 3'b111) begin fifo_cnt1++; n_both++; end
            fifo_cnt2++;
          end
          sel_q.push_back(p); sel_due.push_back(int'(mtime) + 3 + ($urandom % 10));
        end
      end
    end
  end

  // ------------------------------------------------------------------ checkers
  // bandwidth model: port p's unit period k ends at cycle 2136*k + 8*p + 7
  int  bw_lvl [267];
  int  mp_set [267];
  longint tcyc = 0;
  bit  prev_req = 0;
  bit  s_af1, s_af2;
  int  s_lvl [267];
  bit  s_pok [267];
  bit  in_pkt_q = 0; int lock_k = 0;
  bit  pin_prog [267]; int pcls [267];

  always @(posedge sysclk) begin
    if (!rst_n) begin
      tcyc = 0; prev_req = 0;
      foreach (bw_lvl[i]) bw_lvl[i] = 0;
    end else begin
      // a request that rose at the previous edge: decision inputs are the snapshot
      if (qs_req && !prev_req) begin
        int p, c, k;
        bit to2, blk;
        p = int'(qs_req_port_id); c = int'(qs_req_class_id); k = key(p, c);
        n_req++; n_req_ph++;
        chk(p < int'(num_ports(port_cfg)) && c < int'(classes_per_port(port_cfg)), "request for an invalid queue");
        if (qifid.exists(k)) begin
          to2 = (qifid[k] != ifid1) && (qifid[k] == ifid2);
          if (ifid1 == ifid2) blk = s_af1;
          else if (!to2) blk = s_af1;
          else if (ifid2 == 3'b111) blk = s_af1 || s_af2;
          else blk = s_af2;
          chk(!blk, $sformatf("request for port %0d class %0d while its FIFO is almost full", p, c));
        end
        if (poll_gen) begin
          chk(s_pok[p], $sformatf("request for port %0d without a positive poll", p));
          pcond[p] = 1; pstat[p] = 0;
        end
        if (bw_on) chk(s_lvl[p] < 17, $sformatf("port %0d over its bandwidth limit", p));
        if (qcontig_on && in_pkt_q) begin
          chk(k == lock_k, "queue contiguous mode left a packet");
          if (k == lock_k) n_qcontig++;
        end
        if (!qcontig_on && contig_port.exists(p) && pin_prog[p]) begin
          chk(c == pcls[p], $sformatf("port contiguous port %0d changed class mid-packet", p));
          n_pcontig++;
        end
      end
      // grants update packet state and bandwidth model
      if (qs_ack && !qs_ack_err) begin
        int p, c, k;
        p = int'(qs_req_port_id); c = int'(qs_req_class_id); k = key(p, c);
        bw_lvl[p] = (bw_lvl[p] < 17) ? bw_lvl[p] + 1 : 17;
      end
      if (qs_ack && qs_ack_err && poll_gen) begin
        pcond[int'(qs_req_port_id)] = 0; pstat[int'(qs_req_port_id)] = 1;
      end
      if (egress_dstart && (egress_data[2:0] == ifid1 || egress_data[2:0] == ifid2)) begin
        int p, c;
        p = int'(qs_req_port_id); c = int'(qs_req_class_id);
        pin_prog[p] = !egress_data[3]; pcls[p] = c;
        in_pkt_q = !egress_data[3]; lock_k = key(p, c);
      end
      if ((tcyc % 8) == 7) begin
        int vp, kk, mpe;
        vp = int'((tcyc / 8) % 267); kk = int'(tcyc / 2136);
        mpe = (mp_set[vp] == 0) ? 1 : mp_set[vp];
        if (((kk + 1) % mpe) == 0)
          bw_lvl[vp] = (qs_ack && !qs_ack_err && int'(qs_req_port_id) == vp) ? 1 : 0;
      end
      // mechanism observation
      if (bw_on) foreach (bw_lvl[i]) if (bw_lvl[i] >= 17 && segs.exists(key(i, 0)) && segs[key(i, 0)].size() > 0) n_bw_stall++;
      if ((afull_1 || afull_2) && total_segs > 0) n_afull_stall++;
      // snapshot for the next edge
      s_af1 = afull_1; s_af2 = afull_2;
      foreach (s_lvl[i]) s_lvl[i] = bw_lvl[i];
      foreach (s_pok[i]) s_pok[i] = (pstat.exists(i) && pstat[i]) && !(pcond.exists(i) && pcond[i]);
      if (poll_gen && total_segs > 0) foreach (s_pok[i]) if (!s_pok[i] && segs.exists(key(i, 0)) && segs[key(i, 0)].size() > 0) begin n_poll_gate++; break; end
      prev_req = qs_req;
      tcyc++;
    end
  end

  // ------------------------------------------------------------------ helpers
  task automatic do_reset(logic [1:0] cfg, ifid_t i1, ifid_t i2);
    @(negedge sysclk); rst_n = 0;
    port_cfg = cfg; ifid1 = i1; ifid2 = i2;
    segs.delete(); qifid.delete(); injected.delete(); grants.delete(); pending_act.delete();
    contig_port.delete(); poll_allowed.delete(); pstat.delete(); pcond.delete();
    sel_q.delete(); sel_due.delete();
    foreach (pin_prog[i]) begin pin_prog[i] = 0; pcls[i] = 0; mp_set[i] = 0; end
    in_pkt_q = 0; total_segs = 0; n_req_ph = 0; fifo_cnt1 = 0; fifo_cnt2 = 0;
    inject_deact = 0; foreign_ctl = 0; afull_auto = 0; poll_gen = 0; bw_on = 0; qcontig_on = 0;
    afull_1 = 0; afull_2 = 0; ack_max_delay = 6;
    repeat (4) @(negedge sysclk);
    rst_n = 1;
    repeat (2) @(negedge sysclk);
  endtask

  task automatic set_ctrl(bit qc, bit cal, bit pri, bit promo, bit poll, bit bw, int pcls_v);
    wr(12'h000, (pcls_v << 8) | (bw << 5) | (poll << 4) | (promo << 3) | (pri << 2) | (cal << 1) | qc);
    qcontig_on = qc; bw_on = bw;
  endtask

  task automatic wait_idle(int max_cycles, string tag);
    int n;
    n = 0;
    while ((total_segs > 0 || qs_req || pending_act.size() > 0) && n < max_cycles) begin
      @(negedge sysclk); n++;
    end
    chk(total_segs == 0, $sformatf("%s: %0d segments left unscheduled", tag, total_segs));
    repeat (20) @(negedge sysclk);
  endtask

  task automatic wait_grants(int n, int max_cycles);
    int t;
    t = 0;
    while (grants.size() < n && t < max_cycles) begin @(negedge sysclk); t++; end
  endtask

  task automatic expect_seq(grant_t exp [$], int from, string tag, ref int counter);
    for (int i = 0; i < exp.size(); i++) begin
      bit ok;
      ok = (from + i < grants.size()) && grants[from + i].port == exp[i].port && grants[from + i].cls == exp[i].cls;
      chk(ok, $sformatf("%s: grant %0d expected port %0d class %0d, got port %0d class %0d", tag, from + i,
          exp[i].port, exp[i].cls, (from + i < grants.size()) ? grants[from + i].port : -1,
          (from + i < grants.size()) ? grants[from + i].cls : -1));
      if (ok) counter++;
    end
  endtask

  // ------------------------------------------------------------------ phases
  int table4 [32] = '{15, 15, 0, 2, 3, 4, 5, 6, 1, 4, 5, 6, 2, 3, 5, 6,
                      15, 4, 15, 6, 5, 3, 4, 6, 1, 5, 2, 6, 3, 4, 5, 6};

  initial begin
    grant_t exp [$];
    int v;

    // A: port calendar round robin (default calendar = ports in order)
    do_reset(2'b00, 0, 0);
    afull_1 = 1;
    for (int r = 0; r < 3; r++) for (int p = 0; p < 10; p++) send_pkt(0, p, 0, 1, 0);
    repeat (40) @(negedge sysclk);
    afull_1 = 0;
    wait_idle(20000, "round robin");
    exp.delete();
    for (int i = 0; i < 30; i++) exp.push_back('{i % 10, 0});
    expect_seq(exp, 0, "round robin", n_rr);

    // B: port priority and strict class priority
    do_reset(2'b00, 0, 0);
    wr(12'h400 + 5, 1);                     // port 5 high priority
    afull_1 = 1;
    send_pkt(0, 1, 7, 1, 0); send_pkt(0, 1, 3, 1, 0); send_pkt(0, 2, 5, 1, 0); send_pkt(0, 5, 0, 2, 0);
    repeat (20) @(negedge sysclk);
    afull_1 = 0;
    wait_idle(20000, "priority");
    exp.delete();
    exp.push_back('{5, 0}); exp.push_back('{5, 0});
    expect_seq(exp, 0, "port priority", n_port_prio);
    exp.delete();
    exp.push_back('{1, 7}); exp.push_back('{2, 5}); exp.push_back('{1, 3});
    expect_seq(exp, 2, "strict class priority", n_strict);

    // C: class calendar (specification example) with super class 7
    do_reset(2'b00, 0, 0);
    for (int i = 0; i < 32; i++) wr(12'h020 + i, table4[i]);
    set_ctrl(0, 1, 1, 0, 0, 0, 7);
    afull_1 = 1;
    for (int c = 0; c < 7; c++) for (int n = 0; n < 10; n++) send_pkt(0, 0, c, 1, 0);
    for (int n = 0; n < 3; n++) send_pkt(0, 0, 7, 1, 0);
    repeat (100) @(negedge sysclk);
    afull_1 = 0;
    wait_idle(50000, "class calendar");
    exp.delete();
    for (int n = 0; n < 3; n++) exp.push_back('{0, 7});
    expect_seq(exp, 0, "super class", n_super);
    exp.delete();
    for (int i = 0; i < 32; i++) if (table4[i] != 15) exp.push_back('{0, table4[i]});
    expect_seq(exp, 3, "class calendar", n_cal);

    // D: queue contiguous mode
    do_reset(2'b00, 0, 0);
    set_ctrl(1, 0, 0, 0, 0, 0, 0);
    send_pkt(0, 0, 0, 5, 0);
    wait_grants(1, 2000);
    afull_1 = 1;
    send_pkt(0, 0, 1, 1, 0); send_pkt(0, 1, 1, 1, 0);
    repeat (20) @(negedge sysclk);
    afull_1 = 0;
    wait_idle(20000, "queue contiguous");
    exp.delete();
    for (int i = 0; i < 5; i++) exp.push_back('{0, 0});
    expect_seq(exp, 0, "queue contiguous", v);

    // E1: port contiguous, no promotion
    for (int promo = 0; promo < 2; promo++) begin
      do_reset(2'b00, 0, 0);
      wr(12'h400 + 0, 2); wr(12'h400 + 1, 2);   // ports 0, 1 port contiguous
      contig_port[0] = 1; contig_port[1] = 1;
      set_ctrl(0, 0, 0, promo, 0, 0, 0);
      send_pkt(0, 0, 0, 6, 0);
      wait_grants(1, 2000);
      afull_1 = 1;
      send_pkt(0, 0, 1, 2, 0); send_pkt(0, 1, 1, 4, 0);
      repeat (20) @(negedge sysclk);
      afull_1 = 0;
      wait_idle(20000, "port contiguous");
      exp.delete();
      if (!promo) begin
        for (int i = 0; i < 4; i++) exp.push_back('{1, 1});
        for (int i = 0; i < 5; i++) exp.push_back('{0, 0});
      end else begin
        for (int i = 0; i < 4; i++) begin exp.push_back('{1, 1}); exp.push_back('{0, 0}); end
        exp.push_back('{0, 0});
      end
      exp.push_back('{0, 1}); exp.push_back('{0, 1});
      if (promo) expect_seq(exp, 1, "class promotion", n_promo);
      else       expect_seq(exp, 1, "port contiguous, no promotion", v);
    end

    // F: port polling: only ports 1, 3, 5 answer polls at first
    do_reset(2'b00, 0, 0);
    set_ctrl(0, 0, 0, 0, 1, 0, 0);
    poll_allowed[1] = 1; poll_allowed[3] = 1; poll_allowed[5] = 1;
    poll_gen = 1;
    for (int p = 0; p < 8; p++) send_pkt(0, p, 0, 4, 0);
    repeat (6000) @(negedge sysclk);
    begin
      int bad;
      bad = 0;
      foreach (grants[i]) if (!(grants[i].port inside {1, 3, 5})) bad++;
      chk(bad == 0 && grants.size() == 12, $sformatf("polling: %0d grants, %0d to unpolled ports", grants.size(), bad));
    end
    for (int p = 0; p < 8; p++) poll_allowed[p] = 1;
    wait_idle(50000, "polling");

    // G: bandwidth limiter: port 3 limited to 17 segments per unit period
    do_reset(2'b00, 0, 0);
    wr(12'h600 + 3, 1); mp_set[3] = 1;
    wr(12'h600 + 4, 2); mp_set[4] = 2;
    set_ctrl(0, 0, 0, 0, 0, 1, 0);
    ack_max_delay = 2;
    send_pkt(0, 3, 0, 60, 0); send_pkt(0, 4, 0, 60, 0);
    wait_idle(200000, "bandwidth limiter");
    // 120 segments, 17 per period for port 3 and 17 per 2 periods for port 4
    chk(tcyc > 2136 * 3, "bandwidth limiter did not slow the ports down");

    // H: random mix, two destination interfaces (IFID2 = both), 147x4
    do_reset(2'b01, 1, 3'b111);
    for (int p = 0; p < 147; p++) if (p % 3 == 0) begin wr(12'h400 + p, 2); contig_port[p] = 1; end
    for (int p = 0; p < 147; p += 7) wr(12'h400 + p, (p % 3 == 0) ? 3 : 1);
    set_ctrl(0, 0, 0, 1, 0, 0, 0);
    inject_deact = 1; foreign_ctl = 1; afull_auto = 1; afull_th = 3;
    for (int n = 0; n < 400; n++) begin
      int p, c, ifd;
      p = $urandom % 147; c = $urandom % 4;
      // a queue keeps its interface: even ports IFID1, odd ports both
      ifd = (p % 2) ? 7 : 1;
      if ($urandom % 12 == 0) begin ifd = 4; n_reject++; end          // not ours
      if ($urandom % 15 == 0) begin p = 147 + $urandom % 100; n_reject++; end  // invalid port
      send_pkt(ifd, p, c, ($urandom % 2) ? 1 : 4 + $urandom % 4, $urandom % 2);
      repeat ($urandom % 30) @(negedge sysclk);
    end
    wait_idle(400000, "random");
    repeat (200) @(negedge sysclk);
    rd(12'h001, v);
    chk(v == (n_req_ph & 16'hFFFF), $sformatf("REQ_CNT register %0d, requests seen %0d", v, n_req_ph));
    rd(12'h006, v);
    chk(v > 0, "invalid activations not counted");

    // mechanism coverage
    chk(n_rr == 30, "round robin not observed");
    chk(n_port_prio == 2, "port priority not observed");
    chk(n_strict == 3, "strict class priority not observed");
    chk(n_super == 3, "super class not observed");
    chk(n_cal == 28, "class calendar order not observed");
    chk(n_qcontig > 0, "queue contiguous lock not exercised");
    chk(n_pcontig > 0, "port contiguous lock not exercised");
    chk(n_promo == 11, "class promotion not observed");
    chk(n_poll_gate > 0, "polling never held a port back");
    chk(n_poll_cond > 0, "poll conditioning never ignored a response");
    chk(n_bw_stall > 0, "bandwidth limiter never stopped a port");
    chk(n_afull_stall > 0, "AFULL never held traffic back");
    chk(n_ack_err > 0, "QS_ACK_ERR never happened");
    chk(n_deact > 0, "QUEUE_DEACT never happened");
    chk(n_foreign > 0, "foreign control data never sent");
    chk(n_reject > 0, "no invalid activation sent");
    chk(n_both > 0, "no traffic to both interfaces");
    $display("mechanisms: rr=%0d prio=%0d strict=%0d super=%0d cal=%0d qcontig=%0d pcontig=%0d promo=%0d poll_gate=%0d poll_cond=%0d bw_stall=%0d afull_stall=%0d ack_err=%0d deact=%0d foreign=%0d reject=%0d both=%0d req=%0d",
             n_rr, n_port_prio, n_strict, n_super, n_cal, n_qcontig, n_pcontig, n_promo, n_poll_gate, n_poll_cond,
             n_bw_stall, n_afull_stall, n_ack_err, n_deact, n_foreign, n_reject, n_both, n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
