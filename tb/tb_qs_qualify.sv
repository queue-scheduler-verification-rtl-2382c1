// tb_qs_qualify: self-checking test of queue status qualification.
//
// Directed cases first: the document's port contiguous example (port 0 class 0
// in progress, data arriving for port 0 class 1 and port 1 class 1) with and
// without class promotion, queue contiguous lock, the AFULL rules for every
// IFID1/IFID2 combination of interest, polling and bandwidth blocking. Then a
// random run compares every port's qualified bits with a reference written
// directly from the rules.
module tb_qs_qualify;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267;

  qs_ctrl_t   ctrl;
  port_cfg_t  port_cfg_arr [NPORTS];
  ifid_t      ifid1, ifid2;
  logic       afull_1, afull_2;
  class_vec_t has_data [NPORTS];
  class_vec_t to_if2   [NPORTS];
  logic [NPORTS-1:0] poll_ok, bw_blocked, in_prog, promo;
  class_t     prog_class [NPORTS];
  logic       lock_v;
  port_t      lock_port;
  class_t     lock_class;
  class_vec_t qual [NPORTS];

  qs_qualify dut (.*);

  int checks = 0, failures = 0;

  function automatic class_vec_t ref_qual(int p, output bit pr);
    class_vec_t b, r;
    bit blk1, blk2;
    int top;
    blk1 = afull_1;
    blk2 = (ifid1 == ifid2) ? afull_1 : (ifid2 == 3'b111) ? (afull_1 || afull_2) : afull_2;
    for (int c = 0; c < 8; c++)
      b[c] = has_data[p][c] && (!ctrl.poll_en || poll_ok[p]) && !bw_blocked[p]
             && !(to_if2[p][c] ? blk2 : blk1);
    top = 0;
    for (int c = 0; c < 8; c++) if (has_data[p][c]) top = c;
    pr = 0;
    r = b;
    if (ctrl.queue_contig) begin
      if (lock_v) begin r = '0; if (p == int'(lock_port)) r[lock_class] = b[lock_class]; end
    end else if (port_cfg_arr[p].port_contig && in_prog[p]) begin
      r = '0;
      if (ctrl.class_promo_en && !ctrl.class_cal_en) begin r[top] = b[prog_class[p]]; pr = 1; end
      else r[prog_class[p]] = b[prog_class[p]];
    end
    return r;
  endfunction

  task automatic check_all(string tag);
    #1;
    for (int p = 0; p < int'(NPORTS); p++) begin
      bit pr; class_vec_t e;
      e = ref_qual(p, pr);
      if (qual[p] !== e || promo[p] !== pr) begin
        failures++;
        if (failures < 10) $display("%s: port %0d qual=%b exp=%b promo=%b exp=%b", tag, p, qual[p], e, promo[p], pr);
      end
    end
    checks++;
  endtask

  task automatic clear_all();
    ctrl = '0; ifid1 = 0; ifid2 = 0; afull_1 = 0; afull_2 = 0;
    poll_ok = '1; bw_blocked = '0; in_prog = '0; lock_v = 0; lock_port = 0; lock_class = 0;
    for (int p = 0; p < int'(NPORTS); p++) begin
      port_cfg_arr[p] = '0; has_data[p] = '0; to_if2[p] = '0; prog_class[p] = '0;
    end
  endtask

  task automatic expect_bit(string tag, int p, int c, bit v);
    checks++;
    if (qual[p][c] !== v) begin failures++; $display("%s: qual[%0d][%0d]=%b expected %b", tag, p, c, qual[p][c], v); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // --- port contiguous example without promotion
    clear_all();
    port_cfg_arr[0].port_contig = 1; port_cfg_arr[1].port_contig = 1;
    has_data[0] = 8'b011; has_data[1] = 8'b010; in_prog[0] = 1; prog_class[0] = 0;
    #1;
    expect_bit("contig", 0, 0, 1); expect_bit("contig", 0, 1, 0); expect_bit("contig", 1, 1, 1);
    // --- with promotion: port 0 class 0 appears at class 1
    ctrl.class_promo_en = 1; #1;
    expect_bit("promo", 0, 1, 1); expect_bit("promo", 0, 0, 0);
    checks++; if (!promo[0]) begin failures++; $display("promo flag missing"); end
    // --- promotion ignored with class calendar
    ctrl.class_cal_en = 1; #1;
    expect_bit("promo+cal", 0, 0, 1); expect_bit("promo+cal", 0, 1, 0);
    // --- interleave port: no restriction
    port_cfg_arr[0].port_contig = 0; #1;
    expect_bit("interleave", 0, 0, 1); expect_bit("interleave", 0, 1, 1);
    // --- queue contiguous lock
    clear_all();
    ctrl.queue_contig = 1; has_data[0] = 8'b11; has_data[1] = 8'b11;
    lock_v = 1; lock_port = 0; lock_class = 0; #1;
    expect_bit("qlock", 0, 0, 1); expect_bit("qlock", 0, 1, 0); expect_bit("qlock", 1, 0, 0);
    lock_v = 0; #1;
    expect_bit("qfree", 1, 1, 1);
    // --- AFULL rules
    clear_all();
    has_data[2] = 8'b11; to_if2[2] = 8'b10;     // class 0 -> IFID1, class 1 -> IFID2
    ifid1 = 0; ifid2 = 3; afull_2 = 1; #1;
    expect_bit("af2", 2, 0, 1); expect_bit("af2", 2, 1, 0);
    ifid2 = 3'b111; afull_2 = 0; afull_1 = 1; #1;       // both: AFULL_1 also blocks IFID2 traffic
    expect_bit("both", 2, 0, 0); expect_bit("both", 2, 1, 0);
    ifid1 = 3'b111; afull_1 = 0; afull_2 = 1; #1;      // IFID1 = IFID2: only AFULL_1 counts
    expect_bit("same", 2, 0, 1); expect_bit("same", 2, 1, 1);
    // --- polling and bandwidth
    clear_all(); has_data[3] = 8'b1; ctrl.poll_en = 1; poll_ok[3] = 0; #1;
    expect_bit("poll", 3, 0, 0);
    ctrl.poll_en = 0; bw_blocked[3] = 1; #1;
    expect_bit("bw", 3, 0, 0);

    // --- random against reference
    for (int n = 0; n < 300; n++) begin
      ctrl = qs_ctrl_t'($urandom);
      ifid1 = ifid_t'($urandom % 3 == 0 ? 7 : $urandom % 4);
      ifid2 = ifid_t'($urandom % 3 == 0 ? 7 : $urandom % 4);
      afull_1 = $urandom % 3 == 0; afull_2 = $urandom % 3 == 0;
      poll_ok = '0; bw_blocked = '0; in_prog = '0;
      for (int p = 0; p < int'(NPORTS); p++) begin
        port_cfg_arr[p] = port_cfg_t'($urandom);
        has_data[p] = class_vec_t'($urandom); to_if2[p] = class_vec_t'($urandom);
        prog_class[p] = class_t'($urandom);
        poll_ok[p] = $urandom % 4 != 0; bw_blocked[p] = $urandom % 8 == 0; in_prog[p] = $urandom % 2;
      end
      lock_v = $urandom % 2; lock_port = port_t'($urandom % 20); lock_class = class_t'($urandom);
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
