// tb_qs_class_select: self-checking test of port priority and class selection.
//
// Uses the class calendar example of the scheduler's specification (32
// entries, 4 null, classes 0..6 appearing 1..7 times, class 7 absent). With
// every class always eligible, 28 x 10 selections must give class c exactly
// 10 x (c + 1) times and never class 7 (the shares 3.6 % ... 25 %). With
// CLASS_PRI_EN and PRI_CLASS = 7, class 7 must win every time it has traffic.
// Strict priority picks the highest class; a high priority port's traffic
// beats any low priority traffic; in the 147x4 configuration calendar entries
// above 3 are null.
module tb_qs_class_select;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267, CCAL_DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  qs_ctrl_t   ctrl;
  logic [1:0] port_cfg;
  port_cfg_t  port_cfg_arr [NPORTS];
  logic [3:0] ccal [CCAL_DEPTH];
  class_vec_t qual [NPORTS];
  logic       sel_valid, sel_prio, sel_from_cal, commit, commit_prio;
  class_t     sel_class;
  logic [4:0] sel_idx, commit_idx;

  qs_class_select dut (.*);

  int checks = 0, failures = 0;
  // Table 4 of the specification, 15 = null
  int table4 [32] = '{15, 15, 0, 2, 3, 4, 5, 6, 1, 4, 5, 6, 2, 3, 5, 6,
                      15, 4, 15, 6, 5, 3, 4, 6, 1, 5, 2, 6, 3, 4, 5, 6};
  int cnt [8];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pick_and_commit();
    #1;
    commit = sel_valid && sel_from_cal; commit_prio = sel_prio; commit_idx = sel_idx;
    if (sel_valid) cnt[sel_class]++;
    @(posedge clk); #1; commit = 0;
  endtask

  initial begin
    ctrl = '0; port_cfg = 2'b00; commit = 0; commit_prio = 0; commit_idx = 0;
    for (int i = 0; i < 32; i++) ccal[i] = 4'(table4[i]);
    for (int p = 0; p < int'(NPORTS); p++) begin port_cfg_arr[p] = '0; qual[p] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;

    // strict priority
    qual[3] = 8'b0010_0101; #1;
    checks++; if (!sel_valid || sel_class != 5 || sel_prio != 0) begin failures++; $display("strict: %0d", sel_class); end
    // port priority: a high priority port with class 1 beats low class 5
    port_cfg_arr[9].high_pri = 1; qual[9] = 8'b10; #1;
    checks++; if (!sel_valid || sel_class != 1 || sel_prio != 1) begin failures++; $display("prio: %0d %b", sel_class, sel_prio); end
    qual[9] = 0;

    // calendar distribution
    ctrl.class_cal_en = 1;
    qual[3] = 8'hFF;
    foreach (cnt[c]) cnt[c] = 0;
    repeat (280) pick_and_commit();
    for (int c = 0; c < 8; c++) begin
      int e;
      e = (c == 7) ? 0 : 10 * (c + 1);
      checks++;
      if (cnt[c] != e) begin failures++; $display("calendar class %0d: %0d picks, expected %0d", c, cnt[c], e); end
    end
    // order: after the last pick, the next pick follows the table
    begin
      int seq [8];
      int k;
      k = 0;
      for (int i = 0; i < 32 && k < 8; i++) if (table4[i] != 15) seq[k++] = table4[i];
      for (int j = 0; j < 8; j++) begin
        #1; checks++;
        if (sel_class != class_t'(seq[j])) begin failures++; $display("order %0d: %0d exp %0d", j, sel_class, seq[j]); end
        pick_and_commit();
      end
    end
    // super class
    ctrl.class_pri_en = 1; ctrl.pri_class = 7;
    foreach (cnt[c]) cnt[c] = 0;
    repeat (20) pick_and_commit();
    checks++; if (cnt[7] != 20) begin failures++; $display("super class picked %0d of 20", cnt[7]); end
    qual[3][7] = 0;
    #1; checks++; if (sel_class == 7 || !sel_from_cal) begin failures++; $display("super class without traffic"); end
    // only class 0 has traffic: calendar skips to entry with class 0
    qual[3] = 8'b1; #1;
    checks++; if (!sel_valid || sel_class != 0 || sel_idx != 2) begin failures++; $display("skip: %0d idx %0d", sel_class, sel_idx); end
    // 147x4: entries >= 4 are null; class 5 traffic is never selected
    port_cfg = 2'b01; qual[3] = 8'b0010_0000; #1;
    checks++; if (sel_valid) begin failures++; $display("null entry used"); end
    ctrl.class_cal_en = 0; qual[3] = 8'b1010; #1;
    checks++; if (sel_class != 3) begin failures++; $display("147x4 strict: %0d", sel_class); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
