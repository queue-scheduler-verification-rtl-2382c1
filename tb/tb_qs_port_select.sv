// tb_qs_port_select: self-checking test of the port selection calendar.
//
// Programs the bandwidth example of the specification: 15 ports (H1..H15,
// here ports 1..15) with 5 entries each and 5 ports (L1..L5, ports 16..20)
// with 1 entry each in the first 80 entries, the rest null. With every port
// eligible, 800 searches must give each H port 50 turns and each L port 10
// (50 and 10 Mbit/s of an 800 Mbit/s interface), in calendar order. Each
// search must finish within PCAL_DEPTH/SCAN_W + 1 cycles. Then checks that the
// priority and class filters are applied, that the walk resumes after the
// last used entry, and that a search with nothing eligible reports not found.
module tb_qs_port_select;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267, PCAL_DEPTH = 512, SCAN_W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] port_cfg = 2'b00;
  port_cfg_t  port_cfg_arr [NPORTS];
  port_t      pcal [PCAL_DEPTH];
  class_vec_t qual [NPORTS];
  logic       start = 0, prio = 0, busy, done, found, commit = 0, commit_prio = 0;
  class_t     cls = 0;
  port_t      port;
  logic [8:0] idx, commit_idx = 0;

  qs_port_select dut (.*);

  int checks = 0, failures = 0;
  int cnt [NPORTS];
  int exp_seq [80];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search(input bit pr, input int c, output bit f, output int pt, output int lat);
    @(negedge clk); start = 1; prio = pr; cls = class_t'(c);
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    f = found; pt = int'(port);
    commit = found; commit_prio = pr; commit_idx = idx;
    @(negedge clk); commit = 0;
  endtask

  initial begin
    bit f; int pt, lat, maxlat;
    for (int p = 0; p < int'(NPORTS); p++) begin port_cfg_arr[p] = '0; qual[p] = '0; end
    for (int i = 0; i < int'(PCAL_DEPTH); i++) pcal[i] = 9'd511;
    for (int r = 0; r < 5; r++) begin
      for (int h = 0; h < 15; h++) begin pcal[16*r + h] = port_t'(h + 1); exp_seq[16*r + h] = h + 1; end
      pcal[16*r + 15] = port_t'(16 + r); exp_seq[16*r + 15] = 16 + r;
    end
    for (int p = 1; p <= 20; p++) qual[p] = 8'b1;
    repeat (2) @(posedge clk); rst_n = 1;
    maxlat = 0;
    for (int n = 0; n < 800; n++) begin
      search(0, 0, f, pt, lat);
      if (lat > maxlat) maxlat = lat;
      checks++;
      if (!f || pt != exp_seq[n % 80]) begin
        failures++; if (failures < 10) $display("search %0d: found=%b port=%0d exp %0d", n, f, pt, exp_seq[n % 80]);
      end
      if (f) cnt[pt]++;
    end
    for (int p = 1; p <= 20; p++) begin
      checks++;
      if (cnt[p] != ((p <= 15) ? 50 : 10)) begin failures++; $display("port %0d got %0d turns", p, cnt[p]); end
    end
    checks++;
    if (maxlat > int'(PCAL_DEPTH / SCAN_W) + 1) begin failures++; $display("search took %0d cycles", maxlat); end
    // priority filter: port 5 high priority, only it is found for prio 1
    port_cfg_arr[5].high_pri = 1;
    search(1, 0, f, pt, lat);
    checks++; if (!f || pt != 5) begin failures++; $display("high prio: %b %0d", f, pt); end
    search(0, 0, f, pt, lat);
    checks++; if (!f || pt == 5) begin failures++; $display("low prio picked %0d", pt); end
    // class filter: only port 12 has class 3
    qual[12] = 8'b1001;
    search(0, 3, f, pt, lat);
    checks++; if (!f || pt != 12) begin failures++; $display("class filter: %b %0d", f, pt); end
    // nothing eligible: full traversal, not found
    search(0, 6, f, pt, lat);
    checks++; if (f) begin failures++; $display("found a port for an empty class"); end
    checks++; if (lat != int'(PCAL_DEPTH / SCAN_W) + 1) begin failures++; $display("empty search took %0d", lat); end
    // null entries: in 75x8, entry value 100 is null even if port 100 is eligible
    for (int i = 0; i < int'(PCAL_DEPTH); i++) pcal[i] = 9'd100;
    qual[100] = 8'b1;
    search(0, 0, f, pt, lat);
    checks++; if (f) begin failures++; $display("null port entry used"); end
    port_cfg = 2'b10;
    search(0, 0, f, pt, lat);
    checks++; if (!f || pt != 100) begin failures++; $display("267x2: port 100 not found"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
