// tb_qs_bw_limiter: self-checking test of the per-port bandwidth limiter at
// its full size (267 ports, 2136-cycle unit period, MAX_LVL 17).
//
// Several ports get random grants with different MP_SETTING values (0, 1, 2,
// 4). A reference model, written from the timing rule rather than the RTL's
// counters, places the end of port p's k-th unit period at cycle
// 2136*k + 8*p + 7 after reset and ends the measurement period when k+1 is a
// multiple of MP_SETTING. blocked[] is compared with the model every cycle,
// unit_tick must pulse every 2136 cycles, and a port granted without pause
// must get exactly 17 segments per measurement period.
module tb_qs_bw_limiter;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, inc = 0, unit_tick;
  port_t inc_port = 0;
  logic [MP_W-1:0] mp_setting [NPORTS];
  logic [NPORTS-1:0] blocked;

  qs_bw_limiter dut (.*);

  int checks = 0, failures = 0;
  int lvl [NPORTS];
  int ports [6] = '{0, 5, 100, 200, 266, 7};
  int mps   [6] = '{1, 2, 4, 0, 1, 3};
  int granted_in_period = 0, full_periods = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    for (int p = 0; p < int'(NPORTS); p++) begin mp_setting[p] = 16'd1; lvl[p] = 0; end
    foreach (ports[i]) mp_setting[ports[i]] = 16'(mps[i]);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    t = 0;
    while (t < 12 * 2136) begin
      // drive: port 0 is granted whenever it is not blocked, others randomly
      if (!blocked[0] && ($urandom % 3 != 0)) inc_port = 0;
      else inc_port = port_t'(ports[$urandom % 6]);
      inc = ($urandom % 2) == 1 || inc_port == 0;
      if (t > 6 * 2136 && t < 7 * 2136) en = 0; else en = 1;
      @(posedge clk);
      // model update for cycle t
      begin
        bit vis; int vp, k;
        vis = ((t % 8) == 7);
        vp  = (t / 8) % 267;
        k   = t / 2136;
        if (inc && inc_port == 0 && !blocked[0] && en) granted_in_period++;
        if (inc && lvl[inc_port] < 17) lvl[inc_port]++;
        if (vis) begin
          int mpe;
          mpe = (mp_setting[vp] == 0) ? 1 : int'(mp_setting[vp]);
          if (((k + 1) % mpe) == 0) begin
            lvl[vp] = (inc && int'(inc_port) == vp) ? 1 : 0;
            if (vp == 0) begin
              if (t > 2136 && !(t > 6 * 2136 && t < 8 * 2136)) begin
                checks++;
                if (granted_in_period != 17) begin
                  failures++; $display("port 0 got %0d segments in a period", granted_in_period);
                end
                full_periods++;
              end
              granted_in_period = 0;
            end
          end
        end
        if (unit_tick !== (vis && vp == 266)) begin failures++; $display("unit_tick wrong at %0d", t); end
      end
      #1;
      foreach (ports[i]) begin
        if (blocked[ports[i]] !== (en && lvl[ports[i]] >= 17)) begin
          failures++;
          if (failures < 10) $display("t=%0d port %0d blocked=%b lvl=%0d", t, ports[i], blocked[ports[i]], lvl[ports[i]]);
        end
        checks++;
      end
      @(negedge clk);
      t++;
    end
    if (full_periods < 5) begin failures++; $display("too few periods %0d", full_periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

