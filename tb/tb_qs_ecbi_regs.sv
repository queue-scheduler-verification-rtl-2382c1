// tb_qs_ecbi_regs: self-checking test of the register block.
//
// Checks reset values of every register, writes a distinct value to every
// writable register and reads all of them back (no aliasing), checks that the
// exported configuration arrays follow the registers, and that the event
// counters and the sticky overflow bit count what they are given.
module tb_qs_ecbi_regs;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267, PCAL_DEPTH = 512, CCAL_DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] cbi_addr = 0;
  logic cbi_wr = 0, cbi_rd = 0;
  logic [15:0] cbi_wdata = 0, cbi_rdata;
  qs_ctrl_t ctrl;
  port_cfg_t port_cfg_arr [NPORTS];
  logic [3:0] ccal [CCAL_DEPTH];
  port_t pcal [PCAL_DEPTH];
  logic [MP_W-1:0] mp_setting [NPORTS];
  logic ev_req = 0, ev_ack_err = 0, ev_eop = 0, ev_oam = 0, ev_fifo_ovf = 0, ev_act_reject = 0;

  qs_ecbi_regs dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk); cbi_addr = 12'(a); cbi_wdata = 16'(d); cbi_wr = 1;
    @(negedge clk); cbi_wr = 0;
  endtask
  task automatic rd_exp(int a, int e, string what);
    @(negedge clk); cbi_addr = 12'(a); cbi_rd = 1;
    @(negedge clk); cbi_rd = 0;
    checks++;
    if (cbi_rdata !== 16'(e)) begin
      failures++; if (failures < 10) $display("%s @%h: read %h expected %h", what, a, cbi_rdata, 16'(e));
    end
  endtask

  function automatic int pat(int a);   // distinct value per address
    return (a * 37 + 11) & 16'hFFFF;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // reset values
    rd_exp(12'h000, 0, "CTRL reset");
    for (int i = 0; i < 7; i++) if (i != 0) rd_exp(i, 0, "counter reset");
    for (int i = 0; i < 32; i++) rd_exp(12'h020 + i, 15, "class cal reset");
    for (int i = 0; i < 512; i++) rd_exp(12'h200 + i, i, "port cal reset");
    for (int p = 0; p < 267; p++) rd_exp(12'h400 + p, 0, "port cfg reset");
    for (int p = 0; p < 267; p++) rd_exp(12'h600 + p, 0, "mp reset");
    // write everything
    wr(12'h000, 16'hFFFF);
    for (int i = 0; i < 32; i++) wr(12'h020 + i, pat(i));
    for (int i = 0; i < 512; i++) wr(12'h200 + i, pat(i + 1000));
    for (int p = 0; p < 267; p++) wr(12'h400 + p, pat(p + 2000));
    for (int p = 0; p < 267; p++) wr(12'h600 + p, pat(p + 3000));
    // read back
    rd_exp(12'h000, 16'h073F, "CTRL");
    for (int i = 0; i < 32; i++) rd_exp(12'h020 + i, pat(i) & 15, "class cal");
    for (int i = 0; i < 512; i++) rd_exp(12'h200 + i, pat(i + 1000) & 511, "port cal");
    for (int p = 0; p < 267; p++) rd_exp(12'h400 + p, pat(p + 2000) & 3, "port cfg");
    for (int p = 0; p < 267; p++) rd_exp(12'h600 + p, pat(p + 3000), "mp");
    rd_exp(12'h400 + 267, 0, "beyond last port");
    // exported arrays
    checks++;
    if (ctrl.pri_class != 7 || !ctrl.bw_limit_en || !ctrl.queue_contig) begin failures++; $display("ctrl export"); end
    for (int i = 0; i < 512; i++) begin checks++; if (pcal[i] != 9'(pat(i + 1000))) begin failures++; $display("pcal export %0d", i); end end
    for (int p = 0; p < 267; p++) begin
      checks++;
      if (port_cfg_arr[p] != port_cfg_t'(pat(p + 2000) & 3) || mp_setting[p] != 16'(pat(p + 3000))) begin
        failures++; $display("port export %0d", p);
      end
    end
    for (int i = 0; i < 32; i++) begin checks++; if (ccal[i] != 4'(pat(i))) begin failures++; $display("ccal export %0d", i); end end
    // counters
    for (int n = 0; n < 25; n++) begin
      @(negedge clk);
      ev_req = 1; ev_ack_err = (n % 5 == 0); ev_eop = (n % 2 == 0); ev_oam = (n % 3 == 0); ev_act_reject = (n < 4);
      @(negedge clk);
      {ev_req, ev_ack_err, ev_eop, ev_oam, ev_act_reject} = '0;
    end
    @(negedge clk) ev_fifo_ovf = 1; @(negedge clk) ev_fifo_ovf = 0;
    rd_exp(12'h001, 25, "REQ_CNT");
    rd_exp(12'h002, 5, "ACKERR_CNT");
    rd_exp(12'h003, 13, "EOP_CNT");
    rd_exp(12'h004, 9, "OAM_CNT");
    rd_exp(12'h005, 1, "STATUS");
    rd_exp(12'h006, 4, "REJECT_CNT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
