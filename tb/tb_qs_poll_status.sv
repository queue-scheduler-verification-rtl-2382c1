// tb_qs_poll_status: self-checking test of poll status and conditioning.
//
// Directed sequence on a few ports (response, issue, ignored response while
// conditioned, completion, new response, restore after QS_ACK_ERR, addresses
// out of range), then a random run against a reference model of the two bits
// per port, in the 75-port configuration.
module tb_qs_poll_status;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] port_cfg = 2'b00;
  logic poll_v = 0, sel_v = 0, issue = 0, restore = 0;
  port_t poll_addr = 0, sel_addr = 0, issue_port = 0, restore_port = 0;
  logic [NPORTS-1:0] poll_ok;

  qs_poll_status dut (.*);

  int checks = 0, failures = 0;
  bit st [NPORTS], cd [NPORTS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    int np;
    np = int'(num_ports(port_cfg));
    if (poll_v && poll_addr < np && !cd[poll_addr]) st[poll_addr] = 1;
    if (sel_v && sel_addr < np) cd[sel_addr] = 0;
    if (restore) begin cd[restore_port] = 0; st[restore_port] = 1; end
    if (issue) begin cd[issue_port] = 1; st[issue_port] = 0; end
    @(posedge clk); #1;
    poll_v = 0; sel_v = 0; issue = 0; restore = 0;
    for (int p = 0; p < int'(NPORTS); p++) begin
      if (poll_ok[p] !== (st[p] & ~cd[p])) begin
        failures++;
        if (failures < 10) $display("port %0d ok=%b exp=%b", p, poll_ok[p], st[p] & ~cd[p]);
      end
    end
    checks++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    poll_v = 1; poll_addr = 1; step();            // port 1 ready
    issue = 1; issue_port = 1; step();            // request: conditioned
    poll_v = 1; poll_addr = 1; step();            // ignored while conditioned
    if (poll_ok[1]) begin failures++; $display("response not ignored"); end
    sel_v = 1; sel_addr = 1; step();              // transfer done
    poll_v = 1; poll_addr = 1; step();            // ready again
    if (!poll_ok[1]) begin failures++; $display("port 1 not ready"); end
    issue = 1; issue_port = 1; step();
    restore = 1; restore_port = 1; step();        // QS_ACK_ERR
    if (!poll_ok[1]) begin failures++; $display("restore failed"); end
    poll_v = 1; poll_addr = 80; step();           // out of range in 75x8
    if (poll_ok[80]) begin failures++; $display("invalid port accepted"); end
    checks += 4;
    for (int n = 0; n < 3000; n++) begin
      poll_v = $urandom % 2; poll_addr = port_t'($urandom % 80);
      sel_v  = $urandom % 3 == 0; sel_addr = port_t'($urandom % 80);
      issue  = $urandom % 4 == 0; issue_port = port_t'($urandom % 75);
      restore = $urandom % 10 == 0; restore_port = port_t'($urandom % 75);
      if (restore && issue && restore_port == issue_port) restore = 0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
