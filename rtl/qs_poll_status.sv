// qs_poll_status: per-port poll status and poll conditioning.
//
// When port polling is enabled the scheduler only requests a segment for a
// port whose destination PHY has answered a poll positively (room for one
// segment). Each port has two bits:
//   status - set by a positive poll response for the port, cleared when a
//            request for the port is issued;
//   cond   - set when a request for the port is issued, cleared when the
//            segment transfer for the port completes (SEL_ADDR_VALID).
// While cond is set, poll responses for the port are ignored, so a response
// that predates the requested segment cannot let a second segment through.
// poll_ok[p] = status & ~cond.
//
// A request answered with QS_ACK_ERR moves no data and no SEL_ADDR will come
// for it; restore clears the conditioning and sets the status again (this
// recovery is this design's choice). Addresses outside the current port range
// are ignored. All inputs are single-cycle events in the system clock domain
// (the MPBCLK events arrive through qs_poll_fifo); outputs are registered.
// On the same port in one cycle, issue wins over a poll response, and a
// completion (sel) is applied before a new issue.
module qs_poll_status
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS = 267
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  port_cfg,
  input  logic        poll_v,
  input  port_t       poll_addr,
  input  logic        sel_v,
  input  port_t       sel_addr,
  input  logic        issue,
  input  port_t       issue_port,
  input  logic        restore,
  input  port_t       restore_port,
  output logic [NPORTS-1:0] poll_ok
);

  logic [NPORTS-1:0] status_q, cond_q;
  logic [PORT_W:0]   nports;
  assign nports = num_ports(port_cfg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status_q <= '0;
      cond_q   <= '0;
    end else begin
      if (poll_v && {1'b0, poll_addr} < nports && int'(poll_addr) < int'(NPORTS)
          && !cond_q[poll_addr])
        status_q[poll_addr] <= 1'b1;
      if (sel_v && {1'b0, sel_addr} < nports && int'(sel_addr) < int'(NPORTS))
        cond_q[sel_addr] <= 1'b0;
      if (restore && int'(restore_port) < int'(NPORTS)) begin
        cond_q[restore_port]   <= 1'b0;
        status_q[restore_port] <= 1'b1;
      end
      if (issue && int'(issue_port) < int'(NPORTS)) begin
        cond_q[issue_port]   <= 1'b1;
        status_q[issue_port] <= 1'b0;
      end
    end
  end

  assign poll_ok = status_q & ~cond_q;

endmodule
