// queue_scheduler: fair egress scheduler for up to 600 queues feeding up to
// two destination interfaces.
//
// Segments wait in queues held by an external queue manager; each queue is a
// (port, class) pair in one of three configurations (75x8, 147x4, 267x2,
// PORT_CFG pins). The scheduler never sees the data. It learns of data from
// queue activations, picks one queue, asks the queue manager for one 64-byte
// segment (QS_REQ), and waits for the acknowledgement and the segment's
// control data before choosing again.
//
// A queue may be chosen only if it is qualified (qs_qualify): it has data,
// its destination FIFO is not almost full (AFULL_1/AFULL_2), its port has
// answered a poll positively and is not still waiting for a previous segment
// (qs_poll_status, fed from the MPBCLK domain through qs_poll_fifo), its port
// is under its bandwidth limit (qs_bw_limiter), and contiguity allows it
// (queue contiguous mode, or port contiguous ports that may change class only
// at end of packet; class promotion lifts an in-progress class to the
// priority of the best class waiting in its port). Among qualified queues the
// choice is made in three steps: high priority ports before low priority
// ports, then a class (strict class priority, or the 32-entry class calendar
// with an optional super class) (qs_class_select), then a port from the
// 512-entry port calendar (qs_port_select). qs_req_ctrl runs the request
// handshake and keeps the per-port packet state; qs_ecbi_regs holds the
// configuration.
//
// Timing: a decision takes one cycle for the class and 1 to 64 cycles for the
// port calendar walk, then QS_REQ rises and stays high until QS_ACK. The
// block structure and timing are this design's own; the interfaces, the
// qualification rules and the selection order follow the scheduler's
// specification.
module queue_scheduler
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS     = 267,
  parameter int unsigned NQUEUES    = 600,
  parameter int unsigned PCAL_DEPTH = 512,
  parameter int unsigned CCAL_DEPTH = 32,
  parameter int unsigned SCAN_W     = 8,
  parameter int unsigned FIFO_AW    = 4
) (
  input  logic        sysclk,
  input  logic        mpbclk,
  input  logic        rst_n,
  // general purpose
  input  logic [1:0]  port_cfg,
  input  ifid_t       ifid1,
  input  ifid_t       ifid2,
  // queue status interface
  input  logic        queue_act,
  input  port_t       port_id,
  input  class_t      class_id,
  input  ifid_t       if_id,
  // queue request interface
  output logic        qs_req,
  output port_t       qs_req_port_id,
  output class_t      qs_req_class_id,
  input  logic        qs_ack,
  input  logic        queue_deact,
  input  logic        qs_ack_err,
  input  logic        egress_dstart,
  input  logic [4:0]  egress_data,
  // port selection status interface (mpbclk)
  input  logic        sel_addr_valid,
  input  port_t       sel_addr,
  // FIFO status interface
  input  logic        afull_1,
  input  logic        afull_2,
  // port polling interface (mpbclk)
  input  logic        poll_resp,
  input  port_t       poll_resp_addr,
  // register bus
  input  logic [11:0] cbi_addr,
  input  logic        cbi_wr,
  input  logic        cbi_rd,
  input  logic [15:0] cbi_wdata,
  output logic [15:0] cbi_rdata
);

  localparam int unsigned CCAL_IW = $clog2(CCAL_DEPTH);
  localparam int unsigned PCAL_IW = $clog2(PCAL_DEPTH);

  // configuration
  qs_ctrl_t        ctrl;
  port_cfg_t       port_cfg_arr [NPORTS];
  logic [3:0]      ccal [CCAL_DEPTH];
  port_t           pcal [PCAL_DEPTH];
  logic [MP_W-1:0] mp_setting [NPORTS];

  // status
  class_vec_t        has_data [NPORTS];
  class_vec_t        to_if2   [NPORTS];
  class_vec_t        qual     [NPORTS];
  logic [NPORTS-1:0] promo, poll_ok, bw_blocked, in_prog;
  class_t            prog_class [NPORTS];
  logic              lock_v;
  port_t             lock_port;
  class_t            lock_class;

  // events
  logic deact, issue, ack_ok, ack_err, ev_eop, ev_oam, fifo_ovf, fifo_ovf_sys;
  logic act_reject;

  // ---------------- MPBCLK -> SYSCLK events ----------------
  localparam int unsigned EVW = 2 * (PORT_W + 1);
  logic [EVW-1:0] ev_rdata;
  logic           ev_valid;
  logic           ovf_s1, ovf_s2;

  qs_poll_fifo #(.WIDTH(EVW), .AW(FIFO_AW)) u_poll_fifo (
    .rst_n    (rst_n),
    .wclk     (mpbclk),
    .wr_en    (poll_resp | sel_addr_valid),
    .wdata    ({poll_resp, poll_resp_addr, sel_addr_valid, sel_addr}),
    .overflow (fifo_ovf),
    .rclk     (sysclk),
    .rd_valid (ev_valid),
    .rdata    (ev_rdata)
  );

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_s1 <= 1'b0;
      ovf_s2 <= 1'b0;
    end else begin
      ovf_s1 <= fifo_ovf;
      ovf_s2 <= ovf_s1;
    end
  end
  assign fifo_ovf_sys = ovf_s2;

  // ---------------- blocks ----------------
  qs_ecbi_regs #(.NPORTS(NPORTS), .PCAL_DEPTH(PCAL_DEPTH), .CCAL_DEPTH(CCAL_DEPTH)) u_regs (
    .clk (sysclk), .rst_n (rst_n),
    .cbi_addr, .cbi_wr, .cbi_rd, .cbi_wdata, .cbi_rdata,
    .ctrl, .port_cfg_arr, .ccal, .pcal, .mp_setting,
    .ev_req (issue), .ev_ack_err (ack_err), .ev_eop, .ev_oam, .ev_fifo_ovf (fifo_ovf_sys), .ev_act_reject (act_reject)
  );

  qs_queue_status #(.NPORTS(NPORTS), .NQUEUES(NQUEUES)) u_qstat (
    .clk (sysclk), .rst_n (rst_n), .port_cfg, .ifid1, .ifid2,
    .queue_act, .port_id, .class_id, .if_id,
    .deact, .deact_port (qs_req_port_id), .deact_class (qs_req_class_id),
    .has_data, .to_if2, .act_reject
  );

  qs_poll_status #(.NPORTS(NPORTS)) u_poll (
    .clk (sysclk), .rst_n (rst_n), .port_cfg,
    .poll_v (ev_valid & ev_rdata[EVW-1]), .poll_addr (ev_rdata[EVW-2 -: PORT_W]),
    .sel_v  (ev_valid & ev_rdata[PORT_W]), .sel_addr (ev_rdata[PORT_W-1:0]),
    .issue, .issue_port (qs_req_port_id),
    .restore (ack_err), .restore_port (qs_req_port_id),
    .poll_ok
  );

  qs_bw_limiter #(.NPORTS(NPORTS)) u_bw (
    .clk (sysclk), .rst_n (rst_n), .en (ctrl.bw_limit_en), .mp_setting,
    .inc (ack_ok), .inc_port (qs_req_port_id), .blocked (bw_blocked), .unit_tick ()
  );

  qs_qualify #(.NPORTS(NPORTS)) u_qual (
    .ctrl, .port_cfg_arr, .ifid1, .ifid2, .afull_1, .afull_2,
    .has_data, .to_if2, .poll_ok, .bw_blocked, .in_prog, .prog_class,
    .lock_v, .lock_port, .lock_class, .qual, .promo
  );

  logic cs_valid, cs_prio, cs_from_cal, cs_commit, cs_commit_prio;
  class_t cs_class;
  logic [CCAL_IW-1:0] cs_idx, cs_commit_idx;

  qs_class_select #(.NPORTS(NPORTS), .CCAL_DEPTH(CCAL_DEPTH)) u_cls (
    .clk (sysclk), .rst_n (rst_n), .ctrl, .port_cfg, .port_cfg_arr, .ccal, .qual,
    .sel_valid (cs_valid), .sel_prio (cs_prio), .sel_class (cs_class),
    .sel_from_cal (cs_from_cal), .sel_idx (cs_idx),
    .commit (cs_commit), .commit_prio (cs_commit_prio), .commit_idx (cs_commit_idx)
  );

  logic ps_start, ps_prio, ps_done, ps_found, ps_commit, ps_commit_prio;
  class_t ps_class;
  port_t  ps_port;
  logic [PCAL_IW-1:0] ps_idx, ps_commit_idx;

  qs_port_select #(.NPORTS(NPORTS), .PCAL_DEPTH(PCAL_DEPTH), .SCAN_W(SCAN_W)) u_port (
    .clk (sysclk), .rst_n (rst_n), .port_cfg, .port_cfg_arr, .pcal, .qual,
    .start (ps_start), .prio (ps_prio), .cls (ps_class),
    .busy (), .done (ps_done), .found (ps_found), .port (ps_port), .idx (ps_idx),
    .commit (ps_commit), .commit_prio (ps_commit_prio), .commit_idx (ps_commit_idx)
  );

  qs_req_ctrl #(.NPORTS(NPORTS), .CCAL_IW(CCAL_IW), .PCAL_IW(PCAL_IW)) u_req (
    .clk (sysclk), .rst_n (rst_n), .ifid1, .ifid2, .qual, .promo,
    .cs_valid, .cs_prio, .cs_class, .cs_from_cal, .cs_idx,
    .cs_commit, .cs_commit_prio, .cs_commit_idx,
    .ps_start, .ps_prio, .ps_class, .ps_done, .ps_found, .ps_port, .ps_idx,
    .ps_commit, .ps_commit_prio, .ps_commit_idx,
    .qs_req, .qs_req_port_id, .qs_req_class_id,
    .qs_ack, .queue_deact, .qs_ack_err, .egress_dstart, .egress_data,
    .in_prog, .prog_class, .lock_v, .lock_port, .lock_class,
    .deact, .issue, .ack_ok, .ack_err, .ev_eop, .ev_oam
  );

endmodule
