// qs_ecbi_regs: configuration and monitoring registers of the scheduler.
//
// Everything except PORT_CFG, IFID1 and IFID2 (pins) is configured here:
// scheduling mode, class calendar, priority class, class promotion, port
// polling, bandwidth limiter, per-port priority and contiguity, the two
// calendars and the per-port measurement periods. Counters let software watch
// the scheduler at work.
//
// Bus (this design's own, a plain synchronous register port): cbi_addr is a
// word address, cbi_wr writes cbi_wdata in the same cycle, cbi_rd returns the
// word on cbi_rdata in the next cycle. Unmapped addresses read 0.
//
//   0x000        CTRL  [0] queue contiguous mode  [1] CLASS_CAL_EN
//                      [2] CLASS_PRI_EN  [3] class promotion enable
//                      [4] port polling enable  [5] BW_LIMIT_EN
//                      [10:8] PRI_CLASS                      reset 0
//   0x001        REQ_CNT     requests issued (read only, wraps)
//   0x002        ACKERR_CNT  requests answered with QS_ACK_ERR
//   0x003        EOP_CNT     EOP segments seen in control data
//   0x004        OAM_CNT     OAM segments seen in control data
//   0x005        STATUS [0] poll/selection FIFO overflow (sticky)
//   0x006        REJECT_CNT  queue activations ignored (invalid port,
//                            class or interface)
//   0x020+i      class calendar entry i (4 bits)      reset 0xF (null)
//   0x200+i      port calendar entry i (9 bits)       reset i
//   0x400+p      port p: [0] high priority  [1] port contiguous   reset 0
//   0x600+p      MP_SETTING of port p (16 bits)       reset 0 (acts as 1)
//
// Calendar reset values give round robin over all ports and no class
// calendar; software programs the rest. Register contents are exported as
// arrays so the scheduling logic sees all of them at once.
module qs_ecbi_regs
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS     = 267,
  parameter int unsigned PCAL_DEPTH = 512,
  parameter int unsigned CCAL_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] cbi_addr,
  input  logic        cbi_wr,
  input  logic        cbi_rd,
  input  logic [15:0] cbi_wdata,
  output logic [15:0] cbi_rdata,
  // configuration out
  output qs_ctrl_t    ctrl,
  output port_cfg_t   port_cfg_arr [NPORTS],
  output logic [3:0]  ccal [CCAL_DEPTH],
  output port_t       pcal [PCAL_DEPTH],
  output logic [MP_W-1:0] mp_setting [NPORTS],
  // monitored events
  input  logic        ev_req,
  input  logic        ev_ack_err,
  input  logic        ev_eop,
  input  logic        ev_oam,
  input  logic        ev_fifo_ovf,
  input  logic        ev_act_reject
);

  localparam logic [11:0] A_CTRL   = 12'h000;
  localparam logic [11:0] A_REQ    = 12'h001;
  localparam logic [11:0] A_ACKERR = 12'h002;
  localparam logic [11:0] A_EOP    = 12'h003;
  localparam logic [11:0] A_OAM    = 12'h004;
  localparam logic [11:0] A_STATUS = 12'h005;
  localparam logic [11:0] A_REJECT = 12'h006;
  localparam logic [11:0] A_CCAL   = 12'h020;
  localparam logic [11:0] A_PCAL   = 12'h200;
  localparam logic [11:0] A_PORT   = 12'h400;
  localparam logic [11:0] A_MP     = 12'h600;

  logic [15:0] req_cnt, ackerr_cnt, eop_cnt, oam_cnt, reject_cnt;
  logic        ovf_sticky;

  // decoded offsets
  int unsigned off_ccal, off_pcal, off_port, off_mp;
  logic in_ccal, in_pcal, in_port, in_mp;
  always_comb begin
    off_ccal = int'(cbi_addr) - int'(A_CCAL);
    off_pcal = int'(cbi_addr) - int'(A_PCAL);
    off_port = int'(cbi_addr) - int'(A_PORT);
    off_mp   = int'(cbi_addr) - int'(A_MP);
    in_ccal  = cbi_addr >= A_CCAL && off_ccal < CCAL_DEPTH;
    in_pcal  = cbi_addr >= A_PCAL && off_pcal < PCAL_DEPTH && off_pcal < 512;
    in_port  = cbi_addr >= A_PORT && off_port < NPORTS && off_port < 512;
    in_mp    = cbi_addr >= A_MP   && off_mp   < NPORTS && off_mp   < 512;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0;
      for (int i = 0; i < int'(CCAL_DEPTH); i++) ccal[i] <= 4'hF;
      for (int i = 0; i < int'(PCAL_DEPTH); i++) pcal[i] <= port_t'(i);
      for (int p = 0; p < int'(NPORTS); p++) begin
        port_cfg_arr[p] <= '0;
        mp_setting[p]   <= '0;
      end
    end else if (cbi_wr) begin
      if (cbi_addr == A_CTRL) ctrl <= '{pri_class:      cbi_wdata[10:8],
                                        bw_limit_en:    cbi_wdata[5],
                                        poll_en:        cbi_wdata[4],
                                        class_promo_en: cbi_wdata[3],
                                        class_pri_en:   cbi_wdata[2],
                                        class_cal_en:   cbi_wdata[1],
                                        queue_contig:   cbi_wdata[0]};
      if (in_ccal) ccal[off_ccal] <= cbi_wdata[3:0];
      if (in_pcal) pcal[off_pcal] <= cbi_wdata[PORT_W-1:0];
      if (in_port) port_cfg_arr[off_port] <= port_cfg_t'({cbi_wdata[1], cbi_wdata[0]});
      if (in_mp)   mp_setting[off_mp] <= cbi_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_cnt    <= '0;
      ackerr_cnt <= '0;
      eop_cnt    <= '0;
      oam_cnt    <= '0;
      reject_cnt <= '0;
      ovf_sticky <= 1'b0;
    end else begin
      if (ev_req)      req_cnt    <= req_cnt + 1'b1;
      if (ev_ack_err)  ackerr_cnt <= ackerr_cnt + 1'b1;
      if (ev_eop)      eop_cnt    <= eop_cnt + 1'b1;
      if (ev_oam)      oam_cnt    <= oam_cnt + 1'b1;
      if (ev_fifo_ovf) ovf_sticky <= 1'b1;
      if (ev_act_reject) reject_cnt <= reject_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cbi_rdata <= '0;
    end else if (cbi_rd) begin
      cbi_rdata <= '0;
      unique case (1'b1)
        cbi_addr == A_CTRL:   cbi_rdata <= {5'd0, ctrl.pri_class, 2'd0, ctrl.bw_limit_en,
                                          ctrl.poll_en, ctrl.class_promo_en, ctrl.class_pri_en,
                                          ctrl.class_cal_en, ctrl.queue_contig};
        cbi_addr == A_REQ:    cbi_rdata <= req_cnt;
        cbi_addr == A_ACKERR: cbi_rdata <= ackerr_cnt;
        cbi_addr == A_EOP:    cbi_rdata <= eop_cnt;
        cbi_addr == A_OAM:    cbi_rdata <= oam_cnt;
        cbi_addr == A_STATUS: cbi_rdata <= {15'd0, ovf_sticky};
        cbi_addr == A_REJECT: cbi_rdata <= reject_cnt;
        in_ccal:              cbi_rdata <= {12'd0, ccal[off_ccal]};
        in_pcal:              cbi_rdata <= {7'd0, pcal[off_pcal]};
        in_port:              cbi_rdata <= {14'd0, port_cfg_arr[off_port]};
        in_mp:                cbi_rdata <= mp_setting[off_mp];
        default:              cbi_rdata <= '0;
      endcase
    end
  end

endmodule
