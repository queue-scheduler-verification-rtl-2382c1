// qs_req_ctrl: request controller and packet-state keeper.
//
// Sequence per segment (state names in brackets):
//   [DECIDE] wait until class selection offers a priority and class, latch
//            them and start the port calendar search;
//   [SCAN]   wait for the search; if a port was found and its queue is still
//            qualified, issue the request, otherwise decide again;
//   [REQ]    QS_REQ high with QS_REQ_PORT_ID/QS_REQ_CLASS_ID held until QS_ACK.
//            QUEUE_DEACT with QS_ACK clears the queue's status. QS_ACK_ERR
//            (queue had no data) ends the request: no control data follows
//            and a new decision starts at once;
//   [WAIT]   wait for EGRESS_DSTART with EGRESS_DATA[2:0] equal to IFID1 or
//            IFID2; its EOP bit updates the packet state, then decide again.
// So at most one request is outstanding, and a new one is made only after the
// previous one is acknowledged and its control data seen (or it failed).
//
// Packet state: for every port, in_prog (last granted segment was not EOP)
// and prog_class (its class); for queue contiguous mode, the lock on the
// queue whose packet is in progress. With class promotion, a port shown at a
// promoted class is requested at its in-progress class.
//
// Events to other blocks (one cycle each): issue (request made, for poll
// conditioning and calendar pointer commits), ack_ok (segment granted, for the
// bandwidth limiter), ack_err, and eop/oam of accepted control data.
// The handshake follows the scheduler's queue request interface; the state
// machine and its single-cycle decide/scan split are this design's own.
module qs_req_ctrl
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS     = 267,
  parameter int unsigned CCAL_IW    = 5,
  parameter int unsigned PCAL_IW    = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ifid_t       ifid1,
  input  ifid_t       ifid2,
  input  class_vec_t  qual  [NPORTS],
  input  logic [NPORTS-1:0] promo,
  // class selection
  input  logic        cs_valid,
  input  logic        cs_prio,
  input  class_t      cs_class,
  input  logic        cs_from_cal,
  input  logic [CCAL_IW-1:0] cs_idx,
  output logic        cs_commit,
  output logic        cs_commit_prio,
  output logic [CCAL_IW-1:0] cs_commit_idx,
  // port selection
  output logic        ps_start,
  output logic        ps_prio,
  output class_t      ps_class,
  input  logic        ps_done,
  input  logic        ps_found,
  input  port_t       ps_port,
  input  logic [PCAL_IW-1:0] ps_idx,
  output logic        ps_commit,
  output logic        ps_commit_prio,
  output logic [PCAL_IW-1:0] ps_commit_idx,
  // queue request interface
  output logic        qs_req,
  output port_t       qs_req_port_id,
  output class_t      qs_req_class_id,
  input  logic        qs_ack,
  input  logic        queue_deact,
  input  logic        qs_ack_err,
  input  logic        egress_dstart,
  input  logic [4:0]  egress_data,
  // packet state
  output logic [NPORTS-1:0] in_prog,
  output class_t      prog_class [NPORTS],
  output logic        lock_v,
  output port_t       lock_port,
  output class_t      lock_class,
  // events
  output logic        deact,
  output logic        issue,
  output logic        ack_ok,
  output logic        ack_err,
  output logic        ev_eop,
  output logic        ev_oam
);

  typedef enum logic [1:0] {S_DECIDE, S_SCAN, S_REQ, S_WAIT} state_e;
  state_e state;

  logic   l_prio, l_from_cal;
  class_t l_class;
  logic [CCAL_IW-1:0] l_cidx;

  logic   ctl_match;
  assign ctl_match = egress_dstart && ((egress_data[2:0] == ifid1) || (egress_data[2:0] == ifid2));

  logic   final_ok;
  assign final_ok = ps_done && ps_found && int'(ps_port) < int'(NPORTS) && qual[ps_port][l_class];

  assign ps_start = (state == S_DECIDE) && cs_valid;
  assign ps_prio  = cs_prio;
  assign ps_class = cs_class;

  assign deact   = (state == S_REQ) && qs_ack && queue_deact;
  assign ack_ok  = (state == S_REQ) && qs_ack && !qs_ack_err;
  assign ack_err = (state == S_REQ) && qs_ack && qs_ack_err;
  assign ev_eop  = (state == S_WAIT) && ctl_match && egress_data[3];
  assign ev_oam  = (state == S_WAIT) && ctl_match && egress_data[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_DECIDE;
      l_prio          <= 1'b0;
      l_from_cal      <= 1'b0;
      l_class         <= '0;
      l_cidx          <= '0;
      qs_req          <= 1'b0;
      qs_req_port_id  <= '0;
      qs_req_class_id <= '0;
      issue           <= 1'b0;
      cs_commit       <= 1'b0;
      cs_commit_prio  <= 1'b0;
      cs_commit_idx   <= '0;
      ps_commit       <= 1'b0;
      ps_commit_prio  <= 1'b0;
      ps_commit_idx   <= '0;
      in_prog         <= '0;
      for (int p = 0; p < int'(NPORTS); p++) prog_class[p] <= '0;
      lock_v          <= 1'b0;
      lock_port       <= '0;
      lock_class      <= '0;
    end else begin
      issue     <= 1'b0;
      cs_commit <= 1'b0;
      ps_commit <= 1'b0;
      case (state)
        S_DECIDE: if (cs_valid) begin
          l_prio     <= cs_prio;
          l_class    <= cs_class;
          l_from_cal <= cs_from_cal;
          l_cidx     <= cs_idx;
          state      <= S_SCAN;
        end
        S_SCAN: if (ps_done) begin
          if (final_ok) begin
            qs_req          <= 1'b1;
            qs_req_port_id  <= ps_port;
            qs_req_class_id <= promo[ps_port] ? prog_class[ps_port] : l_class;
            issue           <= 1'b1;
            cs_commit       <= l_from_cal;
            cs_commit_prio  <= l_prio;
            cs_commit_idx   <= l_cidx;
            ps_commit       <= 1'b1;
            ps_commit_prio  <= l_prio;
            ps_commit_idx   <= ps_idx;
            state           <= S_REQ;
          end else begin
            state <= S_DECIDE;
          end
        end
        S_REQ: if (qs_ack) begin
          qs_req <= 1'b0;
          state  <= qs_ack_err ? S_DECIDE : S_WAIT;
        end
        S_WAIT: if (ctl_match) begin
          in_prog[qs_req_port_id]    <= !egress_data[3];
          prog_class[qs_req_port_id] <= qs_req_class_id;
          lock_v     <= !egress_data[3];
          lock_port  <= qs_req_port_id;
          lock_class <= qs_req_class_id;
          state      <= S_DECIDE;
        end
        default: state <= S_DECIDE;
      endcase
    end
  end

  // Request handshake rules: QS_REQ and its identifiers hold until QS_ACK;
  // QS_ACK only answers an outstanding request.
  property p_req_hold;
    @(posedge clk) disable iff (!rst_n)
      (qs_req && !qs_ack) |=> (qs_req && $stable(qs_req_port_id) && $stable(qs_req_class_id));
  endproperty
  a_req_hold: assert property (p_req_hold) else $error("QS_REQ dropped or changed before QS_ACK");

  property p_ack_only_on_req;
    @(posedge clk) disable iff (!rst_n) qs_ack |-> qs_req;
  endproperty
  a_ack_only_on_req: assert property (p_ack_only_on_req) else $error("QS_ACK without QS_REQ");

endmodule
