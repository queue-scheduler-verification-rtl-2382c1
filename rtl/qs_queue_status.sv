// qs_queue_status: data-available status of every queue.
//
// The queue manager tells the scheduler that a queue has data with a one-cycle
// QUEUE_ACT pulse carrying PORT_ID, CLASS_ID and IF_ID; the scheduler learns
// that a queue has run empty from QUEUE_DEACT, which is valid only together
// with QS_ACK and refers to the queue of the request being acknowledged. This
// block keeps one status bit per queue (600 queues, indexed by
// port * classes_per_port + class) and one bit saying whether the queue feeds
// destination interface IFID2 instead of IFID1.
//
// An activation is accepted only for a valid port and class of the current
// PORT_CFG and an IF_ID equal to IFID1 or IFID2 (an IF_ID that is both gives
// IFID1 precedence). Rejected activations are ignored. If an activation and a
// deactivation of the same queue fall in one cycle, the queue stays active.
// Both updates take effect on the next clock edge.
//
// Outputs are a port x class view of the status (has_data, to_if2), valid for
// ports < NPORTS; entries outside the current configuration read 0. The
// status memory, the acceptance rules and the queue numbering follow the
// scheduler's interface description; the one-bit destination encoding is
// this design's choice.
module qs_queue_status
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS  = 267,
  parameter int unsigned NQUEUES = 600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  port_cfg,
  input  ifid_t       ifid1,
  input  ifid_t       ifid2,
  // queue status interface
  input  logic        queue_act,
  input  port_t       port_id,
  input  class_t      class_id,
  input  ifid_t       if_id,
  // deactivation (QS_ACK & QUEUE_DEACT) of the requested queue
  input  logic        deact,
  input  port_t       deact_port,
  input  class_t      deact_class,
  // port x class view
  output class_vec_t  has_data [NPORTS],
  output class_vec_t  to_if2   [NPORTS],
  output logic        act_reject
);

  logic [NQUEUES-1:0] active_q, to2_q;

  logic [PORT_W:0] nports;
  logic [3:0]      cpp;
  assign nports = num_ports(port_cfg);
  assign cpp    = classes_per_port(port_cfg);

  logic act_ok, act_to2;
  int unsigned act_idx, deact_idx;

  always_comb begin
    act_to2  = (if_id != ifid1) && (if_id == ifid2);
    act_ok   = queue_act && ({1'b0, port_id} < nports) && ({1'b0, class_id} < cpp)
               && ((if_id == ifid1) || (if_id == ifid2));
    act_idx  = queue_index(port_cfg, int'(port_id), int'(class_id));
    deact_idx = queue_index(port_cfg, int'(deact_port), int'(deact_class));
  end

  assign act_reject = queue_act && !act_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= '0;
      to2_q    <= '0;
    end else begin
      if (deact && deact_idx < NQUEUES) active_q[deact_idx] <= 1'b0;
      if (act_ok && act_idx < NQUEUES) begin
        active_q[act_idx] <= 1'b1;
        to2_q[act_idx]    <= act_to2;
      end
    end
  end

  // Port x class view for the current configuration.
  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    for (genvar c = 0; c < int'(MAX_CLASSES); c++) begin : g_class
      localparam int unsigned I8 = p * 8 + c;
      localparam int unsigned I4 = p * 4 + c;
      localparam int unsigned I2 = p * 2 + c;
      // in-range copies for the index expressions (the guards below decide)
      localparam int unsigned J8 = (I8 < NQUEUES) ? I8 : 0;
      localparam int unsigned J4 = (I4 < NQUEUES) ? I4 : 0;
      localparam int unsigned J2 = (I2 < NQUEUES) ? I2 : 0;
      always_comb begin
        has_data[p][c] = 1'b0;
        to_if2[p][c]   = 1'b0;
        unique case (port_cfg)
          2'b00: if (p < 75 && c < 8 && I8 < NQUEUES) begin
            has_data[p][c] = active_q[J8];
            to_if2[p][c]   = to2_q[J8];
          end
          2'b01: if (p < 147 && c < 4 && I4 < NQUEUES) begin
            has_data[p][c] = active_q[J4];
            to_if2[p][c]   = to2_q[J4];
          end
          default: if (p < 267 && c < 2 && I2 < NQUEUES) begin
            has_data[p][c] = active_q[J2];
            to_if2[p][c]   = to2_q[J2];
          end
        endcase
      end
    end
  end

endmodule
