// qs_qualify: queue status qualification.
//
// Turns the raw data-available bits of every (port, class) queue into the
// qualified bits that the selection stages use. Per queue, in order:
//   1. data available and inside the current PORT_CFG;
//   2. destination FIFO not almost full: a queue for IFID1 needs AFULL_1 low;
//      a queue for IFID2 needs AFULL_2 low, or both flags low when IFID2 is
//      'b111 (traffic to both interfaces); when IFID1 = IFID2 only AFULL_1
//      counts;
//   3. with polling enabled, the port's poll status is set and not conditioned;
//   4. the port is not stopped by the bandwidth limiter;
//   5. contiguity: in queue contiguous mode, while a packet is in progress
//      (lock_v) only the locked queue stays qualified; otherwise, for a port
//      configured port contiguous with a packet in progress, only the class in
//      progress stays qualified;
//   6. class promotion (strict class priority, port contiguous ports only):
//      the in-progress queue is shown at the position of the highest class
//      that has data in its port, so it competes at that priority; promo[p]
//      tells the request controller to request the in-progress class.
// Steps 1-6 follow the scheduler's selection description; step 5 keeps a
// contiguous port on its class until EOP even when the queue runs empty.
//
// Purely combinational; inputs are registered state of the other blocks.
module qs_qualify
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS = 267
) (
  input  qs_ctrl_t    ctrl,
  input  port_cfg_t   port_cfg_arr [NPORTS],
  input  ifid_t       ifid1,
  input  ifid_t       ifid2,
  input  logic        afull_1,
  input  logic        afull_2,
  input  class_vec_t  has_data [NPORTS],
  input  class_vec_t  to_if2   [NPORTS],
  input  logic [NPORTS-1:0] poll_ok,
  input  logic [NPORTS-1:0] bw_blocked,
  input  logic [NPORTS-1:0] in_prog,
  input  class_t      prog_class [NPORTS],
  input  logic        lock_v,
  input  port_t       lock_port,
  input  class_t      lock_class,
  output class_vec_t  qual  [NPORTS],
  output logic [NPORTS-1:0] promo
);

  logic blk_if1, blk_if2;
  always_comb begin
    blk_if1 = afull_1;
    if (ifid1 == ifid2)          blk_if2 = afull_1;
    else if (ifid2 == IFID_BOTH) blk_if2 = afull_1 | afull_2;
    else                         blk_if2 = afull_2;
  end

  logic promo_on;
  assign promo_on = ctrl.class_promo_en && !ctrl.class_cal_en && !ctrl.queue_contig;

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    class_vec_t base;
    logic       port_ok;
    class_t     top;

    assign port_ok = (!ctrl.poll_en || poll_ok[p]) && !bw_blocked[p];

    always_comb begin
      for (int c = 0; c < int'(MAX_CLASSES); c++)
        base[c] = has_data[p][c] && port_ok && !(to_if2[p][c] ? blk_if2 : blk_if1);
      // highest class with data in this port
      top = '0;
      for (int c = 0; c < int'(MAX_CLASSES); c++)
        if (has_data[p][c]) top = class_t'(c);
    end

    always_comb begin
      qual[p]  = base;
      promo[p] = 1'b0;
      if (ctrl.queue_contig) begin
        if (lock_v) begin
          qual[p] = '0;
          if (int'(lock_port) == p) qual[p][lock_class] = base[lock_class];
        end
      end else if (port_cfg_arr[p].port_contig && in_prog[p]) begin
        qual[p] = '0;
        if (promo_on) begin
          qual[p][top] = base[prog_class[p]];
          promo[p]     = 1'b1;
        end else begin
          qual[p][prog_class[p]] = base[prog_class[p]];
        end
      end
    end
  end

endmodule
