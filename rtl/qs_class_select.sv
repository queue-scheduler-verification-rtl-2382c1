// qs_class_select: port priority selection followed by class selection.
//
// Stage 1 (port priority): if any high priority port has a qualified queue,
// the high priority ports are served, otherwise the low priority ones.
// Stage 2 (class), among the ports of the chosen priority:
//   - class calendar disabled: strict class priority, the highest class
//     number with a qualified queue wins;
//   - class calendar enabled with CLASS_PRI_EN: the super class PRI_CLASS wins
//     whenever it has a qualified queue;
//   - otherwise the 32-entry class selection calendar is walked from the entry
//     after the one last used for this priority, and the first entry naming a
//     class with a qualified queue wins. Entries outside the class range of
//     the current PORT_CFG are null and skipped.
// The share a class gets is then its number of calendar entries over the
// number of non-null entries (e.g. 7 of 28 entries = 25 %).
//
// Outputs are combinational on the qualified matrix and the registered
// calendar pointers (one per port priority). commit (one cycle, with the
// priority and entry index latched by the request controller) moves the
// pointer past the used entry; it is issued only when a request is actually
// made, so a selection that finds no port costs no calendar slot.
module qs_class_select
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS     = 267,
  parameter int unsigned CCAL_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  qs_ctrl_t    ctrl,
  input  logic [1:0]  port_cfg,
  input  port_cfg_t   port_cfg_arr [NPORTS],
  input  logic [3:0]  ccal [CCAL_DEPTH],
  input  class_vec_t  qual [NPORTS],
  output logic        sel_valid,
  output logic        sel_prio,      // 1: high priority ports
  output class_t      sel_class,
  output logic        sel_from_cal,
  output logic [$clog2(CCAL_DEPTH)-1:0] sel_idx,
  input  logic        commit,
  input  logic        commit_prio,
  input  logic [$clog2(CCAL_DEPTH)-1:0] commit_idx
);

  localparam int unsigned IW = $clog2(CCAL_DEPTH);

  logic [IW-1:0] ptr [2];
  class_vec_t    class_has [2];
  logic [3:0]    cpp;
  assign cpp = classes_per_port(port_cfg);

  always_comb begin
    class_has[0] = '0;
    class_has[1] = '0;
    for (int p = 0; p < int'(NPORTS); p++) begin
      if (port_cfg_arr[p].high_pri) class_has[1] |= qual[p];
      else                          class_has[0] |= qual[p];
    end
  end

  always_comb begin
    class_vec_t    have;
    logic          found;
    logic [IW-1:0] i;
    found        = 1'b0;
    i            = '0;
    sel_prio     = |class_has[1];
    have         = class_has[sel_prio];
    sel_valid    = 1'b0;
    sel_class    = '0;
    sel_from_cal = 1'b0;
    sel_idx      = '0;
    if (!ctrl.class_cal_en) begin
      for (int c = 0; c < int'(MAX_CLASSES); c++)
        if (have[c]) begin
          sel_valid = 1'b1;
          sel_class = class_t'(c);
        end
    end else if (ctrl.class_pri_en && ({1'b0, ctrl.pri_class} < cpp) && have[ctrl.pri_class]) begin
      sel_valid = 1'b1;
      sel_class = ctrl.pri_class;
    end else begin
      for (int k = 0; k < int'(CCAL_DEPTH); k++) begin
        i = ptr[sel_prio] + IW'(k);
        if (!found && ccal[i] < cpp && have[ccal[i][CLASS_W-1:0]]) begin
          found        = 1'b1;
          sel_valid    = 1'b1;
          sel_class    = ccal[i][CLASS_W-1:0];
          sel_from_cal = 1'b1;
          sel_idx      = i;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr[0] <= '0;
      ptr[1] <= '0;
    end else if (commit) begin
      ptr[commit_prio] <= commit_idx + 1'b1;
    end
  end

endmodule
