// qs_port_select: port selection calendar engine.
//
// The port selection calendar has PCAL_DEPTH (512) entries, each a port
// number or a null value (any number outside the port range of the current
// PORT_CFG). How often a port appears sets its share of service: with 80
// used entries, a port in 4 of them gets 4/80 of the interface.
//
// On start (one cycle, with the chosen port priority and class) the engine
// walks the calendar from the entry after the one last used for that
// priority, SCAN_W entries per clock, and stops at the first entry whose port
// has that priority and a qualified queue of that class. done pulses with
// found, the port and the entry index; after a full traversal without a hit,
// done pulses with found = 0. A search takes 1 to PCAL_DEPTH/SCAN_W cycles
// (64 by default). commit (issued by the request controller when the request
// goes out) moves the pointer of that priority past the used entry.
//
// Calendar semantics follow the scheduler's description; the multi-entry
// sequential walk is this design's implementation.
module qs_port_select
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS     = 267,
  parameter int unsigned PCAL_DEPTH = 512,
  parameter int unsigned SCAN_W     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  port_cfg,
  input  port_cfg_t   port_cfg_arr [NPORTS],
  input  port_t       pcal [PCAL_DEPTH],
  input  class_vec_t  qual [NPORTS],
  input  logic        start,
  input  logic        prio,
  input  class_t      cls,
  output logic        busy,
  output logic        done,
  output logic        found,
  output port_t       port,
  output logic [$clog2(PCAL_DEPTH)-1:0] idx,
  input  logic        commit,
  input  logic        commit_prio,
  input  logic [$clog2(PCAL_DEPTH)-1:0] commit_idx
);

  localparam int unsigned IW = $clog2(PCAL_DEPTH);
  localparam int unsigned STEPS = (PCAL_DEPTH + SCAN_W - 1) / SCAN_W;

  logic [IW-1:0] ptr [2];
  logic [IW-1:0] pos;
  logic [$clog2(STEPS+1)-1:0] step;
  logic          s_prio;
  class_t        s_cls;
  logic [PORT_W:0] nports;
  assign nports = num_ports(port_cfg);

  // examine SCAN_W entries starting at pos
  logic          hit;
  logic [IW-1:0] hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int k = 0; k < int'(SCAN_W); k++) begin
      logic [IW-1:0] i;
      port_t         e;
      i = pos + IW'(k);
      e = pcal[i];
      if (!hit && {1'b0, e} < nports && int'(e) < int'(NPORTS)
          && port_cfg_arr[e].high_pri == s_prio && qual[e][s_cls]) begin
        hit     = 1'b1;
        hit_idx = i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr[0] <= '0;
      ptr[1] <= '0;
      pos    <= '0;
      step   <= '0;
      s_prio <= 1'b0;
      s_cls  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      found  <= 1'b0;
      port   <= '0;
      idx    <= '0;
    end else begin
      done <= 1'b0;
      if (commit) ptr[commit_prio] <= commit_idx + 1'b1;
      if (start && !busy) begin
        busy   <= 1'b1;
        pos    <= ptr[prio];
        step   <= '0;
        s_prio <= prio;
        s_cls  <= cls;
      end else if (busy) begin
        if (hit) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          found <= 1'b1;
          idx   <= hit_idx;
          port  <= pcal[hit_idx];
        end else if (int'(step) == int'(STEPS) - 1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          found <= 1'b0;
        end else begin
          pos  <= pos + IW'(SCAN_W);
          step <= step + 1'b1;
        end
      end
    end
  end

endmodule
