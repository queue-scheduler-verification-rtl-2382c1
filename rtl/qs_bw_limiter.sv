// qs_bw_limiter: per-port maximum bandwidth limiter.
//
// Every segment granted to a port increments that port's usage level TX_LVL.
// When TX_LVL reaches MAX_LVL (17 segments) the port is blocked until its
// measurement period ends; then TX_LVL returns to zero. The measurement period
// of a port is MP_SETTING[port] unit periods (0 counts as 1), and a unit
// period is 2136 SYSCLK cycles. With 64-byte segments and a 200 MHz SYSCLK,
// MP_SETTING = 1 allows 17*64*8 bits per 10.68 us, about 815 Mbit/s.
//
// Implementation (this design's own reading of the 2136-cycle constant):
// 2136 = 267 ports x 8 cycles, so a sweep pointer visits one port every
// CYCLES_PER_PORT cycles and each port is visited exactly once per unit
// period. At its visit a port's measurement counter advances; when it reaches
// MP_SETTING the counter and TX_LVL are cleared. Only one port's counter is
// touched per visit, so the counters could live in a single-port RAM.
//
// Interface: inc/inc_port (one cycle per granted segment), en (BW_LIMIT_EN),
// blocked[p] = en & TX_LVL[p] >= MAX_LVL (registered state, combinational
// compare). unit_tick pulses when the sweep wraps, i.e. once per unit period.
// A grant and a period end for the same port in one cycle leave TX_LVL = 1.
module qs_bw_limiter
  import qs_pkg::*;
#(
  parameter int unsigned NPORTS          = 267,
  parameter int unsigned CYCLES_PER_PORT = 8,
  parameter int unsigned MAX_LVL         = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [MP_W-1:0]     mp_setting [NPORTS],
  input  logic                inc,
  input  port_t               inc_port,
  output logic [NPORTS-1:0]   blocked,
  output logic                unit_tick
);

  localparam int unsigned LVL_W = $clog2(MAX_LVL + 1);
  localparam int unsigned SUB_W = (CYCLES_PER_PORT > 1) ? $clog2(CYCLES_PER_PORT) : 1;
  localparam int unsigned PTR_W = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [LVL_W-1:0] tx_lvl [NPORTS];
  logic [MP_W-1:0]  mp_cnt [NPORTS];
  logic [SUB_W-1:0] sub_cnt;
  logic [PTR_W-1:0] sweep;
  logic             visit;

  assign visit     = (int'(sub_cnt) == int'(CYCLES_PER_PORT) - 1);
  assign unit_tick = visit && (int'(sweep) == int'(NPORTS) - 1);

  // sweep pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_cnt <= '0;
      sweep   <= '0;
    end else if (visit) begin
      sub_cnt <= '0;
      sweep   <= (int'(sweep) == int'(NPORTS) - 1) ? '0 : sweep + 1'b1;
    end else begin
      sub_cnt <= sub_cnt + 1'b1;
    end
  end

  // period end for the visited port
  logic            period_end;
  logic [MP_W-1:0] mp_eff;
  always_comb begin
    mp_eff     = (mp_setting[sweep] == '0) ? MP_W'(1) : mp_setting[sweep];
    period_end = visit && (mp_cnt[sweep] + 1'b1 >= mp_eff);
  end

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    logic clr, hit, up;
    assign clr = period_end && (int'(sweep) == p);
    assign hit = inc && (int'(inc_port) == p);
    assign up  = hit && (int'(tx_lvl[p]) < int'(MAX_LVL));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tx_lvl[p] <= '0;
        mp_cnt[p] <= '0;
      end else begin
        if (clr)     tx_lvl[p] <= hit ? LVL_W'(1) : '0;
        else if (up) tx_lvl[p] <= tx_lvl[p] + 1'b1;
        if (visit && int'(sweep) == p) mp_cnt[p] <= clr ? '0 : mp_cnt[p] + 1'b1;
      end
    end

    assign blocked[p] = en && (int'(tx_lvl[p]) >= int'(MAX_LVL));
  end

endmodule
