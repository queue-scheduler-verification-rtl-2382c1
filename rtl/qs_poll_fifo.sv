// qs_poll_fifo: asynchronous FIFO from the MPB clock domain to the system
// clock domain.
//
// Port poll responses and segment-transfer-complete indications arrive on
// MPBCLK (104 MHz) while the scheduling logic runs on SYSCLK (200 MHz). As in
// the scheduler's description, these events are written into a FIFO and read
// out later by the decision logic, so the scheduler sees them a few cycles
// late. The FIFO is a classic dual-clock design: binary read/write pointers,
// gray-coded copies passed through two-flop synchronisers, full and empty
// compared on the gray pointers. Depth is 2**AW entries (16 by default; the
// depth is this design's choice).
//
// Write side: wr_en with wdata on wclk; a write while full is dropped and sets
// the sticky overflow flag (wclk domain). Read side: whenever the FIFO is not
// empty the head entry is popped and presented on rdata with rd_valid high for
// one rclk cycle (registered, one cycle after the pointer compare). Since the
// reader pops every cycle and rclk is the faster clock, the FIFO does not fill
// in normal operation.
module qs_poll_fifo #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned AW    = 4
) (
  input  logic             rst_n,
  // write side (MPBCLK)
  input  logic             wclk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             overflow,
  // read side (SYSCLK)
  input  logic             rclk,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic full;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        if (full) begin
          overflow <= 1'b1;
        end else begin
          wbin  <= wbin + 1'b1;
          wgray <= bin2gray(wbin + 1'b1);
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read domain ----------------
  logic empty;
  assign empty = (rgray == wgray_r2);

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_valid <= 1'b0;
      rdata    <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rd_valid <= !empty;
      if (!empty) begin
        rdata <= mem[rbin[AW-1:0]];
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
