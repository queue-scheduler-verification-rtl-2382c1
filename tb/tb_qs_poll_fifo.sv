// tb_qs_poll_fifo: self-checking test of the MPBCLK -> SYSCLK event FIFO.
//
// Writes a random stream of words on a 104 MHz-like write clock and reads on
// a 200 MHz-like read clock; every word must come out once, in order. A
// second phase stops the read clock so the FIFO fills, then checks that the
// overflow flag rises and that exactly the first 2**AW words survive.
module tb_qs_poll_fifo;
  localparam int unsigned WIDTH = 20, AW = 4;
  logic rst_n = 0, wclk = 0, rclk = 0, wr_en = 0, overflow, rd_valid;
  logic [WIDTH-1:0] wdata = '0, rdata;
  bit rclk_run = 1;
  always #48 wclk = ~wclk;
  always #25 if (rclk_run) rclk = ~rclk;

  qs_poll_fifo #(.WIDTH(WIDTH), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] exp_q [$];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge rclk) if (rst_n && rd_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected word %h", rdata);
    end else begin
      logic [WIDTH-1:0] e;
      e = exp_q.pop_front();
      if (rdata !== e) begin failures++; $display("got %h exp %h", rdata, e); end
    end
  end

  initial begin
    #200 rst_n = 1;
    // phase 1: random traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge wclk);
      wr_en = $urandom % 2;
      wdata = WIDTH'($urandom);
      if (wr_en) exp_q.push_back(wdata);
    end
    @(negedge wclk) wr_en = 0;
    repeat (20) @(posedge wclk);
    checks++;
    if (exp_q.size() != 0 || overflow) begin failures++; $display("left %0d, ovf %b", exp_q.size(), overflow); end
    // phase 2: stalled reader, fill and overflow
    rclk_run = 0;
    for (int n = 0; n < (1 << AW) + 3; n++) begin
      @(negedge wclk);
      wr_en = 1; wdata = WIDTH'(n + 100);
      if (n < (1 << AW)) exp_q.push_back(wdata);
    end
    @(negedge wclk) wr_en = 0;
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    rclk_run = 1;
    repeat (60) @(posedge wclk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words lost", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
