// tb_qs_queue_status: self-checking test of the queue status table.
//
// Runs each PORT_CFG (75x8, 147x4, 267x2) with random activations (valid and
// invalid port/class/interface) and deactivations, and compares the port x
// class view every cycle with a reference model kept as an associative array
// of active queues. IFID1 = 0, IFID2 = 'b111 so that both destination flags
// are exercised. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_qs_queue_status;
  import qs_pkg::*;
  localparam int unsigned NPORTS = 267;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] port_cfg;
  ifid_t ifid1, ifid2, if_id;
  logic queue_act, deact, act_reject;
  port_t port_id, deact_port;
  class_t class_id, deact_class;
  class_vec_t has_data [NPORTS];
  class_vec_t to_if2 [NPORTS];

  qs_queue_status dut (.*);

  int checks = 0, failures = 0;
  bit ref_act [int];
  bit ref_to2 [int];
  int rejects_seen = 0, rejects_exp = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input logic [1:0] cfg);
    int np, cpp;
    np = int'(num_ports(cfg)); cpp = int'(classes_per_port(cfg));
    for (int p = 0; p < int'(NPORTS); p++)
      for (int c = 0; c < 8; c++) begin
        bit ea, et;
        int q;
        q  = p * cpp + c;
        ea = (p < np && c < cpp && ref_act.exists(q)) ? ref_act[q] : 1'b0;
        et = (p < np && c < cpp && ref_to2.exists(q)) ? ref_to2[q] : 1'b0;
        if (has_data[p][c] !== ea || (ea && to_if2[p][c] !== et)) begin
          failures++;
          if (failures < 10) $display("MISMATCH cfg=%0d p=%0d c=%0d has=%b exp=%b to2=%b exp=%b",
                                      cfg, p, c, has_data[p][c], ea, to_if2[p][c], et);
        end
      end
    checks++;
  endtask

  initial begin
    port_cfg = 2'b00; ifid1 = 3'd0; ifid2 = 3'b111;
    queue_act = 0; deact = 0; port_id = 0; class_id = 0; if_id = 0; deact_port = 0; deact_class = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 3; cfg++) begin
      int np, cpp;
      rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
      ref_act.delete(); ref_to2.delete();
      port_cfg = 2'(cfg);
      np = int'(num_ports(port_cfg)); cpp = int'(classes_per_port(port_cfg));
      for (int n = 0; n < 400; n++) begin
        int q;
        @(negedge clk);
        queue_act = ($urandom % 4) != 0;
        // mostly valid, sometimes out of range
        port_id  = port_t'(($urandom % 8 == 0) ? np + ($urandom % 20) : $urandom % np);
        class_id = class_t'(($urandom % 8 == 0) ? $urandom % 8 : $urandom % cpp);
        case ($urandom % 5)
          0: if_id = 3'd5;       // not ours
          1, 2: if_id = 3'b111;  // IFID2 (both)
          default: if_id = 3'd0; // IFID1
        endcase
        deact = ($urandom % 3) == 0;
        if ($urandom % 2 && ref_act.num() > 0) begin
          int k; void'(ref_act.first(k));
          deact_port = port_t'(k / cpp); deact_class = class_t'(k % cpp);
        end else begin
          deact_port = port_t'($urandom % np); deact_class = class_t'($urandom % cpp);
        end
        // reference update (activation wins over deactivation)
        if (deact) ref_act.delete(int'(deact_port) * cpp + int'(deact_class));
        if (queue_act) begin
          if (int'(port_id) < np && int'(class_id) < cpp && (if_id == ifid1 || if_id == ifid2)) begin
            q = int'(port_id) * cpp + int'(class_id);
            ref_act[q] = 1'b1;
            ref_to2[q] = (if_id != ifid1) && (if_id == ifid2);
          end else rejects_exp++;
        end
        #1;
        if (act_reject) rejects_seen++;
        @(posedge clk); #1;
        compare(port_cfg);
      end
      if (rejects_seen != rejects_exp) begin
        failures++;
        $display("reject count %0d expected %0d", rejects_seen, rejects_exp);
      end
      checks++;
      rejects_seen = 0; rejects_exp = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
