// qs_pkg: types and constants shared by the queue scheduler.
//
// The scheduler serves up to 600 queues arranged as ports x classes in one of
// three configurations selected by the PORT_CFG pins: 75 ports x 8 classes,
// 147 ports x 4 classes or 267 ports x 2 classes. Queue id is
// port * classes_per_port + class. The helper functions below turn PORT_CFG
// into the valid port count and the classes per port. The control register
// layout (qs_ctrl_t) and the per-port configuration (port_cfg_t) are this
// design's own register layout; the bits themselves (CLASS_CAL_EN,
// CLASS_PRI_EN, PRI_CLASS, BW_LIMIT_EN, queue contiguous mode, class
// promotion, port polling, port priority, port contiguous/interleave) are the
// scheduler's documented configuration.
package qs_pkg;

  localparam int unsigned MAX_PORTS   = 267;
  localparam int unsigned MAX_CLASSES = 8;
  localparam int unsigned NUM_QUEUES  = 600;
  localparam int unsigned PORT_W      = 9;
  localparam int unsigned CLASS_W     = 3;
  localparam int unsigned IFID_W      = 3;
  localparam int unsigned MP_W        = 16;
  localparam logic [IFID_W-1:0] IFID_BOTH = 3'b111;

  typedef logic [PORT_W-1:0]  port_t;
  typedef logic [CLASS_W-1:0] class_t;
  typedef logic [IFID_W-1:0]  ifid_t;
  typedef logic [MAX_CLASSES-1:0] class_vec_t;

  // PORT_CFG encoding; 2'b11 behaves as 2'b10.
  typedef enum logic [1:0] {
    CFG_75X8  = 2'b00,
    CFG_147X4 = 2'b01,
    CFG_267X2 = 2'b10,
    CFG_267X2_ALT = 2'b11
  } port_cfg_e;

  // Global control register (register 0x000).
  typedef struct packed {
    logic [CLASS_W-1:0] pri_class;      // [10:8] PRI_CLASS
    logic               bw_limit_en;    // [5]    BW_LIMIT_EN
    logic               poll_en;        // [4]    port polling enable
    logic               class_promo_en; // [3]    class promotion enable
    logic               class_pri_en;   // [2]    CLASS_PRI_EN
    logic               class_cal_en;   // [1]    CLASS_CAL_EN
    logic               queue_contig;   // [0]    queue contiguous scheduling mode
  } qs_ctrl_t;

  // Per-port configuration register.
  typedef struct packed {
    logic port_contig; // 1: port contiguous, 0: port interleave
    logic high_pri;    // 1: high priority port
  } port_cfg_t;

  function automatic logic [PORT_W:0] num_ports(input logic [1:0] cfg);
    case (cfg)
      2'b00:   return 10'd75;
      2'b01:   return 10'd147;
      default: return 10'd267;
    endcase
  endfunction

  function automatic logic [3:0] classes_per_port(input logic [1:0] cfg);
    case (cfg)
      2'b00:   return 4'd8;
      2'b01:   return 4'd4;
      default: return 4'd2;
    endcase
  endfunction

  // Flat queue index of (port, class) in configuration cfg.
  function automatic int unsigned queue_index(input logic [1:0] cfg, input int unsigned port,
                                              input int unsigned cls);
    return port * int'(classes_per_port(cfg)) + cls;
  endfunction

endpackage
