// crit_pkg: types and constants shared by the GPU-access criticality and
// criticality-aware DRAM scheduling blocks.
//
// The rendering pipeline is abstracted as a queuing network of five unit
// types (front end, depth/stencil test, shader, color writer, blitter). GPU
// memory accesses are tagged by the stream they belong to (color, texture,
// depth, blitter, everything else, or shader load/store). DRAM requests carry
// the source (CPU or GPU), the criticality bit set on the GPU side, and the
// bank/row/column decoded by the LLC.  Field widths not printed in the source
// material are this design's choice (16-bit row, 10-bit column, 8-bit tag).
package crit_pkg;

  // Unit types of the queuing network.
  typedef enum logic [2:0] {
    U_FE = 3'd0,
    U_ZS = 3'd1,
    U_SH = 3'd2,
    U_CW = 3'd3,
    U_BT = 3'd4
  } unit_e;

  localparam int unsigned NUM_UNIT_TYPES = 5;

  // GPU access streams.
  typedef enum logic [2:0] {
    S_COLOR   = 3'd0,
    S_TEXTURE = 3'd1,
    S_DEPTH   = 3'd2,
    S_BLITTER = 3'd3,
    S_OTHER   = 3'd4,
    S_SHADER  = 3'd5
  } stream_e;

  // Bottleneck vector, one bit per unit type.
  typedef struct packed {
    logic bt;
    logic cw;
    logic sh;
    logic zs;
    logic fe;
  } bneck_t;

  // Per-unit-type occupancy/throughput summary bits.
  typedef struct packed {
    logic io;   // IOccupancy: any instance has C_in above mid-point
    logic ao;   // AOccupancy: all instances have C_in above mid-point
    logic th;   // Throughput: all instances have C_out above mid-point
  } unit_stat_t;

  localparam int unsigned BANK_W = 3;   // 8 banks per rank
  localparam int unsigned ROW_W  = 16;
  localparam int unsigned COL_W  = 10;
  localparam int unsigned TAG_W  = 8;
  localparam int unsigned CPU_W  = 2;   // four CPU cores

  // Request entering a memory controller (an LLC miss).
  typedef struct packed {
    logic              is_gpu;
    logic              critical;   // meaningful for GPU requests only
    logic [CPU_W-1:0]  cpu_id;     // meaningful for CPU requests only
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [TAG_W-1:0]  tag;
  } mem_req_t;

  // Command leaving the scheduler towards the DRAM channel.
  typedef struct packed {
    logic              activate;   // a new row had to be opened
    logic              precharge;  // another row had to be closed first
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [TAG_W-1:0]  tag;
    logic              is_gpu;
    logic              critical;
  } dram_cmd_t;

  // CPU application LLC intensity classes.
  typedef enum logic [1:0] {
    INT_L = 2'd0,
    INT_M = 2'd1,
    INT_H = 2'd2
  } intensity_e;

endpackage
