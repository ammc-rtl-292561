// ammc_pkg: types and constants shared by the AMMC memory controller.
//
// A descriptor describes one strided memory access pattern: Command (direction),
// Task ID (which local buffer), External Address (SDRAM word address), Priority,
// Size (element count), Stride (two's complement word distance) and Offset (link
// to the next descriptor of an irregular pattern; 0 ends the chain). The field
// set follows the AMMC description; the widths are this design's choice.
package ammc_pkg;

  localparam int TID_W    = 4;   // task / port number, up to 16 ports
  localparam int EXT_AW   = 24;  // SDRAM word address
  localparam int PRIO_W   = 4;   // 1 = highest priority
  localparam int SIZE_W   = 12;
  localparam int STRIDE_W = 16;
  localparam int OFF_W    = 3;
  localparam int LOC_AW   = 12;  // local buffer word address (up to 4096 words)
  localparam int DATA_W   = 32;

  typedef enum logic {
    CMD_READ  = 1'b0,   // SDRAM -> Specialized Memory
    CMD_WRITE = 1'b1    // Specialized Memory -> SDRAM
  } cmd_e;

  typedef struct packed {
    cmd_e                cmd;
    logic [TID_W-1:0]    task_id;
    logic [EXT_AW-1:0]   ext_addr;
    logic [PRIO_W-1:0]   prio;
    logic [SIZE_W-1:0]   size;
    logic [STRIDE_W-1:0] stride;
    logic [OFF_W-1:0]    offset;
  } desc_t;

  // One entry of the Dispatch Descriptor: the requesting port, the task it runs
  // and the priority it was placed with.
  typedef struct packed {
    logic [TID_W-1:0]  port;
    logic [TID_W-1:0]  task_id;
    logic [PRIO_W-1:0] prio;
  } disp_t;

  // One generated access: produced by the Address Manager, executed by the
  // Data Manager. 'last' marks the final access of a request.
  typedef struct packed {
    cmd_e              cmd;
    logic [TID_W-1:0]  buf_id;     // Specialized Memory to use
    logic [EXT_AW-1:0] ext_addr;
    logic [LOC_AW-1:0] loc_addr;
    logic [TID_W-1:0]  port;       // requesting port, for completion
    logic              last;
  } addr_rec_t;

endpackage
