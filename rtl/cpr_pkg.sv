// cpr_pkg: types and constants shared by the checkpoint/restart (CPR) hardware.
//
// The checkpoint data path is CPR_W = 32 bits wide everywhere: registers are
// packed into 32-bit words, RAM words are split or padded to 32-bit words and
// the Capture/Restore FIFOs and the memory DMA move 32-bit words.
//
// cpr_req_e is the 3-bit command the CPR manager broadcasts down the CPR tree
// (CPR_request); cpr_state_e is the 3-bit state every node reports back to its
// parent (CPR_state). The 3-bit widths follow the CPR gate port list; the code
// values are this design's own choice. cpr_cmd_e is the host command code
// written through the SW DMA; its values are also this design's choice.
package cpr_pkg;

  localparam int unsigned CPR_W = 32;

  typedef enum logic [2:0] {
    CPR_REQ_NONE    = 3'd0,
    CPR_REQ_CAPTURE = 3'd1,
    CPR_REQ_RESTORE = 3'd2
  } cpr_req_e;

  typedef enum logic [2:0] {
    CPR_ST_IDLE = 3'd0,
    CPR_ST_BUSY = 3'd1,
    CPR_ST_DONE = 3'd2
  } cpr_state_e;

  typedef enum logic [2:0] {
    CMD_NONE    = 3'd0,
    CMD_PREPARE = 3'd1,
    CMD_CAPTURE = 3'd2,
    CMD_RESTORE = 3'd3,
    CMD_RESUME  = 3'd4
  } cpr_cmd_e;

  // Status code bits reported to the host.
  localparam int unsigned ST_PREPARED = 0;  // channels idle, requests throttled
  localparam int unsigned ST_CAPTURED = 1;  // whole context written to memory
  localparam int unsigned ST_RESTORED = 2;  // whole context restored
  localparam int unsigned ST_RUNNING  = 3;  // user logic running (DRIVE high)

  // Number of 32-bit words needed for a given number of bits.
  function automatic int unsigned words_for_bits(int unsigned bits);
    return (bits + CPR_W - 1) / CPR_W;
  endfunction

endpackage
