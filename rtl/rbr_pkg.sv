// rbr_pkg: shared sizes and types of the register-bits-reuse (RBR) and
// register-value-reuse (RVR) redundancy-reduction unit of a staggered
// redundant-multithreading (RMT) core.
//
// The sizes are those of the evaluated machine: 32-bit data words, 128
// integer physical registers, an 8-entry RVR CAM, a 16-entry load value
// buffer, a slack of 64 instructions and a commit budget of four ROB
// entries per cycle. The 32 architectural registers follow the 32-bit PISA
// instruction set the machine runs. Only the integer register subsystem is
// modelled; the floating-point one has the same structure.
//
// The base machine splits a 192-entry ROB 128/64 and 40-entry load and
// store buffers 30/10 between the leading and trailing threads. With RBR
// the trailing parts shrink to 32 ROB entries, no load buffer entries and
// 5 store buffer entries, and the rest goes to the leading thread: 160 ROB
// entries, 40 load buffer entries and 35 store buffer entries.
package rbr_pkg;

  localparam int XLEN      = 32;          // data word
  localparam int HALF      = XLEN / 2;    // narrow significant part
  localparam int NPREG     = 128;         // integer physical registers
  localparam int NARCH     = 32;          // architectural registers
  localparam int ROB_LDG   = 160;         // leading ROB section (192 - 32)
  localparam int ROB_TLG   = 32;          // trailing ROB section (RBR)
  localparam int CAM_N     = 8;           // RVR CAM entries
  localparam int LVB_N     = 16;          // load value buffer (RBR-LVBR)
  localparam int LB_LDG    = 40;          // leading load buffer entries (40 - 0)
  localparam int SB_LDG    = 35;          // leading store buffer entries (40 - 5)
  localparam int SB_TLG    = 5;           // trailing store buffer entries (RBR)
  localparam int SLACK     = 64;          // instructions between the threads
  localparam int COMMIT_W  = 4;           // ROB entries read at commit

  // Status bits kept beside every physical register (Fig. 4(c)).
  typedef struct packed {
    logic width;     // 1: register holds a compressed narrow value
    logic location;  // 1: the non-significant bits are in front (upper half)
    logic value;     // 1: the non-significant bits are all ones
  } size_info_t;

  // How a trailing instruction got its destination register.
  typedef enum logic [1:0] {
    TR_OWN    = 2'd0,  // a register of its own
    TR_SHARED = 2'd1,  // RBR: upper half of the leading copy's register
    TR_REUSE  = 2'd2   // RVR: the register of an earlier equal result
  } tr_alloc_t;

  function automatic logic parity3(input size_info_t s);
    return s.width ^ s.location ^ s.value;
  endfunction

endpackage
