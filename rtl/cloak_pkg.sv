// cloak_pkg: shared types for the memory cloaking / bypassing unit.
//
// Defines the kind of a decoded instruction, where a load's speculative value
// comes from, and how a load's speculation turned out once it was verified
// against memory. The encodings are this design's own choice.
package cloak_pkg;

  // Instruction kind as seen by the cloaking unit.
  typedef enum logic [1:0] {
    OP_OTHER = 2'd0,
    OP_LOAD  = 2'd1,
    OP_STORE = 2'd2
  } op_e;

  // Source of a load's speculative value.
  typedef enum logic [1:0] {
    SRC_NONE   = 2'd0,  // no synonym, or synonym present but its value not yet known
    SRC_SF     = 2'd1,  // cloaking: value read from the synonym file
    SRC_BYPASS = 2'd2   // bypassing: link to the in-flight store's producer (DEF)
  } pred_src_e;

  // How a load's speculative value was used (input to verification).
  typedef enum logic [1:0] {
    VK_NONE   = 2'd0,   // no speculative value existed
    VK_SHADOW = 2'd1,   // value existed but the predictor said not to use it
    VK_USED   = 2'd2    // value was handed to the load's consumers
  } vkind_e;

  // Verification outcome of one load, fed back to the predictor at commit.
  typedef enum logic [1:0] {
    OUT_NONE    = 2'd0,
    OUT_CORRECT = 2'd1,
    OUT_WRONG   = 2'd2
  } outcome_e;

endpackage
