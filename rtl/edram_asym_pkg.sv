// edram_asym_pkg: types shared by the redundancy-free eDRAM error-tolerant blocks.
//
// The eDRAM is modelled with true cells: a stored 1 is a charged capacitor. Retention errors
// are asymmetric, almost always discharging a charged cell (1 -> 0). The injection direction
// type below lets a testbench also apply the rare 0 -> 1 error. The Bloom filter command
// encoding is a choice of this design.
package edram_asym_pkg;

  // Direction of an injected retention error.
  typedef enum logic {
    RET_DISCHARGE = 1'b0,  // charged cell loses its charge: stored 1 reads as 0
    RET_CHARGE    = 1'b1   // rare case: discharged cell reads as 1
  } ret_dir_e;

  // Bloom filter commands.
  typedef enum logic [1:0] {
    BF_CLEAR  = 2'd0,  // set every filter bit to 0 (write all memory cells charged)
    BF_INSERT = 2'd1,  // set the q bits of an element
    BF_QUERY  = 2'd2   // test whether the q bits of an element are all 1
  } bf_op_e;

endpackage
