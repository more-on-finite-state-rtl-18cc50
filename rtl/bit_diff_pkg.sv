// bit_diff_pkg: types shared by the structural bit difference calculator.
//
// bd_ctrl_t is the bundle of select and load lines the controller
// (bit_diff_fsm) drives into the datapath (bit_diff_datapath). Select
// encodings are this design's choice:
//   value_sel 1: load the external input      0: load value >> 1
//   diff_sel  1: load 0                       0: load diff +1 / -1
//   count_sel 1: load 0                       0: load count + 1
package bit_diff_pkg;

  typedef struct packed {
    logic value_sel;
    logic value_ld;
    logic diff_sel;
    logic diff_ld;
    logic count_sel;
    logic count_ld;
    logic output_ld;
  } bd_ctrl_t;

endpackage
