// ascend_pkg: names of the C-element cells of the basic ASCEnD set.
package ascend_pkg;
  typedef enum logic [1:0] {
    CELL_C2   = 2'd0,   // 2-input symmetric C-element
    CELL_C3   = 2'd1,   // 3-input C-element
    CELL_C2R1 = 2'd2,   // 2-input C-element with active-low reset
    CELL_C1U1 = 2'd3    // asymmetric 2-input C-element
  } cell_e;
endpackage
