// fdtd_pkg: types shared by the FDTD Yee-cell array.
//
// field_sel_t selects which register of a cell a host write loads: one of
// the three field components of the 2-D TMz Yee cell (Ez, Hx, Hy) or the
// word holding the cell's two power-of-two update coefficients
// (bits [7:0] = log2 of the H coefficient, bits [15:8] = log2 of the E
// coefficient, both signed). This load format is a design choice.
package fdtd_pkg;

  typedef enum logic [1:0] {
    FLD_EZ   = 2'd0,
    FLD_HX   = 2'd1,
    FLD_HY   = 2'd2,
    FLD_COEF = 2'd3
  } field_sel_t;

  // Destination register of one adder operation inside a cell.
  typedef enum logic [2:0] {
    DST_T0,
    DST_T1,
    DST_HX,
    DST_HY,
    DST_EZ
  } cell_dst_t;

  // Which coefficient scales operand B of an adder operation.
  typedef enum logic [1:0] {
    SCL_NONE,
    SCL_CH,
    SCL_CE
  } cell_scale_t;

endpackage
