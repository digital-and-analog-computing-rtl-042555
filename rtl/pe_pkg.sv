// pe_pkg: types shared by the printed-logic blocks.
// lut1_fn_e names the four functions a one-time programmable 1-input lookup
// table can be given by printing one conductive connection: constant 0,
// constant 1, identity and inversion. The encoding is this design's choice.
package pe_pkg;
  typedef enum logic [1:0] {
    LUT_ZERO = 2'd0,
    LUT_ONE  = 2'd1,
    LUT_ID   = 2'd2,
    LUT_INV  = 2'd3
  } lut1_fn_e;
endpackage
