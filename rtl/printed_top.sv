// printed_top: the printed-electronics circuits side by side.
// The circuits are independent designs for inkjet-printed electrolyte-gated
// transistor technology and share no signals except the clock and reset of the
// one clocked design; each keeps its own ports under a prefix:
//   latch_*  set/reset latch (1-bit storage)
//   lut_*    one-time programmable 2-input lookup table (programmed as XNOR)
//   dt_*     bespoke fully parallel digital decision tree (depth 2, 2-bit)
//   adt_*    analog depth-2 decision tree (behavioural)
//   rom_*    4x1 resistive ROM with 2 bits per cell (behavioural)
//   sc_*     mixed-signal stochastic-computing network 9-3-2 (clocked by clk,
//            which stands for the printed ring oscillator)
//   pnn_*    analog printed neural network 4-4-3-3 (behavioural)
//   n2_*     first 2-input neuron prototype: crossbar MAC + piece-wise linear
//            activation (behavioural)
// Analog signals are real-valued ports in volts. Only latch, LUT, digital tree
// and the stochastic network core are synthesizable logic.
module printed_top (
  input  logic       clk,
  input  logic       rst_n,
  // SR latch
  input  logic       latch_s,
  input  logic       latch_r,
  output logic       latch_q,
  output logic       latch_qb,
  // 2-input LUT
  input  logic       lut_in1,
  input  logic       lut_in2,
  output logic       lut_out,
  // bespoke digital decision tree
  input  logic [1:0][1:0] dt_x,
  output logic [3:0] dt_cls,
  // analog decision tree
  input  real        adt_x1,
  input  real        adt_x2,
  output logic       adt_s1,
  output logic       adt_s2,
  output logic [3:0] adt_c,
  // analog ROM
  input  logic [3:0] rom_sel,
  output real        rom_vout,
  // stochastic-computing neural network
  input  logic       sc_start,
  input  real        sc_x [9],
  output logic [1:0] sc_y_bits,
  output logic       sc_y_valid,
  output logic       sc_done,
  output logic       sc_busy,
  output logic [2:0] sc_h_active,
  output logic [1:0] sc_y_active,
  // printed analog neural network
  input  real        pnn_x [4],
  output real        pnn_y [3],
  // 2-input pPLU neuron prototype
  input  real        n2_v [2],
  output real        n2_vout
);
  sr_latch u_latch (.s(latch_s), .r(latch_r), .q(latch_q), .qb(latch_qb));

  plut2 u_lut (.in1(lut_in1), .in2(lut_in2), .out_bit(lut_out));

  bespoke_dt u_dt (.x(dt_x), .cls(dt_cls));

  analog_dt u_adt (.x1(adt_x1), .x2(adt_x2), .s1(adt_s1), .s2(adt_s2), .c(adt_c));

  analog_rom u_rom (.v_sel(rom_sel), .v_out(rom_vout));

  sc_nn_top u_sc (
    .clk, .rst_n, .start(sc_start), .x(sc_x), .y_bits(sc_y_bits),
    .y_valid(sc_y_valid), .done(sc_done), .busy(sc_busy),
    .h_active(sc_h_active), .y_active(sc_y_active)
  );

  pnn u_pnn (.x(pnn_x), .y(pnn_y));

  // 2-input neuron prototype: R1 = R2 = 1 kohm, Rd = 30 kohm, then the pPLU
  real n2_vx;
  pnn_mac #(.N(2), .G_NS({32'd1000000, 32'd1000000}), .G_B_NS(0), .G_D_NS(33333)) u_n2_mac (
    .v_in(n2_v), .v_bias(0.0), .v_x(n2_vx)
  );
  pnn_pplu u_n2_act (.v_in(n2_vx), .v_out(n2_vout));
endmodule
