// analog_dt: behavioural model of the printed analog depth-2 decision tree.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// Each node is a pair of back-to-back resistor-load inverters; one pull-up
// holds an input transistor whose channel resistance falls as its gate voltage
// rises, the opposite pull-up is a printed threshold resistor. The side with
// the lower pull-up resistance wins and the pair settles to complementary
// outputs. The root compares x1 and drives s1/s2; split A (powered through a
// selector transistor by s1) and split B (by s2) both compare x2 and drive the
// leaves c[0..1] and c[2..3]. An unselected split holds both leaves at 0, so
// exactly one leaf is high.
// The node structure follows the printed prototype. The transistor model, a
// resistance falling linearly from R_OFF at 0 V to R_ON at 2 V, and the leaf
// order inside each split are this model's assumptions. Outputs are logic
// levels and respond with no delay.
module analog_dt #(
  parameter real R_ON  = 1.0e3,
  parameter real R_OFF = 1.0e6,
  // printed threshold resistors: root (R1), split A (R2), split B (R3)
  parameter real R_THR [3] = '{500.0e3, 500.0e3, 500.0e3}
) (
  input  real        x1,
  input  real        x2,
  output logic       s1,
  output logic       s2,
  output logic [3:0] c
);
  function automatic real r_channel(input real v);
    real vc;
    vc = (v < 0.0) ? 0.0 : ((v > 2.0) ? 2.0 : v);
    return R_OFF + (R_ON - R_OFF) * vc / 2.0;
  endfunction

  logic a_hi, b_hi;

  always_comb begin
    s1   = r_channel(x1) < R_THR[0];
    s2   = !s1;
    a_hi = r_channel(x2) < R_THR[1];
    b_hi = r_channel(x2) < R_THR[2];
    c[0] = s1 && !a_hi;
    c[1] = s1 &&  a_hi;
    c[2] = s2 &&  b_hi;
    c[3] = s2 && !b_hi;
  end
endmodule
