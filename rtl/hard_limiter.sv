// hard_limiter - behavioural model of the analogue hard limiter at the loop
// input; not synthesizable (it takes a real-valued input).
//
// The limiter turns the analogue input U_i = s(t) + n(t) into the binary
// signal U_o: 1 when U_i is positive, 0 otherwise. Because the loop only ever
// uses the signs of its samples, one limiter ahead of the sampling flip-flops
// replaces the three samplers with their separate sign blocks. The switching
// point is taken at zero; an input of exactly zero reads as negative, a choice
// of this model.
//
// Interface: u_i (real) in, u_o out. Timing: no delay, purely combinational.
module hard_limiter (
  input  real  u_i,
  output logic u_o
);
  assign u_o = (u_i > 0.0);
endmodule
