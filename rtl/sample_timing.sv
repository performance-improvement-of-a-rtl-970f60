// sample_timing - strobe decoder of the digital clock (T_C, T_A, T_B).
//
// One set of three samples is taken every K output cycles. T_A is the nominal
// sampling point at phase 0, the rising edge of the output signal, where the
// locked loop finds the input's positive zero crossing. T_B is L phase steps
// later and T_C L phase steps earlier (at phase 2m-L of the preceding cycle),
// so the samples are T_S = L*Delta/(2*pi) output periods apart. A strobe fires
// in the clock in which its phase is first reached; if the phase shifter made
// the count skip the value, it fires one clock late, on the next value.
//
// Interface: phase, moved, skipped from the divider; one-cycle strobes t_c,
// t_a, t_b and a cycle index. Timing: strobes are combinational from the
// registered divider state and are high in the cycle whose input is sampled.
//
// The three sampling points, their spacing l*Delta and the K-cycle sampling
// period follow the design's description; the phase values chosen for them
// are this design's own.
module sample_timing #(
  parameter int unsigned M = 32,
  parameter int unsigned L = 2,       // sample spacing, in steps Delta
  parameter int unsigned K = 1        // one set every K cycles
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [$clog2(2*M)-1:0] phase,
  input  logic moved,
  input  logic skipped,
  output logic t_c,
  output logic t_a,
  output logic t_b
);

  localparam int W  = $clog2(2*M);
  localparam int CW = (K > 1) ? $clog2(K) : 1;
  localparam logic [W-1:0] PA = '0;
  localparam logic [W-1:0] PB = W'(L);
  localparam logic [W-1:0] PC = W'(2*M - L);
  localparam logic [CW-1:0] KLAST = CW'(K - 1);

  logic [CW-1:0] cyc;   // index of the current output cycle, 0..K-1

  function automatic logic hit(input logic [W-1:0] p, input logic [W-1:0] pos,
                               input logic mv, input logic sk);
    logic [W-1:0] pos1;
    pos1 = (pos == W'(2*M - 1)) ? '0 : pos + 1'b1;
    return mv && ((p == pos) || (sk && p == pos1));
  endfunction

  logic h_a, h_b, h_c;

  always_comb begin
    h_a = hit(phase, PA, moved, skipped);
    h_b = hit(phase, PB, moved, skipped);
    h_c = hit(phase, PC, moved, skipped);
    t_a = h_a && (cyc == KLAST);    // cycle about to start is index 0
    t_b = h_b && (cyc == '0);
    t_c = h_c && (cyc == KLAST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cyc <= KLAST;
    else if (h_a) cyc <= (cyc == KLAST) ? '0 : cyc + 1'b1;
  end

  initial assert (L >= 1 && 2*L < M) else $error("sample_timing: need 1 <= L < M/2");
  initial assert (K >= 1) else $error("sample_timing: K must be at least 1");

endmodule
