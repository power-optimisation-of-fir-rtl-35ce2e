// barrel_shifter -- bidirectional logarithmic barrel shifter, +-SHIFT_MAX places.
//
// Turns the floating-point product m * 2^sh into fixed point: p = floor(m * 2^sh),
// where m is an unsigned IN_W-bit mantissa and sh a signed shift amount. The
// result keeps the binary point of m, so if m has F fraction bits, so does p.
//
// How it works: the amount is biased to u = sh + SHIFT_MAX, in [0, 2*SHIFT_MAX].
// The mantissa sits at the bottom of a word of IN_W + 2*SHIFT_MAX bits, and a
// chain of multiplexer stages shifts it left by 1, 2, 4, ... places, one stage
// per bit of u. The upper IN_W + SHIFT_MAX bits of the word are p, so the
// SHIFT_MAX bits dropped at the bottom are what a right shift discards.
// A shift above +SHIFT_MAX saturates p to all ones and raises ovf; a shift
// below -SHIFT_MAX gives 0, which is the exact floor for such an amount.
//
// Interface and timing: combinational, no clock.
// The +-16 range follows the published design; the logarithmic structure,
// the truncation of right shifts and the saturation are this design's choices.
module barrel_shifter #(
  parameter int IN_W      = 16,
  parameter int SHIFT_MAX = 16,
  parameter int SH_W      = 10
) (
  input  logic        [IN_W-1:0]           m,
  input  logic signed [SH_W-1:0]           sh,
  output logic        [IN_W+SHIFT_MAX-1:0] p,
  output logic                             ovf
);

  localparam int W       = IN_W + 2 * SHIFT_MAX;
  localparam int STAGES  = $clog2(2 * SHIFT_MAX + 1);

  logic                         hi, lo;
  logic [STAGES-1:0]            u;
  logic [STAGES:0][W-1:0]       stage;

  assign hi = (sh > SH_W'(SHIFT_MAX));
  assign lo = (sh < -SH_W'(SHIFT_MAX));
  assign u  = STAGES'(sh + SH_W'(SHIFT_MAX));

  assign stage[0] = W'(m);

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    assign stage[s+1] = u[s] ? (stage[s] << (2 ** s)) : stage[s];
  end

  always_comb begin
    ovf = hi;
    if (hi)
      p = '1;
    else if (lo)
      p = '0;
    else
      p = stage[STAGES][W-1 -: IN_W + SHIFT_MAX];
  end

endmodule
