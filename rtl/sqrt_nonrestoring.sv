// sqrt_nonrestoring: integer square root by the nonrestoring algorithm, fully
// unrolled into combinational logic.
//
// The radicand D (RW bits, RW even) is consumed two bits at a time from the
// top. The partial remainder r (RW/2+2 bits, signed) starts at -1 and the
// partial root q (RW/2+1 bits) at 0. Each of the RW/2 steps shifts the next
// bit pair into r and then subtracts 4q+1 when r was non-negative or adds
// 4q+3 when it was negative (no restoring step); the new root bit is 1 when
// the new remainder is non-negative. The low RW/2 bits of q are floor(sqrt(D)).
// Starting r at -1 gives the same first step as starting at 0.
//
// This follows the modified nonrestoring recurrence of the published design;
// unrolling it into one combinational block, so that the whole root is formed
// within one sampling period, is this design's choice. With the default
// RW = 62 the [8.54] flux radicand gives a 31-bit [4.27] root.
module sqrt_nonrestoring #(
  parameter int unsigned RW = 62          // radicand width, even
) (
  input  logic [RW-1:0]   d,              // radicand, unsigned
  output logic [RW/2-1:0] q               // floor(sqrt(d))
);

  localparam int unsigned QW = RW/2 + 1;  // partial root width
  localparam int unsigned RRW = RW/2 + 2; // partial remainder width

  logic signed [RRW-1:0] r;
  logic        [QW-1:0]  qq;

  always_comb begin
    r  = '1;   // -1
    qq = '0;
    for (int i = 0; i < RW/2; i++) begin
      if (!r[RRW-1])
        r = ((r <<< 2) | RRW'(d[RW-1-2*i -: 2])) - RRW'({qq, 2'b01});
      else
        r = ((r <<< 2) | RRW'(d[RW-1-2*i -: 2])) + RRW'({qq, 2'b11});
      qq = {qq[QW-2:0], ~r[RRW-1]};
    end
    q = qq[RW/2-1:0];
  end

endmodule
