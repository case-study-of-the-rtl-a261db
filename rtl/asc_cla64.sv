// asc_cla64: 64-bit carry-propagate adder with two levels of carry lookahead.
//
// Both the Accumulator and the Add section of the pipe use a 64-bit
// carry-propagating adder "with double-level lookahead for carry generation";
// this module is that adder.  Level 1 forms generate/propagate for 4-bit
// groups; level 2 forms them for 16-bit blocks of four groups.  Block carries
// are looked ahead from the block signals, group carries inside a block from
// the group signals, and bit carries inside a group from the bit signals.
// The 4-bit group and 16-bit block sizes are this design's choice.
//
// Interface: a + b + cin -> sum, cout.  Purely combinational.
module asc_cla64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [63:0] sum,
  output logic        cout
);
  logic [63:0] g, p, c;
  logic [15:0] gg, gp, gc;   // group generate / propagate / carry-in
  logic [3:0]  bg, bp, bc;   // block generate / propagate / carry-in

  assign g = a & b;
  assign p = a ^ b;

  // level 1: 4-bit groups
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      gg[i] = g[4*i+3] | (p[4*i+3] & g[4*i+2]) | (p[4*i+3] & p[4*i+2] & g[4*i+1])
            | (p[4*i+3] & p[4*i+2] & p[4*i+1] & g[4*i]);
      gp[i] = &p[4*i +: 4];
    end
  end

  // level 2: 16-bit blocks of four groups
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      bg[k] = gg[4*k+3] | (gp[4*k+3] & gg[4*k+2]) | (gp[4*k+3] & gp[4*k+2] & gg[4*k+1])
            | (gp[4*k+3] & gp[4*k+2] & gp[4*k+1] & gg[4*k]);
      bp[k] = &gp[4*k +: 4];
    end
  end

  // block carries, looked ahead from cin
  always_comb begin
    bc[0] = cin;
    bc[1] = bg[0] | (bp[0] & cin);
    bc[2] = bg[1] | (bp[1] & bg[0]) | (bp[1] & bp[0] & cin);
    bc[3] = bg[2] | (bp[2] & bg[1]) | (bp[2] & bp[1] & bg[0]) | (bp[2] & bp[1] & bp[0] & cin);
    cout  = bg[3] | (bp[3] & bc[3]);
  end

  // group carries inside each block
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      gc[4*k]   = bc[k];
      gc[4*k+1] = gg[4*k] | (gp[4*k] & bc[k]);
      gc[4*k+2] = gg[4*k+1] | (gp[4*k+1] & gg[4*k]) | (gp[4*k+1] & gp[4*k] & bc[k]);
      gc[4*k+3] = gg[4*k+2] | (gp[4*k+2] & gg[4*k+1]) | (gp[4*k+2] & gp[4*k+1] & gg[4*k])
                | (gp[4*k+2] & gp[4*k+1] & gp[4*k] & bc[k]);
    end
  end

  // bit carries inside each group
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      c[4*i]   = gc[i];
      c[4*i+1] = g[4*i] | (p[4*i] & gc[i]);
      c[4*i+2] = g[4*i+1] | (p[4*i+1] & g[4*i]) | (p[4*i+1] & p[4*i] & gc[i]);
      c[4*i+3] = g[4*i+2] | (p[4*i+2] & g[4*i+1]) | (p[4*i+2] & p[4*i+1] & g[4*i])
               | (p[4*i+2] & p[4*i+1] & p[4*i] & gc[i]);
    end
  end

  assign sum = p ^ c;
endmodule
