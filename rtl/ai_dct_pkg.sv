// ai_dct_pkg - shared constants and types of the algebraic-integer (AI) 2D DCT.
//
// The 8-point Arai DCT needs four irrational multipliers: c4, c6, c2-c6 and
// c2+c6 (cN = cos(N*pi/16)). They are carried exactly as integer 4-tuples
// (a, b, c, d) over the basis {1, z1, z2, z1*z2} with
//   z1 = sqrt(2+sqrt(2)) + sqrt(2-sqrt(2)),   z2 = sqrt(2+sqrt(2)) - sqrt(2-sqrt(2)).
// With the constant tuples c4 = (0,0,0,1), c6 = (0,1,-1,0), c2-c6 = (0,0,2,0)
// and c2+c6 = (0,2,0,0), a tuple decodes to the real value
//   a + (b*z1 + c*z2 + d*z1*z2) / 4,
// i.e. the four decode weights are W = {1, z1/4, z2/4, z1*z2/4}
//   = {1, (c2+c6)/2, (c2-c6)/2, c4}.
//
// The 1D AI DCT has 22 outputs. Their order (index 0..21) is the order of the
// column DCT outputs in the block diagram: X0a, X1a..X1d, X2a, X2d, X3a..X3d,
// X4a, X5a..X5d, X6a, X6d, X7a..X7d. Even coefficients 0 and 4 have only an
// 'a' part; 2 and 6 have 'a' and 'd'; odd ones have all four.
package ai_dct_pkg;

  localparam int unsigned N     = 8;   // transform size
  localparam int unsigned NAI   = 22;  // AI-encoded outputs of one 1D DCT
  localparam int unsigned NCOMP = 4;   // AI components a, b, c, d

  // Pipeline latency of ai_dct1d in clock cycles.
  localparam int unsigned DCT1D_LAT = 4;

  typedef enum logic [1:0] {
    COMP_A = 2'd0,
    COMP_B = 2'd1,
    COMP_C = 2'd2,
    COMP_D = 2'd3
  } ai_comp_e;

  // Port index of component 'comp' of coefficient k, or -1 if that
  // coefficient has no such component.
  function automatic int ai_port(input int k, input int comp);
    int base;
    case (k)
      0: return (comp == 0) ? 0 : -1;
      1: base = 1;
      2: return (comp == 0) ? 5 : (comp == 3) ? 6 : -1;
      3: base = 7;
      4: return (comp == 0) ? 11 : -1;
      5: base = 12;
      6: return (comp == 0) ? 16 : (comp == 3) ? 17 : -1;
      7: base = 18;
      default: return -1;
    endcase
    return base + comp;
  endfunction

  // Products W[i]*W[j] of the decode weights, as round(W[i]*W[j] * 2^30).
  // W = {1, (cos(pi/8)+cos(3pi/8))/2, (cos(pi/8)-cos(3pi/8))/2, cos(pi/4)}.
  localparam int unsigned WFRAC = 30;
  localparam logic signed [31:0] WPROD [NCOMP][NCOMP] = '{
    '{32'sd1073741824, 32'sd701455651, 32'sd290552444, 32'sd759250125},
    '{32'sd701455651,  32'sd458247987, 32'sd189812531, 32'sd496004047},
    '{32'sd290552444,  32'sd189812531, 32'sd78622925,  32'sd205451603},
    '{32'sd759250125,  32'sd496004047, 32'sd205451603, 32'sd536870912}
  };

endpackage
