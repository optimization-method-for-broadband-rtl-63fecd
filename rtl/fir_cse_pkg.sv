// Shared types and constant tables for the shift-add FIR filters.
//
// A constant-coefficient multiplier block is described as an adder graph.
// Node 0 is the input sample x. Every further node n >= 1 is one
// adder-subtractor:
//
//     node[n] = (+/-) (node[src_a] << sh_a)  (+/-)  (node[src_b] << sh_b)
//
// so every node holds x times a constant integer. A tap output takes one
// node, shifts it left and optionally negates it (shifts are wiring, negation
// of a single term folds into the adder that consumes it downstream of the
// multiplier block). Coefficients are integers: a coefficient written with F
// fractional digits is scaled by 2^F, so a right shift by k in the fractional
// notation becomes a left shift by F-k here and no bits are ever lost.
//
// Three graphs are kept here:
//   * RRC_*  - the 64-tap root-raised-cosine filter with 10-digit CSD
//              coefficients (scale 2^9). RRC_COEF is the coefficient set:
//                c[k] = round(512 * g(t_k) / g(0)),  t_k = (k - 31.5) / 8,
//              where g is the root-raised-cosine pulse with roll-off 0.3 and
//              8 samples per symbol,
//                g(t) = [sin(pi t (1-a)) + 4 a t cos(pi t (1+a))]
//                       / [pi t (1 - (4 a t)^2)].
//              The roll-off and samples per symbol are this design's choice,
//              picked to give a main lobe and stop band like the intended
//              filter. RRC_NODES/RRC_TAPS are the result of running common
//              subexpression elimination on the CSD digits of RRC_COEF: n-digit
//              patterns for n = 5 down to 2, most frequent pattern first, ties
//              broken towards the shorter pattern and then towards fewer
//              subtractions; each chosen pattern becomes a coefficient of its
//              own. Plain CSD expansion of these coefficients takes 86 adders;
//              the graph below takes 19.
//   * F1_*   - the 3-tap example filter h0 = 0.10010101 (with the 4th digit
//              negative), h1 = 1.00100100 (6th digit negative),
//              h2 = 1.01010000 (2nd and 4th digits negative), scale 2^8:
//              117, 284, 176. Two shared subexpressions, A = x - x/8 and
//              B = x + x/4, feed all three outputs: 5 adders instead of 7.
//   * FIG1_* - the single multiplier by 0.11100111 = 231/256, CSD
//              1.00(-1)0100(-1): t = x - x/8, y = t + t/32, 2 adders
//              instead of 3 (CSD) or 5 (plain binary).
package fir_cse_pkg;

  // One adder-subtractor of the multiplier block.
  typedef struct packed {
    logic [7:0] src_a;   // operand node index (0 = input sample)
    logic [4:0] sh_a;    // left shift of operand a
    logic       neg_a;   // subtract operand a
    logic [7:0] src_b;
    logic [4:0] sh_b;
    logic       neg_b;
  } add_node_t;

  // Where one tap product is taken from.
  typedef struct packed {
    logic [7:0] src;     // node index
    logic [4:0] sh;      // left shift
    logic       neg;     // negate
  } tap_src_t;

  // ---------------------------------------------------------------------
  // 64-tap root-raised-cosine filter, 10-digit CSD coefficients (x 2^9)
  // ---------------------------------------------------------------------
  localparam int RRC_N_TAPS  = 64;
  localparam int RRC_COEF_W  = 10;   // CSD digits per coefficient
  localparam int RRC_FRAC    = 9;    // coefficient scale 2^9
  localparam int RRC_COEF [RRC_N_TAPS] = '{
       7,    7,    6,    2,   -4,  -10,  -14,  -16,
     -14,   -8,    3,   15,   27,   36,   39,   33,
      18,   -5,  -33,  -61,  -83,  -94,  -87,  -59,
      -7,   64,  151,  246,  339,  420,  480,  512,
     512,  480,  420,  339,  246,  151,   64,   -7,
     -59,  -87,  -94,  -83,  -61,  -33,   -5,   18,
      33,   39,   36,   27,   15,    3,   -8,  -14,
     -16,  -14,  -10,   -4,    2,    6,    7,    7
  };
  localparam int RRC_N_NODES = 19;
  localparam add_node_t RRC_NODES [RRC_N_NODES] = '{
    '{0, 0, 1'b0, 0, 3, 1'b1},  // node 1
    '{0, 0, 1'b0, 0, 2, 1'b1},  // node 2
    '{0, 0, 1'b0, 0, 2, 1'b0},  // node 3
    '{0, 0, 1'b0, 0, 4, 1'b1},  // node 4
    '{0, 0, 1'b0, 1, 2, 1'b0},  // node 5
    '{0, 0, 1'b0, 0, 3, 1'b0},  // node 6
    '{1, 0, 1'b0, 0, 5, 1'b1},  // node 7
    '{0, 0, 1'b0, 0, 5, 1'b0},  // node 8
    '{2, 0, 1'b0, 0, 6, 1'b0},  // node 9
    '{2, 0, 1'b0, 0, 4, 1'b1},  // node 10
    '{10, 0, 1'b0, 0, 6, 1'b1},  // node 11
    '{0, 0, 1'b0, 2, 4, 1'b0},  // node 12
    '{6, 0, 1'b0, 2, 5, 1'b0},  // node 13
    '{3, 0, 1'b0, 0, 6, 1'b1},  // node 14
    '{0, 0, 1'b0, 10, 3, 1'b0},  // node 15
    '{3, 0, 1'b0, 0, 7, 1'b1},  // node 16
    '{11, 0, 1'b0, 0, 8, 1'b1},  // node 17
    '{0, 0, 1'b0, 2, 3, 1'b0},  // node 18
    '{18, 0, 1'b0, 0, 7, 1'b0}  // node 19
  };
  localparam tap_src_t RRC_TAPS [64] = '{
    '{1, 0, 1'b1},  // h0
    '{1, 0, 1'b1},  // h1
    '{2, 1, 1'b1},  // h2
    '{0, 1, 1'b0},  // h3
    '{0, 2, 1'b1},  // h4
    '{3, 1, 1'b1},  // h5
    '{1, 1, 1'b0},  // h6
    '{0, 4, 1'b1},  // h7
    '{1, 1, 1'b0},  // h8
    '{0, 3, 1'b1},  // h9
    '{2, 0, 1'b1},  // h10
    '{4, 0, 1'b1},  // h11
    '{5, 0, 1'b1},  // h12
    '{6, 2, 1'b0},  // h13
    '{7, 0, 1'b1},  // h14
    '{8, 0, 1'b0},  // h15
    '{6, 1, 1'b0},  // h16
    '{3, 0, 1'b1},  // h17
    '{8, 0, 1'b1},  // h18
    '{9, 0, 1'b1},  // h19
    '{11, 0, 1'b0},  // h20
    '{12, 1, 1'b0},  // h21
    '{13, 0, 1'b0},  // h22
    '{14, 0, 1'b0},  // h23
    '{1, 0, 1'b0},  // h24
    '{0, 6, 1'b0},  // h25
    '{15, 0, 1'b1},  // h26
    '{16, 1, 1'b1},  // h27
    '{17, 0, 1'b1},  // h28
    '{19, 2, 1'b0},  // h29
    '{4, 5, 1'b1},  // h30
    '{0, 9, 1'b0},  // h31
    '{0, 9, 1'b0},  // h32
    '{4, 5, 1'b1},  // h33
    '{19, 2, 1'b0},  // h34
    '{17, 0, 1'b1},  // h35
    '{16, 1, 1'b1},  // h36
    '{15, 0, 1'b1},  // h37
    '{0, 6, 1'b0},  // h38
    '{1, 0, 1'b0},  // h39
    '{14, 0, 1'b0},  // h40
    '{13, 0, 1'b0},  // h41
    '{12, 1, 1'b0},  // h42
    '{11, 0, 1'b0},  // h43
    '{9, 0, 1'b1},  // h44
    '{8, 0, 1'b1},  // h45
    '{3, 0, 1'b1},  // h46
    '{6, 1, 1'b0},  // h47
    '{8, 0, 1'b0},  // h48
    '{7, 0, 1'b1},  // h49
    '{6, 2, 1'b0},  // h50
    '{5, 0, 1'b1},  // h51
    '{4, 0, 1'b1},  // h52
    '{2, 0, 1'b1},  // h53
    '{0, 3, 1'b1},  // h54
    '{1, 1, 1'b0},  // h55
    '{0, 4, 1'b1},  // h56
    '{1, 1, 1'b0},  // h57
    '{3, 1, 1'b1},  // h58
    '{0, 2, 1'b1},  // h59
    '{0, 1, 1'b0},  // h60
    '{2, 1, 1'b1},  // h61
    '{1, 0, 1'b1},  // h62
    '{1, 0, 1'b1}  // h63
  };

  // ---------------------------------------------------------------------
  // 3-tap example filter (scale 2^8); graph A, B shared by all taps
  // ---------------------------------------------------------------------
  localparam int F1_N_TAPS  = 3;
  localparam int F1_COEF [F1_N_TAPS] = '{117, 284, 176};
  localparam int F1_N_NODES = 5;
  localparam add_node_t F1_NODES [F1_N_NODES] = '{
    '{0, 3, 1'b0, 0, 0, 1'b1},  // node 1: A = 8x - x      (x - x>>3)
    '{0, 2, 1'b0, 0, 0, 1'b0},  // node 2: B = 4x + x      (x + x>>2)
    '{1, 4, 1'b0, 2, 0, 1'b0},  // node 3: y0 = A<<4 + B   (A>>1 + B>>6)
    '{0, 8, 1'b0, 1, 2, 1'b0},  // node 4: y1 = x<<8 + A<<2 (x + A>>3)
    '{0, 8, 1'b0, 2, 4, 1'b1}   // node 5: y2 = x<<8 - B<<4 (x - B>>2)
  };
  localparam tap_src_t F1_TAPS [F1_N_TAPS] = '{
    '{3, 0, 1'b0},  // h0
    '{4, 0, 1'b0},  // h1
    '{5, 0, 1'b0}   // h2
  };

  // ---------------------------------------------------------------------
  // Single multiplier by 231/256 (scale 2^8)
  // ---------------------------------------------------------------------
  localparam int FIG1_COEF    = 231;
  localparam int FIG1_N_NODES = 2;
  localparam add_node_t FIG1_NODES [FIG1_N_NODES] = '{
    '{0, 3, 1'b0, 0, 0, 1'b1},  // node 1: t = 8x - x      (x - x>>3)
    '{1, 5, 1'b0, 1, 0, 1'b0}   // node 2: y = t<<5 + t    (t + t>>5)
  };
  localparam tap_src_t FIG1_TAPS [1] = '{'{2, 0, 1'b0}};

endpackage
