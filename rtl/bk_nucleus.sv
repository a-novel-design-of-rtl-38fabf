// 8-bit nucleus stage of the hybrid carry skip adder: a Brent-Kung parallel
// prefix adder modified to sit in a CI-CSKA carry chain.
//
// Preprocessing forms P_i = A_i xor B_i and G_i = A_i.B_i (bits numbered 1..8).
// The Brent-Kung network combines them with the cell
// (G, P)_{i:k} = (G_{i:j} + P_{i:j}.G_{j-1:k}, P_{i:j}.P_{j-1:k}); its forward tree
// (2:1, 4:3, 6:5, 8:7, then 4:1, 8:5, then 8:1) delivers the group terms G_8:1 and
// P_8:1 first, and the backward tree then fills in 6:1 and 3:1, 5:1, 7:1.
// The skip logic is one AOI gate: c_out_n = ~(G_8:1 + P_8:1.C_o,p-1). An added
// level of gray cells folds the incoming carry into every prefix,
// G_i:0 = G_i:1 + P_i:1.C_o,p-1, and postprocessing forms S_i = G_i-1:0 xor P_i
// (S_1 = P_1 xor C_o,p-1). P_8:1 is also brought out as p_all: it is the skip
// condition and the indicator of a variable-latency adder (when it is 1 the
// carry may travel through this stage from far below). The cell equations and
// the prefix nodes follow the architecture. Combinational.
module bk_nucleus (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       c_in,    // C_o,p-1, true polarity
  output logic [7:0] s,
  output logic       c_out_n, // ~C_o,p
  output logic       p_all    // P_8:1
);
  // preprocessing, index 1..8 stored at [0..7]
  logic [7:0] p, g;
  assign p = a ^ b;
  assign g = a & b;

  // group (generate, propagate) over bits i..1, gp[i-1] = (G_i:1, P_i:1)
  logic [7:0] gg, gp;

  // black cell helpers
  function automatic logic [1:0] bcell(input logic [1:0] hi, input logic [1:0] lo);
    // {G, P}: G = G_hi + P_hi.G_lo, P = P_hi.P_lo
    return {hi[1] | (hi[0] & lo[1]), hi[0] & lo[0]};
  endfunction

  logic [1:0] n21, n43, n65, n87, n41, n85, n81, n61, n31, n51, n71;

  // forward tree
  assign n21 = bcell({g[1], p[1]}, {g[0], p[0]});
  assign n43 = bcell({g[3], p[3]}, {g[2], p[2]});
  assign n65 = bcell({g[5], p[5]}, {g[4], p[4]});
  assign n87 = bcell({g[7], p[7]}, {g[6], p[6]});
  assign n41 = bcell(n43, n21);
  assign n85 = bcell(n87, n65);
  assign n81 = bcell(n85, n41);
  // backward tree
  assign n61 = bcell(n65, n41);
  assign n31 = bcell({g[2], p[2]}, n21);
  assign n51 = bcell({g[4], p[4]}, n41);
  assign n71 = bcell({g[6], p[6]}, n61);

  assign {gg[0], gp[0]} = {g[0], p[0]};
  assign {gg[1], gp[1]} = n21;
  assign {gg[2], gp[2]} = n31;
  assign {gg[3], gp[3]} = n41;
  assign {gg[4], gp[4]} = n51;
  assign {gg[5], gp[5]} = n61;
  assign {gg[6], gp[6]} = n71;
  assign {gg[7], gp[7]} = n81;

  // skip logic (AOI) and indicator
  assign c_out_n = ~(gg[7] | (gp[7] & c_in));
  assign p_all   = gp[7];

  // added level: carries into bits 2..8, c[i] = G_i:0
  logic [6:0] c;
  for (genvar i = 0; i < 7; i++) begin : g_added
    assign c[i] = gg[i] | (gp[i] & c_in);
  end

  // postprocessing
  assign s = p ^ {c, c_in};
endmodule
