// fpga_pkg: sizes and configuration-bit layout shared by the multi-style
// FPGA fabric and its testbenches.
//
// The fabric is configured by one flat bit vector. Every block takes a
// slice of it; the offsets below say where each field lives, from the
// logic block up to the full 2 x 3 cluster array. The 6-input LUT, the 24
// global inputs per CLB, the triangular local crosspoint matrix, five CLBs
// per cluster and six clusters follow the published architecture. The
// field order, the link width between clusters and the auxiliary routing
// are choices of this implementation.
`timescale 1ns/1ps
package fpga_pkg;

  // ---------------- logic block ----------------
  localparam int LUT_K       = 6;
  localparam int LUT_BITS    = 1 << LUT_K;        // 64 truth-table bits
  localparam int LB_DSEL_LSB = LUT_BITS;          // [65:64] register-input mux
  localparam int LB_OSEL     = LUT_BITS + 2;      // [66] 1 = registered output
  localparam int LB_CSEL     = LUT_BITS + 3;      // [67] 1 = local clock
  localparam int LB_CFG      = LUT_BITS + 4;      // 68

  // register-input mux choices
  typedef enum logic [1:0] {
    DSEL_Q    = 2'd0,   // LUT output
    DSEL_SUM  = 2'd1,   // Q ^ cin
    DSEL_AX   = 2'd2,   // bypass input
    DSEL_COUT = 2'd3    // carry out
  } dsel_e;

  // ---------------- slice ----------------
  localparam int SLICE_CFG = 2 * LB_CFG;         // block A at [135:68], block B at [67:0]
  localparam int SLICE_LB_A = LB_CFG;            // upper block (A inputs)
  localparam int SLICE_LB_B = 0;                 // lower block (B inputs, carry in)

  // ---------------- local interconnect ----------------
  localparam int LI_GLB      = 24;               // global inputs per CLB
  localparam int LI_PINS     = 24;               // A,B,C,D x 6 LUT pins
  localparam int LI_XP_BITS  = LI_PINS * (LI_PINS + 1) / 2;  // 300 crosspoints
  localparam int LI_FB       = 6;                // slice outputs fed back
  localparam int LI_CB       = 3;                // controller block la, rr, clk
  localparam int LI_AUX_SRC  = LI_GLB + LI_FB + LI_CB + 1;   // + constant 1 = 34
  localparam int LI_AUX      = 7;                // Ax0,Bx0,Ax1,Bx1,cin,l_clk,ce
  localparam int LI_CFG      = LI_XP_BITS + LI_AUX * LI_AUX_SRC;  // 538

  // auxiliary wires of the local interconnect
  localparam int AUX_AX0 = 0, AUX_BX0 = 1, AUX_AX1 = 2, AUX_BX1 = 3,
                 AUX_CIN = 4, AUX_LCLK = 5, AUX_CE = 6;
  // auxiliary source numbering
  localparam int ASRC_GLB = 0;                   // 0..23
  localparam int ASRC_FB  = LI_GLB;              // 24..29: Da0,Db0,f7_0,Da1,Db1,f7_1
  localparam int ASRC_CB  = LI_GLB + LI_FB;      // 30..32: la, rr, clk
  localparam int ASRC_ONE = LI_GLB + LI_FB + LI_CB;  // 33

  // Crosspoint of global input g onto LUT pin p; present only for g <= p.
  // Pins are numbered within {A[5:0],B[5:0],C[5:0],D[5:0]}, D[0] = 0.
  function automatic int li_xp(input int p, input int g);
    return p * (p + 1) / 2 + g;
  endfunction

  function automatic int li_aux(input int sink, input int src);
    return LI_XP_BITS + sink * LI_AUX_SRC + src;
  endfunction

  // ---------------- CLB ----------------
  localparam int CLB_OUT  = 7;   // Da0,Db0,f7_0,Da1,Db1,f7_1,cout
  localparam int CLB_S0   = 0;
  localparam int CLB_S1   = SLICE_CFG;
  localparam int CLB_LI   = 2 * SLICE_CFG;
  localparam int CLB_CFG  = 2 * SLICE_CFG + LI_CFG;   // 810

  // ---------------- controller block ----------------
  localparam int PDE_TAPS = 8;
  localparam int PDE_SEL_W = $clog2(PDE_TAPS);
  localparam int CB_CFG   = PDE_SEL_W;

  // ---------------- cluster / global interconnect ----------------
  localparam int N_CLB    = 5;
  localparam int CB_CLB   = 1;    // CLB whose local interconnect sees the controller block
  localparam int LINK_W   = 8;
  localparam int N_SIDES  = 4;    // N, E, S, W
  localparam int SIDE_N = 0, SIDE_E = 1, SIDE_S = 2, SIDE_W = 3;

  // source numbering of the global interconnect
  localparam int GS_CLB  = 0;                          // clb*7 + output
  localparam int GS_LA   = N_CLB * CLB_OUT;            // 35
  localparam int GS_RR   = GS_LA + 1;
  localparam int GS_CCLK = GS_LA + 2;
  localparam int GS_PULSE = GS_LA + 3;                 // 38
  localparam int GS_LINK = GS_LA + 4;                  // 39 + side*LINK_W + bit
  localparam int GI_SRC  = GS_LINK + N_SIDES * LINK_W; // 71
  // sink numbering
  localparam int GK_CLB  = 0;                          // clb*24 + global input
  localparam int GK_LR   = N_CLB * LI_GLB;             // 120
  localparam int GK_RA   = GK_LR + 1;
  localparam int GK_PG   = GK_LR + 2;
  localparam int GK_LINK = GK_LR + 3;                  // 123 + side*LINK_W + bit
  localparam int GI_SINK = GK_LINK + N_SIDES * LINK_W; // 155
  localparam int GI_CFG  = GI_SINK * GI_SRC;

  function automatic int gi_xp(input int sink, input int src);
    return sink * GI_SRC + src;
  endfunction

  localparam int CL_CB      = N_CLB * CLB_CFG;
  localparam int CL_GI      = CL_CB + CB_CFG;
  localparam int CLUSTER_CFG = CL_GI + GI_CFG;

  // ---------------- fabric ----------------
  localparam int N_ROWS     = 2;
  localparam int N_COLS     = 3;
  localparam int N_CLUSTERS = N_ROWS * N_COLS;
  localparam int N_IO       = 2;     // bottom-left and bottom-right clusters
  localparam int FABRIC_CFG = N_CLUSTERS * CLUSTER_CFG;
  localparam int CFG_WORD_W = 32;
  localparam int CFG_WORDS  = (FABRIC_CFG + CFG_WORD_W - 1) / CFG_WORD_W;

endpackage
