// Block-LDPC example code: a 64 x 128 array of 32 x 32 blocks (rate 1/2, length 4096).
// Each non-zero block is a right cyclic shift of the 32 x 32 identity: row r of block (i,j)
// with shift d has its single 1 in column (r + d) mod 32 of block column j.
// Layout H = [A B T; C D E]: block columns 0..63 carry the information bits z1, column 64
// the g = p parity bits z2, columns 65..127 the parity bits z3; block rows 0..62 form the
// lower macro-block triangular part T with k = 5 identity macro-blocks of 32, 16, 8, 4 and 3
// block rows, block row 63 is [C D E].
// The code was drawn by random block flipping/shifting: row degrees 6 and 7, column degrees
// 2..5 with the rate-1/2 degree distribution, no 4-cycles, at most one non-zero block per
// block column inside each macro band of T, and Phi = E*inv(T)*B + D invertible.
// Blocks are listed row by row. H_SLOT is the time slot of a block in its encoder unit:
// the colour of its block row in the row-conflict graph of [A;C] (greedy colouring), 0 for
// B, D and E, and band-1 for the lower blocks of T (0 on the identity diagonal).
// PHI_INV holds the rows of the inverse of Phi over GF(2); bit c of row r is entry (r, c).
package bldpc_code_pkg;
  localparam int unsigned P     = 32;    // block size p
  localparam int unsigned PW    = 5;     // log2(p), bit index width
  localparam int unsigned M     = 64;    // block rows m
  localparam int unsigned N     = 128;    // block columns n
  localparam int unsigned GAM   = 1;     // g = GAM * p
  localparam int unsigned G     = 32;    // g
  localparam int unsigned K     = 5;     // macro-block identity matrices in T
  localparam int unsigned NI    = 64;    // information block columns, n - m
  localparam int unsigned NT    = 63;    // block rows (and block columns) of T
  localparam int unsigned TC0   = 65;    // first block column of T
  localparam int unsigned NNZ   = 404;   // non-zero blocks |P|
  localparam int unsigned L_AC  = 8;     // colours used for A and C
  localparam int unsigned DCMAX = 11;     // largest row degree
  localparam int unsigned DVMAX = 5;     // largest column degree
  localparam int unsigned BAND_ROWS [K] = '{
    32,16,8,4,3};
  localparam int unsigned H_ROW [NNZ] = '{
    0,0,0,0,0,0,1,1,1,1,1,1,1,2,2,2,2,2,3,3,3,3,3,3,4,4,4,4,4,4,5,5,
    5,5,5,5,5,6,6,6,6,6,6,7,7,7,7,7,7,7,8,8,8,8,8,8,9,9,9,9,9,9,10,10,
    10,10,10,10,10,11,11,11,11,11,11,11,12,12,12,12,12,12,13,13,13,13,13,14,14,14,14,14,14,15,15,15,
    15,15,15,16,16,16,16,16,16,17,17,17,17,17,17,18,18,18,18,18,18,18,19,19,19,19,19,19,20,20,20,20,
    20,20,20,21,21,21,21,21,21,22,22,22,22,22,22,23,23,23,23,23,23,24,24,24,24,24,24,25,25,25,25,25,
    25,25,26,26,26,26,26,26,27,27,27,27,27,27,27,28,28,28,28,28,28,29,29,29,29,29,29,30,30,30,30,30,
    30,31,31,31,31,31,31,32,32,32,32,32,32,32,33,33,33,33,33,33,34,34,34,34,34,34,35,35,35,35,35,36,
    36,36,36,36,36,37,37,37,37,37,37,38,38,38,38,38,38,39,39,39,39,39,39,40,40,40,40,40,40,40,41,41,
    41,41,41,41,42,42,42,42,42,42,42,43,43,43,43,43,43,44,44,44,44,44,44,44,45,45,45,45,45,45,45,46,
    46,46,46,46,46,47,47,47,47,47,47,48,48,48,48,48,48,49,49,49,49,49,49,49,50,50,50,50,50,50,51,51,
    51,51,51,51,52,52,52,52,52,52,52,53,53,53,53,53,53,54,54,54,54,54,54,55,55,55,55,55,55,56,56,56,
    56,56,56,57,57,57,57,57,57,58,58,58,58,58,58,59,59,59,59,59,59,59,60,60,60,60,60,60,61,61,61,61,
    61,61,61,62,62,62,62,62,62,63,63,63,63,63,63,63,63,63,63,63};
  localparam int unsigned H_COL [NNZ] = '{
    21,42,44,48,52,65,8,15,18,28,37,54,66,4,24,43,50,67,7,20,23,37,62,68,2,42,46,48,63,69,0,6,
    13,18,39,45,70,16,25,29,36,38,71,2,15,40,44,56,63,72,6,11,35,53,54,73,3,25,27,35,57,74,13,14,
    40,47,61,63,75,44,50,53,54,60,61,76,10,22,27,29,51,77,8,31,53,59,78,4,46,52,55,61,79,4,19,28,
    41,42,80,6,12,13,41,60,81,7,12,17,45,57,82,5,14,28,48,53,57,83,6,21,31,35,48,84,12,19,26,40,
    58,59,85,33,34,36,42,58,86,3,33,49,51,55,87,13,16,22,29,34,88,15,20,21,39,61,89,14,20,32,52,60,
    63,90,11,30,35,49,62,91,16,28,31,36,37,42,92,0,6,7,26,32,93,9,11,33,48,49,94,0,1,3,57,59,
    95,10,23,26,34,57,96,14,37,38,41,54,87,97,12,38,47,58,59,98,5,12,56,62,64,99,4,39,43,46,100,1,
    58,67,80,96,101,17,18,34,76,88,102,9,10,15,78,83,103,1,22,26,49,56,104,4,24,26,39,47,94,105,9,15,
    45,49,95,106,5,8,30,32,33,82,107,9,23,40,90,92,108,7,41,43,46,58,79,109,29,51,68,70,86,91,110,13,
    14,17,84,89,111,3,27,29,55,81,112,41,65,75,94,108,113,7,17,60,73,79,86,114,2,30,72,89,100,115,50,68,
    77,103,109,116,25,35,85,93,96,97,117,19,66,88,99,112,118,24,30,54,81,87,119,8,19,22,98,101,120,69,73,92,
    108,119,121,78,102,107,111,113,122,30,74,75,110,120,123,99,101,106,112,115,116,124,71,74,107,114,122,125,91,100,105,109,
    118,124,126,76,95,102,110,117,127,64,69,72,103,104,105,121,123,125,126,127};
  localparam int unsigned H_SH [NNZ] = '{
    4,9,23,14,29,0,21,7,28,19,30,23,0,21,9,10,12,0,25,29,7,10,14,0,21,5,17,25,11,0,1,31,
    4,11,31,10,0,14,10,3,11,5,0,7,7,17,5,5,27,0,9,17,26,26,0,0,7,22,1,16,11,0,31,26,
    25,20,12,4,0,22,19,4,3,27,27,0,14,17,27,20,25,0,21,3,21,6,0,23,17,5,11,30,0,24,25,6,
    2,13,0,6,17,19,8,30,0,21,29,16,6,11,0,8,18,20,0,17,7,0,19,9,23,28,31,0,30,1,29,16,
    3,26,0,29,28,27,18,15,0,21,24,10,11,5,0,21,19,2,0,10,0,15,23,17,14,29,0,11,25,6,24,19,
    1,0,30,27,20,5,21,0,12,23,20,12,9,1,0,30,17,22,18,30,0,4,13,31,25,28,0,29,20,0,21,2,
    0,10,22,10,12,19,0,26,10,31,11,14,23,0,12,8,30,0,21,0,16,19,11,17,1,0,31,9,0,26,0,27,
    1,17,5,30,0,8,16,8,17,9,0,5,14,24,25,28,0,25,25,0,24,22,0,20,7,1,29,16,1,0,6,9,
    27,10,31,0,28,9,5,14,10,1,0,10,23,15,15,25,0,20,1,1,6,10,20,0,15,4,15,5,20,3,0,18,
    9,6,3,21,0,8,22,13,7,27,0,27,1,24,19,10,0,29,23,3,1,21,14,0,23,4,22,29,16,0,15,30,
    7,13,12,0,14,7,21,6,8,2,0,3,1,18,18,31,0,9,2,9,19,12,0,25,24,14,23,16,0,26,9,28,
    2,9,0,4,25,1,6,0,0,21,26,22,1,23,0,20,24,19,28,18,24,0,12,2,13,25,23,0,14,24,22,18,
    17,14,0,31,19,11,11,1,0,12,16,24,7,3,19,27,8,5,0,1};
  localparam int unsigned H_SLOT [NNZ] = '{
    7,7,7,7,7,0,1,1,1,1,1,1,0,1,1,1,1,0,6,6,6,6,6,0,4,4,4,4,4,0,0,0,
    0,0,0,0,0,0,0,0,0,0,0,6,6,6,6,6,6,0,2,2,2,2,2,0,1,1,1,1,1,0,2,2,
    2,2,2,2,0,3,3,3,3,3,3,0,2,2,2,2,2,0,4,4,4,4,0,0,0,0,0,0,0,2,2,2,
    2,2,0,1,1,1,1,1,0,2,2,2,2,2,0,0,0,0,0,0,0,0,3,3,3,3,3,0,0,0,0,0,
    0,0,0,1,1,1,1,1,0,3,3,3,3,3,0,4,4,4,4,4,0,4,4,4,4,4,0,5,5,5,5,5,
    5,0,0,0,0,0,0,0,5,5,5,5,5,5,0,4,4,4,4,4,0,5,5,5,5,5,0,5,5,5,5,5,
    0,3,3,3,3,3,0,4,4,4,4,4,0,0,6,6,6,6,6,0,3,3,3,3,0,0,6,6,6,6,0,2,
    2,0,0,0,0,5,5,5,0,0,0,0,0,0,0,0,0,1,1,1,1,1,0,5,5,5,5,5,0,0,7,7,
    7,7,0,0,2,2,2,2,2,0,0,1,1,1,0,0,0,3,3,3,3,3,0,0,1,1,0,0,0,0,0,3,
    3,3,0,0,0,6,6,6,6,0,0,0,1,1,1,1,0,0,0,0,1,1,1,0,1,1,1,1,1,0,0,1,
    1,1,1,0,4,4,1,1,1,1,0,1,1,1,1,1,0,6,6,6,1,1,0,3,3,3,1,1,0,2,2,2,
    2,2,0,2,2,2,2,2,0,3,2,2,2,2,0,2,2,2,2,2,2,0,3,3,3,3,3,0,3,3,3,3,
    3,3,0,3,3,3,3,3,0,0,0,0,0,0,0,0,0,0,0,0};
  localparam int unsigned ROW_START [M+1] = '{
    0,6,13,18,24,30,37,43,50,56,62,69,76,82,87,93,99,105,111,118,124,131,137,143,149,155,162,168,175,181,187,193,
    199,206,212,218,223,229,235,241,247,254,260,267,273,280,287,293,299,305,312,318,324,331,337,343,349,355,361,367,374,380,387,393,
    404};
  localparam int unsigned COL_START [N+1] = '{
    0,3,6,9,13,18,21,26,31,35,39,42,45,50,55,60,65,68,72,75,79,82,85,89,92,95,98,103,106,110,115,120,
    123,126,130,134,139,142,146,149,153,157,162,167,170,173,176,180,183,188,193,196,199,202,206,211,214,217,222,227,231,235,239,242,
    246,248,250,252,254,257,260,262,264,267,270,273,276,279,281,284,287,289,292,294,296,298,300,303,306,309,312,314,317,320,322,325,
    328,331,333,335,338,341,344,347,350,352,355,357,360,363,366,369,371,374,376,378,380,382,384,386,388,390,392,394,396,398,400,402,
    404};
  localparam int unsigned COL_PERM [NNZ] = '{
    30,175,187,188,223,241,24,43,312,56,137,189,293,13,87,93,218,247,111,212,260,31,50,99,118,176,18,105,177,273,305,6,
    82,261,343,181,235,254,267,76,193,236,51,162,182,100,106,124,206,213,32,62,101,143,287,63,112,155,199,288,7,44,149,237,
    255,37,144,168,107,229,289,306,8,33,230,94,125,331,344,19,150,156,0,119,151,77,145,242,345,20,194,268,14,248,337,38,
    57,324,126,178,195,243,249,58,78,294,9,95,113,169,39,79,146,280,295,163,262,313,338,361,83,120,170,157,179,263,131,138,
    183,264,132,147,196,231,52,59,121,164,325,40,133,171,10,21,172,200,41,201,207,34,152,219,250,45,64,127,269,96,102,202,
    274,299,1,25,97,134,173,15,220,275,2,46,69,35,108,256,26,88,221,276,65,208,251,3,27,114,122,184,139,165,185,244,
    257,16,70,318,80,140,281,4,89,158,53,71,84,115,11,54,72,203,339,90,141,296,47,214,245,60,109,116,190,197,128,135,
    209,224,277,85,129,191,210,73,103,159,307,66,74,91,153,22,166,215,28,48,67,160,216,393,5,300,12,332,17,225,23,282,
    319,29,349,394,36,283,42,374,49,314,395,55,308,350,61,362,375,68,301,363,75,232,387,81,320,86,238,355,92,278,309,98,
    226,104,297,340,110,265,117,239,123,290,130,326,136,284,310,142,204,341,148,233,333,154,291,315,161,270,167,285,380,174,271,351,
    180,327,186,252,302,192,258,388,198,227,328,205,329,211,346,217,334,367,222,316,381,228,347,368,234,356,389,240,321,396,246,397,
    253,382,398,259,369,266,357,376,272,303,352,279,322,383,286,364,390,292,358,298,335,370,304,359,311,377,317,371,323,372,330,391,
    336,384,342,353,348,365,354,399,360,378,366,400,373,385,379,401,386,402,392,403};
  localparam logic [G-1:0] PHI_INV [G] = '{
    32'he1018141,
    32'hc2030283,
    32'h84060507,
    32'h080c0a0f,
    32'h1018141e,
    32'h2030283c,
    32'h40605078,
    32'h80c0a0f0,
    32'h018141e1,
    32'h030283c2,
    32'h06050784,
    32'h0c0a0f08,
    32'h18141e10,
    32'h30283c20,
    32'h60507840,
    32'hc0a0f080,
    32'h8141e101,
    32'h0283c203,
    32'h05078406,
    32'h0a0f080c,
    32'h141e1018,
    32'h283c2030,
    32'h50784060,
    32'ha0f080c0,
    32'h41e10181,
    32'h83c20302,
    32'h07840605,
    32'h0f080c0a,
    32'h1e101814,
    32'h3c203028,
    32'h78406050,
    32'hf080c0a0};
  // macro band of a block row of T
  function automatic int unsigned band_of(input int unsigned r);
    int unsigned acc = 0;
    for (int unsigned b = 0; b < K; b++) begin
      acc += BAND_ROWS[b];
      if (r < acc) return b;
    end
    return K;
  endfunction
endpackage
