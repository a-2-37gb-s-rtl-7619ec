// ldpccc_pkg: constants, types and elaboration-time functions shared by the
// rate-compatible (491,3,6) LDPC convolutional codec.
//
// The code is the period-3, rate-1/2 time-varying LDPC-CC defined by three
// parity-check polynomial pairs. At time t the check of phase t mod 3 reads
//   u(t) ^ u(t-KU1) ^ u(t-KU2) ^ v(t) ^ v(t-KV1) ^ v(t-KV2) = 0
// with the exponents held in KU/KV below (these follow the code definition).
// Syndrome-former memory is 491; every variable takes part in exactly 3 checks
// and every check in 6 variables.
//
// Folding: with folding factor RHO (a multiple of the period 3) the bit of time
// t = RHO*X + p travels in lane p, block X. A check of lane p then reads lane
// (p-k) mod RHO at a fixed block distance ceil((k-p)/RHO), so the time-varying
// code becomes a time-invariant one and the taps are fixed wires.
//
// The functions below compute, at elaboration time, where each check taps the
// processor window and which tap-free stretches of the window are moved into
// the circular-buffer memory banks (the hybrid-partitioned FIFO).
package ldpccc_pkg;

  // ---------------- code definition ----------------
  localparam int PERIOD = 3;
  localparam int MS     = 491;            // syndrome-former memory
  localparam int J      = 3;              // variable-node degree
  localparam int K      = 6;              // check-node degree

  typedef int exps_t [PERIOD][3];
  // exponents of the information (u) and parity (v) polynomials, phase 0..2
  localparam exps_t KU = '{'{0, 56, 373}, '{0, 197, 457}, '{0, 70, 485}};
  localparam exps_t KV = '{'{0, 218, 406}, '{0, 22, 491}, '{0, 181, 236}};

  // ---------------- message formats ----------------
  localparam int W   = 6;                 // LLR / check-to-variable width, (6,2) format
  localparam int WS  = W + 2;             // running sum with the channel value concealed
  localparam int LLR_MAX = (1 << (W-1)) - 1;

  typedef logic signed [W-1:0]  llr_t;
  typedef logic signed [WS-1:0] sum_t;

  // One variable's state as it travels through a processor window.
  //  s  : between two checks, channel value plus one check message (w+1 bits
  //       of information); on the stage in front of a check it is the full
  //       variable-to-check message (w+2 bits).
  //  a  : newest check-to-variable message
  //  b  : the one before it
  //  hd : hard decision of the a-posteriori LLR after the latest check
  typedef struct packed {
    sum_t s;
    llr_t a;
    llr_t b;
    logic hd;
  } slot_t;
  localparam int SLOT_W = $bits(slot_t);

  // ---------------- decoder geometry ----------------
  localparam int DEC_RHO   = 12;          // decoder folding factor
  localparam int ENC_RHO   = 3;           // encoder folding factor on the test chip
  localparam int NPROC     = 5;           // processors (iterations)

  // last window position touched by a check, plus one pipeline stage
  function automatic int max_tap(input int rho);
    int m = 0;
    for (int p = 0; p < rho; p++)
      for (int j = 0; j < 3; j++) begin
        int ku = (KU[p % PERIOD][j] - p + rho - 1) / rho;
        int kv = (KV[p % PERIOD][j] - p + rho - 1) / rho;
        if (KU[p % PERIOD][j] >= p && ku > m) m = ku;
        if (KV[p % PERIOD][j] >= p && kv > m) m = kv;
      end
    return m;
  endfunction

  function automatic int npos(input int rho);
    return max_tap(rho) + 2;              // 43 for rho = 12
  endfunction

  function automatic int exp_of(input int var_v, input int ph, input int j);
    return (var_v == 0) ? KU[ph][j] : KV[ph][j];
  endfunction

  // lane read by check lane p through edge j of variable kind var_v
  function automatic int tap_lane(input int rho, input int var_v, input int p, input int j);
    int k = exp_of(var_v, p % PERIOD, j);
    return ((p - k) % rho + rho) % rho;
  endfunction

  // window position read by check lane p through edge j of variable kind var_v
  function automatic int tap_depth(input int rho, input int var_v, input int p, input int j);
    int k = exp_of(var_v, p % PERIOD, j);
    return (k - p + rho - 1) / rho;       // ceil((k-p)/rho), k >= p or k = 0
  endfunction

  // ---------------- tap map, computed once per module ----------------
  localparam int RHO_MAX = 16;
  localparam int NP_MAX  = 64;
  typedef logic [1:0][RHO_MAX-1:0][NP_MAX-1:0] tapmap_t;

  // bit d of row (var_v, q) is set when a check reads that window position
  function automatic tapmap_t tap_map(input int rho);
    tapmap_t tm;
    for (int v = 0; v < 2; v++)
      for (int q = 0; q < RHO_MAX; q++) tm[v][q] = '0;
    for (int p = 0; p < rho; p++)
      for (int v = 0; v < 2; v++)
        for (int j = 0; j < 3; j++)
          tm[v][tap_lane(rho, v, p, j)][tap_depth(rho, v, p, j)] = 1'b1;
    return tm;
  endfunction

  // for every tapped position: 4*p + j, with p the check lane and j the
  // edge (0..2) that reads it; -1 where no check reads
  typedef logic signed [1:0][RHO_MAX-1:0][NP_MAX-1:0][7:0] tapwho_t;
  function automatic tapwho_t tap_who(input int rho);
    tapwho_t tw;
    for (int v = 0; v < 2; v++)
      for (int q = 0; q < RHO_MAX; q++)
        for (int d = 0; d < NP_MAX; d++) tw[v][q][d] = '1;
    for (int p = 0; p < rho; p++)
      for (int v = 0; v < 2; v++)
        for (int j = 0; j < 3; j++)
          tw[v][tap_lane(rho, v, p, j)][tap_depth(rho, v, p, j)] = 8'(4*p + j);
    return tw;
  endfunction

  // A position d is plain when the value moves from d to d+1 unchanged:
  // no check at d and no post-addition on the way into d+1.
  function automatic bit is_plain(input tapmap_t tm, input int np, input int var_v,
                                  input int q, input int d);
    return !tm[var_v][q][d] && !((d + 1 < np) && tm[var_v][q][d+1]);
  endfunction

  // longest run of plain positions of a row: length and start
  function automatic int run_len(input tapmap_t tm, input int np, input int var_v, input int q);
    int best = 0, cur = 0;
    for (int d = 0; d < np; d++) begin
      if (is_plain(tm, np, var_v, q, d)) cur++; else cur = 0;
      if (cur > best) best = cur;
    end
    return best;
  endfunction

  function automatic int run_start(input tapmap_t tm, input int np, input int var_v, input int q);
    int best = 0, cur = 0, st = 0;
    for (int d = 0; d < np; d++) begin
      if (is_plain(tm, np, var_v, q, d)) cur++; else cur = 0;
      if (cur > best) begin best = cur; st = d - cur + 1; end
    end
    return st;
  endfunction

  // ---------------- hybrid-partitioned FIFO ----------------
  localparam int NBANK = 3;
  typedef int bank_depths_t [NBANK];
  // bank depths, deepest first (words)
  localparam bank_depths_t BANK_DEPTH = '{36, 32, 20};

  typedef logic signed [1:0][RHO_MAX-1:0][7:0] rowint_t;

  // bank that holds row (var_v, q): the deepest one that fits in the row's
  // longest tap-free run; -1 keeps the row entirely in registers
  function automatic rowint_t bank_map(input tapmap_t tm, input int np, input int rho,
                                       input bank_depths_t dep);
    rowint_t bm;
    for (int v = 0; v < 2; v++)
      for (int q = 0; q < RHO_MAX; q++) begin
        int l = (q < rho) ? run_len(tm, np, v, q) : 0;
        bm[v][q] = '1;
        for (int b = NBANK - 1; b >= 0; b--)
          if (dep[b] > 0 && dep[b] <= l) bm[v][q] = 8'(b);
      end
    return bm;
  endfunction

  // number of rows in bank b
  function automatic int bank_rows(input rowint_t bm, input int b);
    int n = 0;
    for (int v = 0; v < 2; v++)
      for (int q = 0; q < RHO_MAX; q++)
        if (int'($signed(bm[v][q])) == b) n++;
    return n;
  endfunction

  // word slot of row (var_v, q) inside its bank
  function automatic int bank_index(input rowint_t bm, input int var_v, input int q);
    int n = 0;
    for (int v = 0; v < 2; v++)
      for (int qq = 0; qq < RHO_MAX; qq++) begin
        if (v == var_v && qq == q) return n;
        if (bm[v][qq] == bm[var_v][q]) n++;
      end
    return n;
  endfunction

  // ---------------- puncturing (rate-compatible) ----------------
  typedef enum logic [2:0] {
    RATE_1_2 = 3'd0,
    RATE_2_3 = 3'd1,
    RATE_3_4 = 3'd2,
    RATE_4_5 = 3'd3,
    RATE_5_6 = 3'd4
  } rate_e;

  function automatic int punc_len(input rate_e r);
    case (r)
      RATE_2_3, RATE_3_4: return 6;
      RATE_4_5:           return 4;
      RATE_5_6:           return 10;
      default:            return 1;
    endcase
  endfunction

  // keep bit of the information (var_v=0) or parity (var_v=1) bit at pattern
  // index i (0 = first bit of the pattern); 1 = transmitted
  function automatic logic punc_keep(input rate_e r, input int var_v, input int i);
    logic [9:0] pu, pv;
    case (r)
      RATE_2_3: begin pu = 10'b110100_0000; pv = 10'b111111_0000; end
      RATE_3_4: begin pu = 10'b010111_0000; pv = 10'b111010_0000; end
      RATE_4_5: begin pu = 10'b1011_000000; pv = 10'b0110_000000; end
      RATE_5_6: begin pu = 10'b1110001110;  pv = 10'b0100110111;  end
      default:  begin pu = 10'b1_000000000; pv = 10'b1_000000000; end
    endcase
    return (var_v == 0) ? pu[9 - i] : pv[9 - i];
  endfunction

  // ---------------- test modes ----------------
  typedef enum logic [2:0] {
    MODE_NORMAL   = 3'd0,   // encoder -> AWGN -> decoder
    MODE_NO_NOISE = 3'd1,   // AWGN bypassed
    MODE_UNCODED  = 3'd2,   // encoder and decoder bypassed
    MODE_TEST_IN  = 3'd3,   // LLRs from pins into the de-puncturer
    MODE_EXT_CTRL = 3'd4    // control strobes from pins
  } mode_e;

  function automatic llr_t sat_llr(input int x);
    if (x > LLR_MAX)  return llr_t'(LLR_MAX);
    if (x < -LLR_MAX) return llr_t'(-LLR_MAX);
    return llr_t'(x);
  endfunction

endpackage
