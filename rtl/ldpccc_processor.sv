// ldpccc_processor: one decoding iteration of the pipelined LDPC-CC decoder.
//
// The processor is a sliding window over the code's Tanner graph, NP = 43
// blocks deep for the default folding factor RHO = 12. Every enabled cycle a
// block of RHO information and RHO parity variables enters at position 0, all
// blocks move one position on, and the oldest block leaves from position NP-1.
// In the same cycle RHO check node units process the RHO checks of the newest
// block; each reads its six variables at fixed (lane, position) taps computed
// from the code in ldpccc_pkg, so no multiplexers are needed.
//
// Message schedule (on-demand variable node activation with the channel value
// concealed): a variable keeps a sum s and its two latest check messages a
// (newest) and b. On the stage in front of a check, s = s + a turns into the
// full variable-to-check message n (post-addition). At the check the unit
// returns m; the variable leaves with s = n - b (pre-subtraction, channel
// value plus one message), a = m, b = a. So every check sees the messages the
// earlier checks of the same iteration just produced, and no separate row for
// the channel value is stored. The hard decision sign(n + m) is refreshed at
// every check; the decoder takes it from the processor chosen as the last.
// This follows the document's schedule, retiming and folding. The separate
// hard-decision bit, the 8-bit s field on all stages (the document narrows it
// to 7 bits between checks) and the reset flush are this design's choices.
//
// Hybrid-partitioned FIFO: each row (variable kind x lane) whose longest
// tap-free stretch can hold one of the BANK_DEPTH memory depths keeps that
// stretch in a circ_buffer bank shared by all rows of the same depth class;
// the rest of the window is registers. With the defaults this gives banks of
// 36, 32 and 20 words holding 8, 4 and 8 rows, as in the document.
//
// Interface: en moves the window; in_valid/in_slot is the block entering;
// out_valid/out_slot is the block leaving. flush (with en forced inside)
// shifts known-zero slots (s = +max) in, to initialise window and banks; the
// node updates are held off meanwhile, so the uninitialised bank contents
// that pass the checks during the flush leave no trace.
// Latency: NP enabled cycles from in_slot to out_slot.
module ldpccc_processor
  import ldpccc_pkg::*;
#(
  parameter int           RHO   = DEC_RHO,
  parameter int           ALPHA = 7,
  parameter bank_depths_t DEPTH = BANK_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  flush,
  input  logic  in_valid,
  input  slot_t in_slot  [2][RHO],
  output logic  out_valid,
  output slot_t out_slot [2][RHO]
);

  localparam int      NP = npos(RHO);
  localparam tapmap_t TM = tap_map(RHO);
  localparam tapwho_t TW = tap_who(RHO);
  localparam rowint_t BM = bank_map(TM, NP, RHO, DEPTH);

  localparam slot_t INIT = '{s: sum_t'(LLR_MAX), a: '0, b: '0, hd: 1'b0};

  logic  step;
  assign step = en | flush;

  slot_t cur [2][RHO][NP];   // content of each window position
  slot_t nxt [2][RHO][NP];   // value written into each position this cycle

  // ---------------- check node units ----------------
  sum_t cnu_in  [RHO][K];
  llr_t cnu_out [RHO][K];

  for (genvar p = 0; p < RHO; p++) begin : g_cnu
    for (genvar v = 0; v < 2; v++) begin : g_v
      for (genvar j = 0; j < 3; j++) begin : g_j
        assign cnu_in[p][v*3+j] = cur[v][tap_lane(RHO, v, p, j)][tap_depth(RHO, v, p, j)].s;
      end
    end
    ldpccc_cnu #(.ALPHA(ALPHA)) u_cnu (.in_msg(cnu_in[p]), .out_msg(cnu_out[p]));
  end

  // ---------------- window rows ----------------
  logic [SLOT_W*2*RHO-1:0] bank_w [NBANK];
  logic [SLOT_W*2*RHO-1:0] bank_r [NBANK];

  for (genvar v = 0; v < 2; v++) begin : g_var
    for (genvar q = 0; q < RHO; q++) begin : g_lane
      localparam int B  = int'($signed(BM[v][q]));
      localparam int S  = run_start(TM, NP, v, q);
      localparam int D  = (B >= 0) ? DEPTH[(B >= 0) ? B : 0] : 0;
      localparam int BI = bank_index(BM, v, q);

      for (genvar d = 0; d < NP; d++) begin : g_pos
        localparam int  WHO      = (d > 0) ? int'($signed(TW[v][q][(d > 0) ? d - 1 : 0])) : -1;
        localparam bit  TAP_PREV = WHO >= 0;
        localparam bit  TAP_HERE = TM[v][q][d];
        localparam int  CP       = (WHO >= 0) ? WHO / 4 : 0;
        localparam int  CE       = (WHO >= 0) ? WHO % 4 : 0;

        // transfer from position d-1 (or the input) into position d
        always_comb begin
          slot_t x;
          llr_t  m;
          m = cnu_out[CP][v*3 + CE];
          if (d == 0) x = flush ? INIT : in_slot[v][q];
          else        x = cur[v][q][(d > 0) ? d - 1 : 0];
          if (TAP_PREV && !flush) begin
            x.hd = (int'(x.s) + int'(m)) < 0;       // a-posteriori sign
            x.s  = x.s - sum_t'(x.b);               // pre-sub-VNU
            x.b  = x.a;
            x.a  = m;
          end
          if (TAP_HERE && !flush) x.s = x.s + sum_t'(x.a);   // post-sub-VNU
          nxt[v][q][d] = x;
        end

        if (B >= 0 && d >= S && d < S + D) begin : g_mem
          // stretch held by a memory bank: only its last position is read
          if (d == S + D - 1) begin : g_rd
            assign cur[v][q][d] = slot_t'(bank_r[B][BI*SLOT_W +: SLOT_W]);
          end else begin : g_none
            assign cur[v][q][d] = INIT;
          end
          if (d == S) begin : g_wr
            assign bank_w[B][BI*SLOT_W +: SLOT_W] = nxt[v][q][d];
          end
        end else begin : g_reg
          slot_t r;
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n)    r <= INIT;
            else if (step) r <= nxt[v][q][d];
          end
          assign cur[v][q][d] = r;
        end
      end
      assign out_slot[v][q] = cur[v][q][NP-1];
    end
  end

  // ---------------- memory banks ----------------
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    localparam int NR = bank_rows(BM, b);
    if (NR > 0) begin : g_on
      if (NR < 2*RHO) begin : g_pad
        assign bank_w[b][SLOT_W*2*RHO-1:SLOT_W*NR] = '0;
      end
      logic [SLOT_W*NR-1:0] rd;
      circ_buffer #(.WIDTH(SLOT_W*NR), .DEPTH(DEPTH[b])) u_bank (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (step),
        .wdata(bank_w[b][SLOT_W*NR-1:0]),
        .rdata(rd)
      );
      assign bank_r[b] = (SLOT_W*2*RHO)'(rd);
    end else begin : g_off
      assign bank_w[b] = '0;
      assign bank_r[b] = '0;
    end
  end

  // ---------------- valid tags ----------------
  logic [NP-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    vld <= '0;
    else if (step) vld <= {vld[NP-2:0], in_valid & ~flush};
  end
  assign out_valid = vld[NP-1];

endmodule
