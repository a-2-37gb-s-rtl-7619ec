// tb_ldpccc_processor: one processor (one decoding iteration, folding 12).
//
// Codewords from a reference encoder written from the parity-check equations
// are sent as LLRs +-8; about one bit in 20 is received wrong but weak (+-2
// with the wrong sign). One iteration of the message schedule must repair all
// of them: the hard decisions leaving the processor must equal the codeword
// for information and parity bits. The first block must leave exactly 43
// enabled cycles after it entered, and a stall (en low) in the middle of the
// stream must change nothing.
// A second stream with noisy noise is compared bit-exactly, field by field
// ({s, a, b, hd} of every slot leaving the window), with a sequential model of
// the message schedule written in this testbench: the checks are taken block
// by block in time order; a check reads n = s + a of its six variables, gets
// normalized min-sum messages m (7/8, inputs clipped to +-31), and leaves each
// variable with hd = sign(n + m), s = n - b, b = a, a = m. The 43 blocks of
// flushed slots (s = +31) in front of the stream take part as variables, and
// the checks of the last flushed block run as the first block enters.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_ldpccc_processor;
  import ldpccc_pkg::*;

  localparam int RHO = 12;
  localparam int NBLK = 200, NPAD = 60;
  localparam int NT = RHO * (NBLK + NPAD);

  logic clk = 0, rst_n = 0, en = 0, flush = 0, in_valid = 0, out_valid;
  slot_t in_slot [2][RHO], out_slot [2][RHO];
  ldpccc_processor dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit u [NT], v [NT];
  int lu [NT], lv [NT];

  // sequential model of one iteration; index = time + OFF
  localparam int OFF = 43 * RHO;
  int ms [2][OFF+NT], ma [2][OFF+NT], mb [2][OFF+NT];
  bit mh [2][OFF+NT];

  task automatic model();
    int eu [3][3] = '{'{0, 56, 373}, '{0, 197, 457}, '{0, 70, 485}};
    int ev [3][3] = '{'{0, 218, 406}, '{0, 22, 491}, '{0, 181, 236}};
    for (int i = 0; i < OFF + NT; i++)
      for (int w = 0; w < 2; w++) begin
        int l;
        l = (i < OFF) ? 31 : (w == 0 ? lu[i-OFF] : lv[i-OFF]);
        ms[w][i] = l; ma[w][i] = 0; mb[w][i] = 0; mh[w][i] = (i < OFF) ? 1'b0 : l < 0;
      end
    // the checks of the last flushed block run as the first block enters
    for (int x = -1; x < NT / RHO; x++) begin
      int idx [RHO][6], n [RHO][6], m [RHO][6];
      for (int p = 0; p < RHO; p++) begin
        int t;
        t = x * RHO + p;
        for (int e = 0; e < 6; e++) begin
          idx[p][e] = OFF + t - (e < 3 ? eu[p%3][e] : ev[p%3][e-3]);
          n[p][e] = ms[e/3][idx[p][e]] + ma[e/3][idx[p][e]];
        end
        for (int e = 0; e < 6; e++) begin
          int mn = 1000, sg = 0;
          for (int f = 0; f < 6; f++) if (f != e) begin
            int a;
            a = n[p][f] < 0 ? -n[p][f] : n[p][f];
            if (a > 31) a = 31;
            if (n[p][f] < 0) sg ^= 1;
            if (a < mn) mn = a;
          end
          m[p][e] = sg ? -((mn * 7) / 8) : (mn * 7) / 8;
        end
      end
      for (int p = 0; p < RHO; p++)
        for (int e = 0; e < 6; e++) begin
          int w, i;
          w = e / 3; i = idx[p][e];
          mh[w][i] = (n[p][e] + m[p][e]) < 0;
          ms[w][i] = n[p][e] - mb[w][i];
          mb[w][i] = ma[w][i];
          ma[w][i] = m[p][e];
        end
    end
  endtask

  function automatic bit get(ref bit a [NT], input int t);
    return (t < 0) ? 1'b0 : a[t];
  endfunction

  int exact_checks = 0;

  // one stream: build the codeword and its LLRs, flush, send, compare
  task automatic stream(input bit noisy, output int raw, output int err, output int lat);
    int eu [3][3] = '{'{0, 56, 373}, '{0, 197, 457}, '{0, 70, 485}};
    int ev [3][3] = '{'{0, 218, 406}, '{0, 22, 491}, '{0, 181, 236}};
    int in_blk, out_blk, first_in, first_out;
    in_blk = 0; out_blk = 0; first_in = -1; first_out = -1; raw = 0; err = 0;
    for (int t = 0; t < NT; t++) begin
      int ph;
      ph = t % 3;
      u[t] = 1'($urandom);
      v[t] = u[t] ^ get(u, t - eu[ph][1]) ^ get(u, t - eu[ph][2])
                  ^ get(v, t - ev[ph][1]) ^ get(v, t - ev[ph][2]);
      lu[t] = u[t] ? -8 : 8;
      lv[t] = v[t] ? -8 : 8;
      if (noisy) begin
        // wide noise: many wrong and saturated values
        lu[t] = sat_llr(lu[t] + int'($urandom_range(40, 0)) - 20);
        lv[t] = sat_llr(lv[t] + int'($urandom_range(40, 0)) - 20);
      end else begin
        if ($urandom_range(39, 0) == 0) begin lu[t] = u[t] ? 2 : -2; raw++; end
        if ($urandom_range(39, 0) == 0) begin lv[t] = v[t] ? 2 : -2; raw++; end
      end
    end
    model();
    @(negedge clk);
    flush = 1;
    repeat (43) @(negedge clk);
    flush = 0;
    while (out_blk < NBLK) begin
      en = !(in_blk >= 100 && in_blk < 104 && cyc % 2 == 0);   // a short stall
      in_valid = 1;
      for (int q = 0; q < RHO; q++) begin
        in_slot[0][q] = '{s: sum_t'(lu[in_blk*RHO+q]), a: '0, b: '0, hd: lu[in_blk*RHO+q] < 0};
        in_slot[1][q] = '{s: sum_t'(lv[in_blk*RHO+q]), a: '0, b: '0, hd: lv[in_blk*RHO+q] < 0};
      end
      if (in_blk == 0) first_in = cyc;
      @(posedge clk);
      #1;
      if (en) begin
        in_blk++;
        if (out_valid) begin
          if (first_out < 0) first_out = cyc;
          for (int q = 0; q < RHO; q++)
            for (int w = 0; w < 2; w++) begin
              int i;
              i = OFF + out_blk * RHO + q;
              if (!noisy) begin
                checks++;
                if (out_slot[w][q].hd != (w == 0 ? u[i-OFF] : v[i-OFF])) begin failures++; err++; end
              end else begin
                checks++; exact_checks++;
                if (out_slot[w][q] != '{s: sum_t'(ms[w][i]), a: llr_t'(ma[w][i]),
                                        b: llr_t'(mb[w][i]), hd: mh[w][i]}) begin
                  failures++; err++;
                  if (err < 5) $display("block %0d lane %0d var %0d: got %p expected s=%0d a=%0d b=%0d hd=%0d",
                                        out_blk, q, w, out_slot[w][q], ms[w][i], ma[w][i], mb[w][i], mh[w][i]);
                end
              end
            end
          out_blk++;
        end
      end
      @(negedge clk);
    end
    in_valid = 0; en = 0;
    lat = first_out - first_in;
  endtask

  initial begin
    int raw, err, lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    stream(1'b0, raw, err, lat);
    checks++;
    if (lat != 43) begin
      failures++;
      $display("latency %0d, expected 43", lat);
    end
    checks++;
    if (raw == 0) failures++;
    $display("weak channel errors %0d, errors after one iteration %0d", raw, err);
    stream(1'b1, raw, err, lat);
    $display("bit-exact comparison: %0d slots, %0d mismatches", exact_checks, err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
