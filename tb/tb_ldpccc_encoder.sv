// tb_ldpccc_encoder: the folded encoder (3 bits per cycle) must produce the
// same parity bits as a bit-serial reference written from the three
// parity-check equations, over 4000 random information bits with random idle
// cycles in between; output arrives one cycle after input.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_ldpccc_encoder;
  localparam int RHO = 3;
  localparam int NT = 4200;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic [RHO-1:0] in_u = '0, out_u, out_v;
  ldpccc_encoder #(.RHO(RHO)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit u [NT], v [NT];
  function automatic bit get(ref bit a [NT], input int t);
    return (t < 0) ? 1'b0 : a[t];
  endfunction

  initial begin
    int eu [3][3] = '{'{0, 56, 373}, '{0, 197, 457}, '{0, 70, 485}};
    int ev [3][3] = '{'{0, 218, 406}, '{0, 22, 491}, '{0, 181, 236}};
    int ph, blk, oblk;
    for (int t = 0; t < NT; t++) begin
      ph = t % 3;
      u[t] = 1'($urandom);
      v[t] = u[t] ^ get(u, t - eu[ph][1]) ^ get(u, t - eu[ph][2])
                  ^ get(v, t - ev[ph][1]) ^ get(v, t - ev[ph][2]);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    blk = 0; oblk = 0;
    while (oblk < NT / RHO) begin
      @(negedge clk);
      in_valid = (blk < NT / RHO) && ($urandom_range(3, 0) != 0);
      for (int i = 0; i < RHO; i++) in_u[i] = (blk < NT / RHO) ? u[blk*RHO + i] : 1'b0;
      @(posedge clk);
      if (in_valid) blk++;
      #1;
      if (out_valid) begin
        for (int i = 0; i < RHO; i++) begin
          checks += 2;
          if (out_v[i] != v[oblk*RHO + i]) failures++;
          if (out_u[i] != u[oblk*RHO + i]) failures++;
        end
        oblk++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
