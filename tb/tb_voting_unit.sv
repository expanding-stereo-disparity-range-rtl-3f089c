// tb_voting_unit: random normalised phases; the vote must equal the real part of
// sum_o ref_o * conj(srch_o), computed here with complex arithmetic on integers,
// and 0 when disabled. Also checks that a phase vector correlates best with itself.
module tb_voting_unit;
  import stereo_pkg::*;
  logic en;
  cph_t [NORI-1:0] a, b;
  vote_t v;
  int checks = 0, failures = 0;

  voting_unit dut (.en(en), .ref_c(a), .srch_c(b), .vote(v));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int e;
      for (int o = 0; o < NORI; o++) begin
        a[o].re = 8'($urandom); a[o].im = 8'($urandom);
        b[o].re = 8'($urandom); b[o].im = 8'($urandom);
      end
      en = (i % 5) != 0;
      #1;
      e = 0;
      if (en)
        for (int o = 0; o < NORI; o++) begin
          // (ar + j ai)(br - j bi) has real part ar*br + ai*bi
          e += int'(a[o].re) * int'(b[o].re) - int'(a[o].im) * (-int'(b[o].im));
        end
      checks++;
      if (int'(v) != e) begin failures++; $display("vote %0d expected %0d", v, e); end
    end
    // unit-amplitude phases: self-correlation beats a rotated copy
    for (int i = 0; i < 50; i++) begin
      vote_t vs, vr;
      for (int o = 0; o < NORI; o++) begin
        real th;
        th = real'($urandom_range(0, 359)) * 3.14159265 / 180.0;
        a[o].re = 8'($rtoi(90.0 * $cos(th))); a[o].im = 8'($rtoi(90.0 * $sin(th)));
      end
      en = 1; b = a; #1; vs = v;
      for (int o = 0; o < NORI; o++) begin b[o].re = a[o].im; b[o].im = -a[o].re; end
      #1; vr = v;
      checks++;
      if (!(vs > vr)) begin failures++; $display("self %0d rotated %0d", vs, vr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
